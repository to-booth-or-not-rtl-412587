// csa_array: linear multiplication array.
//
// Sums K partial products of W bits into a carry-save pair with K-2 cascaded
// 3/2-adders: the first adds rows 0, 1 and 2, each further adder adds the
// next row to the running sum and carry words. Delay (K-2) full-adder delays.
// Results are modulo 2^W. Combinational.
module csa_array #(
  parameter int unsigned K = 53,
  parameter int unsigned W = 106
) (
  input  logic [W-1:0] pp [K],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  if (K < 3) begin : g_bad_k
    $error("csa_array needs K >= 3");
  end

  logic [W-1:0] ps [K];  // running sum after adding row t, t = 2..K-1
  logic [W-1:0] pc [K];

  csa #(.K(W)) u_first (.x(pp[0]), .y(pp[1]), .z(pp[2]), .s(ps[2]), .c(pc[2]));

  for (genvar t = 3; t < K; t++) begin : g_stage
    csa #(.K(W)) u_csa (.x(ps[t-1]), .y(pc[t-1]), .z(pp[t]), .s(ps[t]), .c(pc[t]));
  end

  // Entries 0 and 1 are never used.
  assign ps[0] = '0;
  assign pc[0] = '0;
  assign ps[1] = '0;
  assign pc[1] = '0;

  assign sum   = ps[K-1];
  assign carry = pc[K-1];
endmodule
