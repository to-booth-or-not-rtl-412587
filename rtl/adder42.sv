// adder42: K-bit 4/2-adder built from two cascaded 3/2-adders.
//
// The first carry-save adder reduces a, b, c to a pair; the second adds d to
// that pair. The result satisfies s + t == a + b + c + d (mod 2^K). Delay is
// two full-adder delays, cost 2K full adders. Optimised 4/2 cells are not
// used, following the designs this RTL reproduces. Combinational.
module adder42 #(
  parameter int unsigned K = 106
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [K-1:0] c,
  input  logic [K-1:0] d,
  output logic [K-1:0] s,
  output logic [K-1:0] t
);
  logic [K-1:0] s1, c1;

  csa #(.K(K)) u_csa1 (.x(a),  .y(b),  .z(c), .s(s1), .c(c1));
  csa #(.K(K)) u_csa2 (.x(s1), .y(c1), .z(d), .s(s),  .c(t));
endmodule
