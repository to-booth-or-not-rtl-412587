// booth_pp_gen: radix-4 (Booth-2) partial products of an unsigned (N, M)
// multiplier.
//
// b is cut into MP = ceil((M+1)/2) overlapping triples b[2j+1:2j-1] (with
// b[-1] = b[M] = b[M+1] = 0). Each triple drives one booth_decoder, whose
// outputs steer N+1 booth_select cells producing d_2j ^ s_2j, where
// d_2j = <a> * |B_2j| has N+1 bits. To keep all partial products positive,
// constants are folded into the top bits and the +1 of each two's
// complement negation is added one row later:
//   g_0   = ( ~s0, s0, s0, d_0 ^ s0, 0, 0 )
//   g_2j  = ( 1, ~s_2j, d_2j ^ s_2j, 0, s_2j-2 )     for j > 0
// and row j is g_2j * 4^(j-1). The sum of all rows equals <a><b> modulo
// 2^(N+M). The last digit is never negative, so its sign is not needed.
// Each row is delivered as an (N+M)-bit word, bits above N+M-1 dropped.
// Combinational: decoder delay followed by selection delay.
module booth_pp_gen
  import mul_pkg::*;
#(
  parameter int unsigned N = 53,
  parameter int unsigned M = 53,
  localparam int unsigned MP = booth_digits(M),
  localparam int unsigned W  = N + M
) (
  input  logic [N-1:0] a,
  input  logic [M-1:0] b,
  output logic [W-1:0] pp [MP]
);
  // be[k+1] = b[k] for k = -1 .. M+1 (zero outside the operand)
  logic [2*MP:0] be;
  assign be = (2*MP+1)'({b, 1'b0});

  // a with a[-1] = a[N] = 0
  logic [N+1:0] ae;
  assign ae = {1'b0, a, 1'b0};

  logic [MP-1:0] b1, b2, s;
  logic [N:0]    dx [MP];  // d_2j ^ s_2j

  for (genvar j = 0; j < MP; j++) begin : g_digit
    booth_decoder u_bd (
      .b_hi (be[2*j+2]),
      .b_mid(be[2*j+1]),
      .b_lo (be[2*j]),
      .b1   (b1[j]),
      .b2   (b2[j]),
      .s    (s[j])
    );
    for (genvar k = 0; k <= N; k++) begin : g_sel
      booth_select u_sl (
        .a_hi(ae[k+1]),
        .a_lo(ae[k]),
        .b1  (b1[j]),
        .b2  (b2[j]),
        .s   (s[j]),
        .g   (dx[j][k])
      );
    end
  end

  // Width that holds every row before it is cut to W bits.
  localparam int unsigned WX = W + N + 8;

  always_comb begin
    for (int j = 0; j < MP; j++) begin
      logic [WX-1:0] row;
      if (j == 0) begin
        // g_0 * 4^-1 = ( ~s0, s0, s0, d_0 ^ s0 ) at bit 0
        row = WX'({~s[0], s[0], s[0], dx[0]});
      end else begin
        // g_2j * 4^(j-1) = ( 1, ~s_2j, d_2j ^ s_2j, 0, s_2j-2 ) at bit 2j-2
        row = WX'({1'b1, ~s[j], dx[j], 1'b0, s[j-1]}) << (2*j - 2);
      end
      pp[j] = row[W-1:0];
    end
  end
endmodule
