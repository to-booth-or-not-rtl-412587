// booth_array_mul: Booth-2 (N, M) array multiplier: MP = ceil((M+1)/2) Booth rows summed by MP-2 cascaded 3/2-adders ((MP-2) full-adder delays plus the decoder and selection delays).
//
// Unsigned operands a (N bits) and b (M bits). The product is delivered in
// carry-save form: <a> * <b> == sum + carry (mod 2^(N+M)), and since the
// product is below 2^(N+M) the equality is exact. No final carry-propagate
// adder is included, as in the compared designs, which end at the
// carry-save representation. Combinational, no clock or reset.
module booth_array_mul
  import mul_pkg::*;
#(
  parameter int unsigned N = 53,
  parameter int unsigned M = 53
) (
  input  logic [N-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [N+M-1:0] sum,
  output logic [N+M-1:0] carry
);
  localparam int unsigned K = booth_digits(M);

  logic [N+M-1:0] pp [K];

  booth_pp_gen #(.N(N), .M(M)) u_pp (.a(a), .b(b), .pp(pp));
  csa_array #(.K(K), .W(N+M)) u_red (.pp(pp), .sum(sum), .carry(carry));
endmodule
