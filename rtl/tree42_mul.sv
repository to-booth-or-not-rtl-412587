// tree42_mul: Non-Booth (N, M) multiplier with a 4/2-adder tree: N*M AND gates form the rows, tree42 sums them in 2*(ceil(log2 M)-1) full-adder delays.
//
// Unsigned operands a (N bits) and b (M bits). The product is delivered in
// carry-save form: <a> * <b> == sum + carry (mod 2^(N+M)), and since the
// product is below 2^(N+M) the equality is exact. No final carry-propagate
// adder is included, as in the compared designs, which end at the
// carry-save representation. Combinational, no clock or reset.
module tree42_mul
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
  localparam int unsigned K = M;

  logic [N+M-1:0] pp [K];

  pp_and_gen #(.N(N), .M(M)) u_pp (.a(a), .b(b), .pp(pp));
  tree42 #(.K(K), .W(N+M)) u_red (.pp(pp), .sum(sum), .carry(carry));
endmodule
