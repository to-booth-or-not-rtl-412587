// mul_top: the four multiplier organisations compared side by side.
//
// The same unsigned operands a (N bits) and b (M bits) drive
//  * array_mul         - AND rows, linear 3/2-adder array
//  * booth_array_mul   - Booth-2 rows, linear 3/2-adder array
//  * tree42_mul        - AND rows, 4/2-adder tree
//  * booth_tree42_mul  - Booth-2 rows, 4/2-adder tree
// and each brings out its product in carry-save form (sum + carry equals
// <a><b> modulo 2^(N+M)). The defaults N = M = 53 are the double-precision
// mantissa size used as the main example. Combinational, no clock or reset.
// Putting the four side by side is this design's choice: they are
// alternatives compared for cost and delay, not parts of one datapath.
module mul_top #(
  parameter int unsigned N = 53,
  parameter int unsigned M = 53
) (
  input  logic [N-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [N+M-1:0] arr_sum,
  output logic [N+M-1:0] arr_carry,
  output logic [N+M-1:0] barr_sum,
  output logic [N+M-1:0] barr_carry,
  output logic [N+M-1:0] tree_sum,
  output logic [N+M-1:0] tree_carry,
  output logic [N+M-1:0] btree_sum,
  output logic [N+M-1:0] btree_carry
);
  array_mul        #(.N(N), .M(M)) u_arr   (.a(a), .b(b), .sum(arr_sum),   .carry(arr_carry));
  booth_array_mul  #(.N(N), .M(M)) u_barr  (.a(a), .b(b), .sum(barr_sum),  .carry(barr_carry));
  tree42_mul       #(.N(N), .M(M)) u_tree  (.a(a), .b(b), .sum(tree_sum),  .carry(tree_carry));
  booth_tree42_mul #(.N(N), .M(M)) u_btree (.a(a), .b(b), .sum(btree_sum), .carry(btree_carry));
endmodule
