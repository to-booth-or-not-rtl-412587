// tree42: 4/2-adder tree that reduces K partial products to a carry-save pair.
//
// Shape (M = 2^ceil(log2 K), mu = log2(M/4)):
//  * Top level, M/4 nodes. If 3M/4 <= K <= M, node i for i < a = K - 3M/4 is
//    a 4/2-adder on four rows and the remaining M/4 - a nodes are 3/2-adders
//    on three rows each. If M/2 < K < 3M/4, the b = K - M/2 rightmost nodes
//    are 3/2-adders and the remaining rows go straight down, two rows forming
//    one carry-save pair.
//  * Lower part: a complete binary tree of 4/2-adders of depth mu; node i of
//    level l combines nodes 2i (right son, lower rows) and 2i+1 (left son).
// Rows are fed in from the right: row 0 goes to the rightmost node, so along
// every level a left son never sums more rows than its right son. Delay is
// 2*(mu+1) full-adder delays at most. All words are W bits, modulo 2^W.
// Combinational. The leaf arrangement and the tree follow the multiplier
// designs being reproduced; the pairing order of words within a 4/2-adder is
// this design's choice.
module tree42
  import mul_pkg::*;
#(
  parameter int unsigned K = 53,
  parameter int unsigned W = 106
) (
  input  logic [W-1:0] pp [K],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  if (K < 3) begin : g_bad_k
    $error("tree42 needs K >= 3");
  end

  localparam int unsigned P   = tree_leaves(K);
  localparam int unsigned MU  = tree_depth(K);
  localparam bit          TOP = tree_full_top(K);
  localparam int unsigned N42 = tree_n42(K);
  localparam int unsigned N32 = tree_n32(K);

  // One generate block per level: level 0 = top level (leaves), level MU =
  // root. Each level holds the carry-save pairs (s, c) of its nodes.
  for (genvar l = 0; l <= MU; l++) begin : g_lv
    localparam int unsigned NN = P >> l;
    logic [W-1:0] s [NN];
    logic [W-1:0] c [NN];

    if (l == 0) begin : g_top
      for (genvar i = 0; i < P; i++) begin : g_leaf
        if (TOP && i < N42) begin : g_l42
          adder42 #(.K(W)) u_add (
            .a(pp[4*i]), .b(pp[4*i+1]), .c(pp[4*i+2]), .d(pp[4*i+3]),
            .s(s[i]), .t(c[i])
          );
        end else if (TOP) begin : g_l32
          localparam int unsigned B = 4*N42 + 3*(i - N42);
          csa #(.K(W)) u_csa (
            .x(pp[B]), .y(pp[B+1]), .z(pp[B+2]), .s(s[i]), .c(c[i])
          );
        end else if (i < N32) begin : g_r32
          csa #(.K(W)) u_csa (
            .x(pp[3*i]), .y(pp[3*i+1]), .z(pp[3*i+2]), .s(s[i]), .c(c[i])
          );
        end else begin : g_direct
          localparam int unsigned B = 3*N32 + 2*(i - N32);
          assign s[i] = pp[B];
          assign c[i] = pp[B+1];
        end
      end
    end else begin : g_inner
      // Complete binary tree of 4/2-adders: node i takes its right son 2i
      // (lower rows) and its left son 2i+1 from the level above.
      for (genvar i = 0; i < NN; i++) begin : g_node
        adder42 #(.K(W)) u_add (
          .a(g_lv[l-1].s[2*i]),   .b(g_lv[l-1].c[2*i]),
          .c(g_lv[l-1].s[2*i+1]), .d(g_lv[l-1].c[2*i+1]),
          .s(s[i]), .t(c[i])
        );
      end
    end
  end

  assign sum   = g_lv[MU].s[0];
  assign carry = g_lv[MU].c[0];
endmodule
