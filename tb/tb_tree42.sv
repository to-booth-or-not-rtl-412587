// tb_tree42: the 4/2-adder tree must reduce K random W-bit rows to a pair
// whose sum is the sum of the rows modulo 2^W. Sizes cover both shapes of
// the top level: 3M/4 <= K <= M (K = 3, 4, 6, 7, 8, 13, 24, 27, 53) and
// M/2 < K < 3M/4 (K = 5, 9, 17, 33), W = 106.
// It also checks the tree shapes against the worked numbers of the design
// (53 rows: 11 3/2-leaves and 5 4/2-leaves; 24 rows: 8 3/2-leaves; 27 Booth
// rows: 3 4/2-leaves; 13 Booth rows: 1 4/2-leaf) and that every shape uses
// exactly K-2 3/2-adder stages (a 4/2-adder counting as two).
module tb_tree42;
  import mul_pkg::*;
  localparam int unsigned W = 106;
  localparam int unsigned NK = 13;
  localparam int unsigned KS [NK] = '{3, 4, 5, 6, 7, 8, 9, 13, 17, 24, 27, 33, 53};
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NK; g++) begin : g_k
    localparam int unsigned K = KS[g];
    logic [W-1:0] pp [K];
    logic [W-1:0] s, c;
    tree42 #(.K(K), .W(W)) dut (.pp(pp), .sum(s), .carry(c));

    task automatic run(bit ones);
      logic [W-1:0] r;
      foreach (pp[i]) pp[i] = ones ? '1 : W'({$urandom, $urandom, $urandom, $urandom});
      #1;
      r = '0;
      foreach (pp[i]) r += pp[i];
      checks++;
      if (W'(s + c) != r) begin
        failures++;
        $display("FAIL K=%0d", K);
      end
    endtask
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic shape(int unsigned k, int unsigned n32, int unsigned n42, int unsigned mu);
    checks++;
    if (tree_n32(k) != n32 || tree_n42(k) != n42 || tree_depth(k) != mu) begin
      failures++;
      $display("FAIL shape K=%0d: n32=%0d n42=%0d mu=%0d", k, tree_n32(k), tree_n42(k), tree_depth(k));
    end
  endtask

  initial begin
    shape(53, 11, 5, 4);
    shape(24, 8, 0, 3);
    shape(booth_digits(53), 5, 3, 3);
    shape(booth_digits(24), 3, 1, 2);
    for (int unsigned k = 3; k <= 200; k++) begin
      checks++;
      if (tree_n32(k) + 2 * tree_n42(k) + 2 * (tree_leaves(k) - 1) != k - 2) begin
        failures++;
        $display("FAIL stage count K=%0d", k);
      end
    end
    for (int t = 0; t < 300; t++) begin
      g_k[0].run(t == 0);  g_k[1].run(t == 0);  g_k[2].run(t == 0);
      g_k[3].run(t == 0);  g_k[4].run(t == 0);  g_k[5].run(t == 0);
      g_k[6].run(t == 0);  g_k[7].run(t == 0);  g_k[8].run(t == 0);
      g_k[9].run(t == 0);  g_k[10].run(t == 0); g_k[11].run(t == 0);
      g_k[12].run(t == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
