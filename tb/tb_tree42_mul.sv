// tb_tree42_mul: checks that sum + carry of tree42_mul equals <a> * <b>.
// Three instances: the default 53 x 53 with random and extreme operands,
// an exhaustive 6 x 6, and an odd-shaped 12 x 9. The reference product is
// computed with the testbench's own 128-bit multiply.
module tb_tree42_mul;
  logic [52:0]  a0, b0;
  logic [105:0] s0, c0;
  logic [5:0]   a1, b1;
  logic [11:0]  s1, c1;
  logic [11:0]  a2;
  logic [8:0]   b2;
  logic [20:0]  s2, c2;
  int checks = 0, failures = 0;

  tree42_mul                    u0 (.a(a0), .b(b0), .sum(s0), .carry(c0));
  tree42_mul #(.N(6),  .M(6)) u1 (.a(a1), .b(b1), .sum(s1), .carry(c1));
  tree42_mul #(.N(12), .M(9)) u2 (.a(a2), .b(b2), .sum(s2), .carry(c2));

  task automatic check0();
    #1;
    checks++;
    if (106'(s0 + c0) != 106'(128'(a0) * 128'(b0))) begin
      failures++;
      $display("FAIL 53x53 a=%h b=%h", a0, b0);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a0 = '1; b0 = '1; check0();
    a0 = '0; b0 = '1; check0();
    a0 = '1; b0 = 53'h0AAAAAAAAAAAAA; check0();
    a0 = 53'h1555555555555; b0 = 53'h1555555555555; check0();
    for (int i = 0; i < 1000; i++) begin
      a0 = 53'({$urandom, $urandom});
      b0 = 53'({$urandom, $urandom});
      check0();
    end
    for (int x = 0; x < 64; x++) begin
      for (int y = 0; y < 64; y++) begin
        a1 = 6'(x); b1 = 6'(y);
        #1;
        checks++;
        if (12'(s1 + c1) != 12'(x * y)) begin
          failures++;
          $display("FAIL 6x6 a=%0d b=%0d", x, y);
        end
      end
    end
    for (int i = 0; i < 2000; i++) begin
      a2 = 12'($urandom);
      b2 = 9'($urandom);
      #1;
      checks++;
      if (21'(s2 + c2) != 21'(int'(a2) * int'(b2))) begin
        failures++;
        $display("FAIL 12x9 a=%0d b=%0d", a2, b2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
