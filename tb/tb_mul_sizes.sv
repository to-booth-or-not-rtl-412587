// tb_mul_sizes: the four multiplier designs over the range of operand sizes
// they were compared at, 8 <= n = m <= 64: n = 8, 13, 15, 16, 17, 24
// (single precision) and 64, plus 53 (double precision) in tb_mul_top.
// For every size, all four carry-save results must equal the product
// computed by the testbench in 128-bit arithmetic.
module tb_mul_sizes;
  localparam int unsigned NS = 7;
  localparam int unsigned SZ [NS] = '{8, 13, 15, 16, 17, 24, 64};
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NS; g++) begin : g_n
    localparam int unsigned N = SZ[g], W = 2 * N;
    logic [N-1:0] a, b;
    logic [W-1:0] s [4];
    logic [W-1:0] c [4];

    mul_top #(.N(N), .M(N)) dut (
      .a(a), .b(b),
      .arr_sum(s[0]),   .arr_carry(c[0]),
      .barr_sum(s[1]),  .barr_carry(c[1]),
      .tree_sum(s[2]),  .tree_carry(c[2]),
      .btree_sum(s[3]), .btree_carry(c[3])
    );

    task automatic run(int mode);
      logic [W-1:0] p;
      case (mode)
        0:       begin a = '1; b = '1; end
        1:       begin a = '1; b = '0; end
        default: begin a = N'({$urandom, $urandom}); b = N'({$urandom, $urandom}); end
      endcase
      #1;
      p = W'(128'(a) * 128'(b));
      for (int d = 0; d < 4; d++) begin
        checks++;
        if (W'(s[d] + c[d]) != p) begin
          failures++;
          $display("FAIL n=%0d design %0d a=%h b=%h", N, d, a, b);
        end
      end
    endtask
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      g_n[0].run(t); g_n[1].run(t); g_n[2].run(t); g_n[3].run(t);
      g_n[4].run(t); g_n[5].run(t); g_n[6].run(t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
