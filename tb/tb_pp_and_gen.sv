// tb_pp_and_gen: checks every non-Booth partial product row against
// <a> * b[j] * 2^j computed in 128-bit arithmetic, and the sum of all rows
// against <a> * <b>. N = M = 53, random and all-ones operands.
module tb_pp_and_gen;
  localparam int unsigned N = 53, M = 53, W = N + M;
  logic [N-1:0] a;
  logic [M-1:0] b;
  logic [W-1:0] pp [M];
  int checks = 0, failures = 0;

  pp_and_gen #(.N(N), .M(M)) dut (.a(a), .b(b), .pp(pp));

  task automatic check();
    logic [127:0] acc, row;
    #1;
    acc = '0;
    for (int j = 0; j < M; j++) begin
      row = b[j] ? (128'(a) << j) : 128'(0);
      checks++;
      if (pp[j] != row[W-1:0]) begin
        failures++;
        $display("FAIL row %0d a=%h b=%h", j, a, b);
      end
      acc += 128'(pp[j]);
    end
    checks++;
    if (acc[W-1:0] != W'(128'(a) * 128'(b))) begin
      failures++;
      $display("FAIL sum a=%h b=%h", a, b);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '1; check();
    for (int i = 0; i < 200; i++) begin
      a = N'({$urandom, $urandom});
      b = M'({$urandom, $urandom});
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
