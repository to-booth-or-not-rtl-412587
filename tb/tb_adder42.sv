// tb_adder42: random and corner checks of the K-bit 4/2-adder.
// s + t must equal a + b + c + d modulo 2^K (reference in 128-bit arithmetic).
module tb_adder42;
  localparam int unsigned K = 106;
  logic [K-1:0] a, b, c, d, s, t;
  int checks = 0, failures = 0;

  adder42 #(.K(K)) dut (.a(a), .b(b), .c(c), .d(d), .s(s), .t(t));

  function automatic logic [K-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check();
    logic [127:0] ref_sum;
    #1;
    ref_sum = 128'(a) + 128'(b) + 128'(c) + 128'(d);
    checks++;
    if (K'(s + t) != ref_sum[K-1:0]) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h d=%h s=%h t=%h", a, b, c, d, s, t);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '1; c = '1; d = '1; check();
    a = '0; b = '0; c = '0; d = '1; check();
    for (int i = 0; i < 2000; i++) begin
      a = rnd(); b = rnd(); c = rnd(); d = rnd();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
