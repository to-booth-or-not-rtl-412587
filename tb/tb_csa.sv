// tb_csa: random and corner checks of the K-bit 3/2-adder.
// s + c must equal x + y + z modulo 2^K; with K = 106 the reference is
// computed in 128-bit arithmetic. Also checks that bit 0 of the carry word
// is zero (the carry word is delivered at its weight).
module tb_csa;
  localparam int unsigned K = 106;
  logic [K-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa #(.K(K)) dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  function automatic logic [K-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check();
    logic [127:0] ref_sum;
    #1;
    ref_sum = 128'(x) + 128'(y) + 128'(z);
    checks++;
    if (K'(s + c) != ref_sum[K-1:0] || c[0] != 1'b0) begin
      failures++;
      $display("FAIL x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '1; y = '1; z = '1; check();
    x = '0; y = '0; z = '0; check();
    x = '1; y = '0; z = 1; check();
    for (int i = 0; i < 2000; i++) begin
      x = rnd(); y = rnd(); z = rnd();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
