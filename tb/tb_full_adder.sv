// tb_full_adder: exhaustive check of the one-bit full adder.
// All eight input combinations are applied; x + y + z is compared with
// 2*c + s computed by integer addition in the testbench.
module tb_full_adder;
  logic x, y, z, s, c;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      checks++;
      if ({c, s} != 2'(int'(x) + int'(y) + int'(z))) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b -> c=%b s=%b", x, y, z, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
