// tb_booth_decoder: exhaustive check of the radix-4 Booth digit decoder.
// For each triple the digit B = -2*b_hi + b_mid + b_lo is computed as an
// integer and b1, b2, s are compared with |B| == 1, |B| == 2 and B < 0.
module tb_booth_decoder;
  logic b_hi, b_mid, b_lo, b1, b2, s;
  int checks = 0, failures = 0;

  booth_decoder dut (.b_hi(b_hi), .b_mid(b_mid), .b_lo(b_lo), .b1(b1), .b2(b2), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int digit, mag;
      {b_hi, b_mid, b_lo} = 3'(v);
      #1;
      digit = -2 * int'(b_hi) + int'(b_mid) + int'(b_lo);
      mag   = digit < 0 ? -digit : digit;
      checks++;
      if (b1 != (mag == 1) || b2 != (mag == 2) || s != (digit < 0)) begin
        failures++;
        $display("FAIL triple=%b%b%b -> b1=%b b2=%b s=%b", b_hi, b_mid, b_lo, b1, b2, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
