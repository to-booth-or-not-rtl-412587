// tb_booth_select: exhaustive check of the Booth selection cell over all
// legal decoder outputs (b1 and b2 never both 1). Expected bit: a_hi when
// |B| = 1, a_lo when |B| = 2, 0 otherwise, inverted when s = 1.
module tb_booth_select;
  logic a_hi, a_lo, b1, b2, s, g;
  int checks = 0, failures = 0;

  booth_select dut (.a_hi(a_hi), .a_lo(a_lo), .b1(b1), .b2(b2), .s(s), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic sel;
      {a_hi, a_lo, b1, b2, s} = 5'(v);
      if (b1 && b2) continue;
      #1;
      sel = b1 ? a_hi : (b2 ? a_lo : 1'b0);
      checks++;
      if (g != (sel ^ s)) begin
        failures++;
        $display("FAIL a_hi=%b a_lo=%b b1=%b b2=%b s=%b -> g=%b", a_hi, a_lo, b1, b2, s, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
