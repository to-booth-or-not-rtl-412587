// tb_booth_pp_gen: checks every Booth-2 partial product row, and the sum of
// the rows, for N = M = 53.
// Reference for row j, from the digit B_j = -2 b[2j+1] + b[2j] + b[2j-1]
// and its sign s_j = (B_j < 0), with D_j = <a> * |B_j|:
//   E_j = <a> * B_j + 3 * 2^(N+1)  (j > 0),  E_0 = <a> * B_0 + 4 * 2^(N+1)
//   row_0 = E_0 - s_0
//   row_j = (4 * (E_j - s_j) + s_(j-1)) * 4^(j-1)      (j > 0)
// all taken modulo 2^(N+M). The sum of all rows must equal <a><b> mod 2^(N+M).
module tb_booth_pp_gen;
  import mul_pkg::*;
  localparam int unsigned N = 53, M = 53, W = N + M;
  localparam int unsigned MP = booth_digits(M);
  logic [N-1:0] a;
  logic [M-1:0] b;
  logic [W-1:0] pp [MP];
  int checks = 0, failures = 0;
  int digit_seen [5];  // how often each digit value -2..2 was applied

  booth_pp_gen #(.N(N), .M(M)) dut (.a(a), .b(b), .pp(pp));

  function automatic int digit(int j);
    logic [M+2:0] be;
    be = (M+3)'({b, 1'b0});  // be[k+1] = b[k]
    return -2 * int'(be[2*j+2]) + int'(be[2*j+1]) + int'(be[2*j]);
  endfunction

  task automatic check();
    logic [255:0] acc, e, row, d, bias;
    int dg, sprev;
    #1;
    acc = '0;
    sprev = 0;
    for (int j = 0; j < MP; j++) begin
      dg = digit(j);
      digit_seen[dg + 2]++;
      d = 256'(a) * 256'(dg < 0 ? -dg : dg);
      bias = (j == 0 ? 256'd4 : 256'd3) << (N + 1);
      e = dg < 0 ? bias - d : bias + d;
      if (j == 0) row = e - 256'(dg < 0);
      else        row = ((4 * (e - 256'(dg < 0))) + 256'(sprev)) << (2 * j - 2);
      sprev = int'(dg < 0);
      checks++;
      if (pp[j] != row[W-1:0]) begin
        failures++;
        $display("FAIL row %0d digit %0d a=%h b=%h got %h exp %h", j, dg, a, b, pp[j], row[W-1:0]);
      end
      acc += 256'(pp[j]);
    end
    checks++;
    if (acc[W-1:0] != W'(256'(a) * 256'(b))) begin
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
    a = '1; b = M'(53'h0AAAAAAAAAAAAA); check();
    a = '1; b = M'(53'h1555555555555); check();
    a = '0; b = '1; check();
    for (int i = 0; i < 300; i++) begin
      a = N'({$urandom, $urandom});
      b = M'({$urandom, $urandom});
      check();
    end
    for (int v = 0; v < 5; v++) begin
      checks++;
      if (digit_seen[v] == 0) begin
        failures++;
        $display("FAIL digit %0d never applied", v - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
