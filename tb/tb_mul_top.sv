// tb_mul_top: end-to-end test of the four multipliers at the default size
// (N = M = 53, no parameter overrides).
// Every operand pair is applied to all four designs at once; each carry-save
// result (sum + carry mod 2^106) must equal the testbench's own 128-bit
// product. The testbench also decodes b into radix-4 digits itself and
// counts how often each Booth mechanism was exercised: digits -2, -1, 0,
// +1, +2, the triple 111 (zero digit with b[2j+1] set), and a negative digit
// whose +1 is carried into the next row. A mechanism never exercised counts
// as a failure.
module tb_mul_top;
  import mul_pkg::*;
  localparam int unsigned N = 53, M = 53, W = N + M;
  localparam int unsigned MP = booth_digits(M);

  logic [N-1:0] a;
  logic [M-1:0] b;
  logic [W-1:0] arr_s, arr_c, barr_s, barr_c, tree_s, tree_c, btree_s, btree_c;
  int checks = 0, failures = 0;
  int n_digit [5];
  int n_zero111 = 0, n_sign_carry = 0;

  mul_top dut (
    .a(a), .b(b),
    .arr_sum(arr_s),     .arr_carry(arr_c),
    .barr_sum(barr_s),   .barr_carry(barr_c),
    .tree_sum(tree_s),   .tree_carry(tree_c),
    .btree_sum(btree_s), .btree_carry(btree_c)
  );

  task automatic count_digits();
    logic [M+2:0] be;
    be = (M+3)'({b, 1'b0});
    for (int j = 0; j < MP; j++) begin
      int dg;
      dg = -2 * int'(be[2*j+2]) + int'(be[2*j+1]) + int'(be[2*j]);
      n_digit[dg + 2]++;
      if (be[2*j+2] && be[2*j+1] && be[2*j]) n_zero111++;
      if (dg < 0 && j + 1 < MP) n_sign_carry++;
    end
  endtask

  task automatic check();
    logic [W-1:0] p;
    #1;
    p = W'(128'(a) * 128'(b));
    count_digits();
    checks += 4;
    if (W'(arr_s + arr_c) != p)     begin failures++; $display("FAIL array       a=%h b=%h", a, b); end
    if (W'(barr_s + barr_c) != p)   begin failures++; $display("FAIL booth array a=%h b=%h", a, b); end
    if (W'(tree_s + tree_c) != p)   begin failures++; $display("FAIL tree        a=%h b=%h", a, b); end
    if (W'(btree_s + btree_c) != p) begin failures++; $display("FAIL booth tree  a=%h b=%h", a, b); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '1; check();
    a = '0; b = '0; check();
    a = '1; b = 53'h0AAAAAAAAAAAAA; check();
    a = 53'h1555555555555; b = 53'h1555555555555; check();
    a = 53'h1000000000000; b = 53'h1000000000000; check();
    for (int i = 0; i < 3000; i++) begin
      a = N'({$urandom, $urandom});
      b = M'({$urandom, $urandom});
      check();
    end
    for (int v = 0; v < 5; v++) begin
      $display("booth digit %2d applied %0d times", v - 2, n_digit[v]);
      checks++;
      if (n_digit[v] == 0) failures++;
    end
    $display("zero digit from triple 111: %0d, negative-digit +1 carried to next row: %0d",
             n_zero111, n_sign_carry);
    checks += 2;
    if (n_zero111 == 0) failures++;
    if (n_sign_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
