// tb_csa_array: the linear 3/2-adder array must reduce K random W-bit rows
// to a pair whose sum is the sum of the rows modulo 2^W. Run at K = 53,
// W = 106 (the default) and at the smallest legal size K = 3.
module tb_csa_array;
  localparam int unsigned W = 106;
  localparam int unsigned KA = 53, KB = 3;
  logic [W-1:0] ppa [KA], ppb [KB];
  logic [W-1:0] sa, ca, sb, cb;
  int checks = 0, failures = 0;

  csa_array #(.K(KA), .W(W)) dut_a (.pp(ppa), .sum(sa), .carry(ca));
  csa_array #(.K(KB), .W(W)) dut_b (.pp(ppb), .sum(sb), .carry(cb));

  function automatic logic [W-1:0] rnd();
    return W'({$urandom, $urandom, $urandom, $urandom});
  endfunction

  task automatic check();
    logic [W-1:0] ra, rb;
    #1;
    ra = '0;
    rb = '0;
    foreach (ppa[i]) ra += ppa[i];
    foreach (ppb[i]) rb += ppb[i];
    checks += 2;
    if (W'(sa + ca) != ra) begin failures++; $display("FAIL K=%0d", KA); end
    if (W'(sb + cb) != rb) begin failures++; $display("FAIL K=%0d", KB); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ppa[i]) ppa[i] = '1;
    foreach (ppb[i]) ppb[i] = '1;
    check();
    for (int t = 0; t < 500; t++) begin
      foreach (ppa[i]) ppa[i] = rnd();
      foreach (ppb[i]) ppb[i] = rnd();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
