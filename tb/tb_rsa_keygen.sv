// tb_rsa_keygen: end-to-end test of the RSA key generator at its only size.
// First the example p = 5, q = 7, e = 23: n = 35, phi = 24, e valid, d = 23.
// Then every digit pair p, q in 2..9 with every e in 0..99. n and phi are
// compared with p*q and (p-1)*(q-1), e_valid with a range and gcd check, and
// d with a brute-force search for e*d mod phi = 1, then (e*d) mod phi is
// checked directly. The test counts valid keys, exponents rejected by range
// and by gcd, and, inside the divider, corrections of a trial digit and
// single-digit divisors; each must occur. (A trial digit above 9 cannot arise
// with the 2-digit dividends used here; tb_rdfvdm covers it with 4 digits.)
module tb_rsa_keygen;
  import rdfvdm_pkg::*;
  int checks = 0;
  int failures = 0;
  int n_valid = 0, n_range = 0, n_gcd = 0;
  int n_corr = 0, n_single = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start = 1'b0, busy, done, e_valid;
  digit_t       p, q;
  digit_t [1:0] e, n, phi, d;
  rsa_keygen dut (.clk, .rst_n, .start, .p, .q, .e, .busy, .done, .n, .phi, .e_valid, .d);

  // mechanisms inside the Vedic divider of the GCD unit (state 2 is the check state)
  always @(posedge clk) begin
    if (dut.u_gcd.u_div.state == 2'd2 && !dut.u_gcd.u_div.ge) n_corr++;
    if (dut.u_gcd.u_div.start && dut.u_gcd.u_div.nd == 4'd0) n_single++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int ref_gcd(int x, int y);
    int t;
    while (y != 0) begin t = x % y; x = y; y = t; end
    return x;
  endfunction

  task automatic run(input int pv, input int qv, input int ev);
    int nv, phv, dv, exp_n, exp_phi, exp_d;
    bit exp_valid, in_range;
    @(negedge clk);
    p = 4'(pv); q = 4'(qv);
    e = {4'(ev / 10), 4'(ev % 10)};
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    exp_n = pv * qv;
    exp_phi = (pv - 1) * (qv - 1);
    in_range = (ev > 1) && (ev < exp_phi);
    exp_valid = in_range && ref_gcd(exp_phi, ev) == 1;
    exp_d = 0;
    if (exp_valid)
      for (int k = 1; k < exp_phi; k++)
        if ((ev * k) % exp_phi == 1) begin exp_d = k; break; end
    if (exp_valid) n_valid++;
    else if (!in_range) n_range++;
    else n_gcd++;
    nv  = 10 * int'(n[1]) + int'(n[0]);
    phv = 10 * int'(phi[1]) + int'(phi[0]);
    dv  = 10 * int'(d[1]) + int'(d[0]);
    check(nv == exp_n, $sformatf("n p=%0d q=%0d got %0d", pv, qv, nv));
    check(phv == exp_phi, $sformatf("phi p=%0d q=%0d got %0d", pv, qv, phv));
    check(e_valid == exp_valid, $sformatf("e_valid p=%0d q=%0d e=%0d", pv, qv, ev));
    check(dv == exp_d, $sformatf("d p=%0d q=%0d e=%0d got %0d expected %0d", pv, qv, ev, dv, exp_d));
    if (exp_valid) check((ev * dv) % exp_phi == 1, "e*d mod phi = 1");
  endtask

  initial begin : watchdog
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p = '0; q = '0; e = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    run(5, 7, 23);
    check(n == {4'd3, 4'd5} && e_valid && d == {4'd2, 4'd3}, "example p=5 q=7 e=23");

    for (int pv = 2; pv < 10; pv++)
      for (int qv = 2; qv < 10; qv++)
        for (int ev = 0; ev < 100; ev++)
          run(pv, qv, ev);

    $display("valid=%0d rejected_range=%0d rejected_gcd=%0d corrections=%0d single_digit=%0d",
             n_valid, n_range, n_gcd, n_corr, n_single);
    check(n_valid > 0, "no valid exponent seen");
    check(n_range > 0, "no out-of-range exponent seen");
    check(n_gcd > 0, "no exponent rejected by gcd seen");
    check(n_corr > 0, "no trial-digit correction seen");
    check(n_single > 0, "no single-digit divisor seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
