// tb_rdfvdm: self-checking test of the Direct Flag Vedic divider.
// The 2-digit instance (default size) is run on every dividend 0..99 and
// every divisor 0..99; a 4-digit instance runs the worked example 1732 / 23
// (quotient 075, remainder 7) and random 4-digit dividends. Quotient and
// remainder are compared with integer division; the number of clock cycles is
// compared with a step-by-step model of the trial digits (one DIV cycle plus
// one cycle per trial, per quotient digit, plus one). It also counts how
// often a correction, a limited trial digit, a single-digit divisor and a
// zero divisor occur, and fails if one never does.
module tb_rdfvdm;
  import rdfvdm_pkg::*;
  int checks = 0;
  int failures = 0;
  int n_corr = 0, n_cap = 0, n_single = 0, n_err = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            start2 = 1'b0, busy2, done2, err2;
  digit_t [1:0]    dvd2, quo2;
  digit_t          nd2, fl2;
  logic [7:0]      rem2;
  rdfvdm #(.NDIG(2)) dut2 (.clk, .rst_n, .start(start2), .dvd(dvd2), .nd(nd2), .fl(fl2),
                           .busy(busy2), .done(done2), .err(err2), .quo(quo2), .rem(rem2));

  logic            start4 = 1'b0, busy4, done4, err4;
  digit_t [3:0]    dvd4, quo4;
  digit_t          nd4, fl4;
  logic [7:0]      rem4;
  rdfvdm #(.NDIG(4)) dut4 (.clk, .rst_n, .start(start4), .dvd(dvd4), .nd(nd4), .fl(fl4),
                           .busy(busy4), .done(done4), .err(err4), .quo(quo4), .rem(rem4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int digit_of(int x, int k);
    for (int i = 0; i < k; i++) x = x / 10;
    return x % 10;
  endfunction

  // cycles expected from the DMCS schedule; also counts the mechanisms
  function automatic int model_cycles(int x, int ndig, int nd, int fl);
    int single, ndv, flv, w, q, r, nxt, tries, cyc;
    if (nd == 0 && fl == 0) begin
      n_err++;
      return 1;
    end
    single = (nd == 0);
    if (single) n_single++;
    ndv = single ? fl : nd;
    flv = single ? 0 : fl;
    w   = digit_of(x, ndig - 1);
    cyc = 1;
    for (int j = single ? ndig - 1 : ndig - 2; j >= 0; j--) begin
      nxt = single ? ((j > 0) ? digit_of(x, j - 1) : 0) : digit_of(x, j);
      q = w / ndv;
      if (q > 9) begin q = 9; n_cap++; end
      r = w - q * ndv;
      tries = 1;
      while (10 * r + nxt < q * flv) begin
        q--; r += ndv; tries++; n_corr++;
      end
      w = 10 * r + nxt - q * flv;
      cyc += 1 + tries;
    end
    return cyc;
  endfunction

  task automatic run2(input int x, input int v);
    int cyc, exp_cyc, qv;
    @(negedge clk);
    dvd2 = {4'(digit_of(x, 1)), 4'(digit_of(x, 0))};
    nd2 = 4'(v / 10); fl2 = 4'(v % 10);
    start2 = 1'b1;
    @(negedge clk);
    start2 = 1'b0;
    cyc = 1;
    while (!done2) begin @(negedge clk); cyc++; end
    exp_cyc = model_cycles(x, 2, v / 10, v % 10);
    check(cyc == exp_cyc, $sformatf("cycles %0d/%0d: %0d expected %0d", x, v, cyc, exp_cyc));
    if (v == 0) begin
      check(err2, $sformatf("err %0d/0", x));
    end else begin
      qv = 10 * int'(quo2[1]) + int'(quo2[0]);
      check(!err2 && qv == x / v && int'(rem2) == x % v,
            $sformatf("%0d/%0d got q=%0d r=%0d", x, v, qv, rem2));
      check(quo2[0] <= 9 && quo2[1] <= 9, "BCD quotient");
    end
  endtask

  task automatic run4(input int x, input int v);
    int cyc, exp_cyc, qv;
    @(negedge clk);
    for (int k = 0; k < 4; k++) dvd4[k] = 4'(digit_of(x, k));
    nd4 = 4'(v / 10); fl4 = 4'(v % 10);
    start4 = 1'b1;
    @(negedge clk);
    start4 = 1'b0;
    cyc = 1;
    while (!done4) begin @(negedge clk); cyc++; end
    exp_cyc = model_cycles(x, 4, v / 10, v % 10);
    check(cyc == exp_cyc, $sformatf("cycles %0d/%0d: %0d expected %0d", x, v, cyc, exp_cyc));
    qv = 0;
    for (int k = 3; k >= 0; k--) qv = qv * 10 + int'(quo4[k]);
    check(!err4 && qv == x / v && int'(rem4) == x % v,
          $sformatf("%0d/%0d got q=%0d r=%0d", x, v, qv, rem4));
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dvd2 = '0; nd2 = '0; fl2 = '0; dvd4 = '0; nd4 = '0; fl4 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 2-digit example: 42 / 12 = 3 remainder 6
    run2(42, 12);
    check(quo2 == {4'd0, 4'd3} && rem2 == 8'd6, "42/12 example");
    // 4-digit worked example: 1732 / 23 = 075 remainder 7
    run4(1732, 23);
    check(quo4 == {4'd0, 4'd0, 4'd7, 4'd5} && rem4 == 8'd7, "1732/23 example");

    for (int x = 0; x < 100; x++)
      for (int v = 0; v < 100; v++)
        run2(x, v);
    for (int i = 0; i < 3000; i++)
      run4(int'($urandom_range(9999, 0)), int'($urandom_range(99, 1)));

    $display("corrections=%0d limited=%0d single_digit=%0d zero_divisor=%0d",
             n_corr, n_cap, n_single, n_err);
    check(n_corr > 0, "no correction seen");
    check(n_cap > 0, "no limited trial digit seen");
    check(n_single > 0, "no single-digit divisor seen");
    check(n_err > 0, "no zero divisor seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
