// tb_gcd: self-checking test of the GCD unit on every pair of 2-digit
// decimal numbers (0..99 x 0..99), including the example gcd(24, 12) = 12.
// The result is compared with Euclid's algorithm written with the % operator.
// It counts pairs whose Euclid chain needs a single-digit divisor and pairs
// needing three or more division steps, and fails if either never occurs.
module tb_gcd;
  import rdfvdm_pkg::*;
  int checks = 0;
  int failures = 0;
  int n_single = 0, n_long = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start = 1'b0, busy, done;
  digit_t [1:0] a, b, g;
  gcd dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .g);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int ref_gcd(int x, int y);
    int t, steps = 0;
    bit single = 0;
    while (y != 0) begin
      if (y < 10) single = 1;
      t = x % y; x = y; y = t; steps++;
    end
    if (single) n_single++;
    if (steps >= 3) n_long++;
    return x;
  endfunction

  task automatic run(input int x, input int y);
    int gv, rv;
    @(negedge clk);
    a = {4'(x / 10), 4'(x % 10)};
    b = {4'(y / 10), 4'(y % 10)};
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    gv = 10 * int'(g[1]) + int'(g[0]);
    rv = ref_gcd(x, y);
    check(gv == rv && g[0] <= 9, $sformatf("gcd(%0d,%0d) got %0d expected %0d", x, y, gv, rv));
  endtask

  initial begin : watchdog
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(24, 12);
    check(g == {4'd1, 4'd2}, "gcd(24,12) = 12 example");
    for (int x = 0; x < 100; x++)
      for (int y = 0; y < 100; y++)
        run(x, y);
    $display("single_digit_divisor=%0d long_chains=%0d", n_single, n_long);
    check(n_single > 0, "no single-digit divisor seen");
    check(n_long > 0, "no long Euclid chain seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
