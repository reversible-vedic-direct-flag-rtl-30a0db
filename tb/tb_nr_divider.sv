// tb_nr_divider: exhaustive test of the 8/4 non-restoring divider (all dividends, divisors 1..15) and a 6/3 instance.
// Self-checking: every result is compared with a reference computed with
// plain SystemVerilog operators; prints TB_RESULT and finishes.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_nr_divider;
  int checks = 0;
  int failures = 0;
  logic [7:0] dividend, quotient;
  logic [3:0] divisor, remainder;
  logic [5:0] d6, q6;
  logic [2:0] v3, r3;
  nr_divider #(.DW(8), .VW(4)) dut (.dividend, .divisor, .quotient, .remainder);
  nr_divider #(.DW(6), .VW(3)) dut6 (.dividend(d6), .divisor(v3), .quotient(q6), .remainder(r3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 1; v < 16; v++) begin
      for (int x = 0; x < 256; x++) begin
        dividend = 8'(x); divisor = 4'(v);
        d6 = 6'(x); v3 = 3'(v);
        #1;
        check(quotient == 8'(x / v) && remainder == 4'(x % v),
              $sformatf("%0d/%0d got q=%0d r=%0d", x, v, quotient, remainder));
        if (v < 8 && x < 64)
          check(q6 == 6'(x / v) && r3 == 3'(x % v), "6/3");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
