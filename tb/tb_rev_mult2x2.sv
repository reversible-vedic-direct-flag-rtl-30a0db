// tb_rev_mult2x2: exhaustive test of the 2x2 Vedic multiplier.
// Self-checking: every result is compared with a reference computed with
// plain SystemVerilog operators; prints TB_RESULT and finishes.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_mult2x2;
  int checks = 0;
  int failures = 0;
  logic [1:0] a, b;
  logic [3:0] m;
  rev_mult2x2 dut (.a, .b, .m);

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
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      check(m == 4'(a * b), $sformatf("%0d*%0d=%0d", a, b, m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
