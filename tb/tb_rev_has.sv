// tb_rev_has: exhaustive test of the half adder/subtractor cell, add and subtract.
// Self-checking: every result is compared with a reference computed with
// plain SystemVerilog operators; prints TB_RESULT and finishes.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_has;
  int checks = 0;
  int failures = 0;
  logic a, b, c, sd, cd;
  rev_has dut (.a, .b, .c, .sd, .cd);

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
    for (int i = 0; i < 8; i++) begin
      {c, a, b} = 3'(i);
      #1;
      check(sd == (a ^ b), $sformatf("sd a=%0d b=%0d c=%0d", a, b, c));
      check(cd == (c ? (!a && b) : (a && b)), $sformatf("cd a=%0d b=%0d c=%0d", a, b, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
