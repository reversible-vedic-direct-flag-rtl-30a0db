// tb_rev_comp_msb: exhaustive test of the MSB comparator cell.
// Self-checking: every result is compared with a reference computed with
// plain SystemVerilog operators; prints TB_RESULT and finishes.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_comp_msb;
  int checks = 0;
  int failures = 0;
  logic a, b, p, q, r;
  rev_comp_msb dut (.a, .b, .p, .q, .r);

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
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      check(p == (a > b), "p");
      check(q == (a < b), "q");
      check(r == (a == b), "r");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
