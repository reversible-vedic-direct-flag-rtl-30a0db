// tb_rev_comparator: exhaustive test of the 8-bit comparator plus a 3-bit instance.
// Self-checking: every result is compared with a reference computed with
// plain SystemVerilog operators; prints TB_RESULT and finishes.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_comparator;
  int checks = 0;
  int failures = 0;
  logic [7:0] a, b;
  logic gt, lt, eq;
  logic [2:0] a3, b3;
  logic gt3, lt3, eq3;
  rev_comparator #(.N(8)) dut (.a, .b, .gt, .lt, .eq);
  rev_comparator #(.N(3)) dut3 (.a(a3), .b(b3), .gt(gt3), .lt(lt3), .eq(eq3));

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
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      a3 = a[2:0]; b3 = b[2:0];
      #1;
      check({gt, lt, eq} == {a > b, a < b, a == b}, $sformatf("a=%0d b=%0d", a, b));
      if (a[7:3] == 0 && b[7:3] == 0)
        check({gt3, lt3, eq3} == {a3 > b3, a3 < b3, a3 == b3}, "3-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
