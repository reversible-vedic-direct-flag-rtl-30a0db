// tb_rev_fas: exhaustive test of the full adder/subtractor cell.
// Self-checking: every result is compared with a reference computed with
// plain SystemVerilog operators; prints TB_RESULT and finishes.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_fas;
  int checks = 0;
  int failures = 0;
  logic a, b, cin, c, sd, cd;
  rev_fas dut (.a, .b, .cin, .c, .sd, .cd);

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
      int s;
      {c, a, b, cin} = 4'(i);
      #1;
      s = c ? (int'(a) - int'(b) - int'(cin)) : (int'(a) + int'(b) + int'(cin));
      check(sd == s[0], $sformatf("sd %0d", i));
      check(cd == (c ? (s < 0) : (s > 1)), $sformatf("cd %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
