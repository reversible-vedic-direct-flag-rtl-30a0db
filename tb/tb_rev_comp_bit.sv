// tb_rev_comp_bit: exhaustive test of the one-bit comparator cell for every one-hot incoming result.
// Self-checking: every result is compared with a reference computed with
// plain SystemVerilog operators; prints TB_RESULT and finishes.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_comp_bit;
  int checks = 0;
  int failures = 0;
  logic a, b, p_in, q_in, r_in, p, q, r;
  rev_comp_bit dut (.a, .b, .p_in, .q_in, .r_in, .p, .q, .r);

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
    for (int h = 0; h < 3; h++) begin
      for (int i = 0; i < 4; i++) begin
        {a, b} = 2'(i);
        {p_in, q_in, r_in} = 3'(1 << (2 - h));
        #1;
        check(p == (p_in || (r_in && a > b)), $sformatf("p h=%0d i=%0d", h, i));
        check(q == (q_in || (r_in && a < b)), $sformatf("q h=%0d i=%0d", h, i));
        check(r == (r_in && a == b), $sformatf("r h=%0d i=%0d", h, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
