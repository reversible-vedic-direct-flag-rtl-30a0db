// tb_rev_nft_block: exhaustive test of the NFT block (bitwise a<b, a>b).
// Self-checking: every result is compared with a reference computed with
// plain SystemVerilog operators; prints TB_RESULT and finishes.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_nft_block;
  int checks = 0;
  int failures = 0;
  logic a, b, lt, gt;
  rev_nft_block dut (.a, .b, .lt, .gt);

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
      check(lt == (a < b), "lt");
      check(gt == (a > b), "gt");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
