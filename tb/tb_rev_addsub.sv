// tb_rev_addsub: exhaustive test of the 8-bit adder/subtractor (all a, b, both modes) and a 5-bit instance.
// Self-checking: every result is compared with a reference computed with
// plain SystemVerilog operators; prints TB_RESULT and finishes.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_addsub;
  int checks = 0;
  int failures = 0;
  logic [7:0] a, b, sd;
  logic c, cd;
  logic [4:0] a5, b5, sd5;
  logic cd5;
  rev_addsub #(.N(8)) dut (.a, .b, .c, .sd, .cd);
  rev_addsub #(.N(5)) dut5 (.a(a5), .b(b5), .c, .sd(sd5), .cd(cd5));

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
    for (int i = 0; i < 131072; i++) begin
      logic [8:0] ref9;
      {c, a, b} = 17'(i);
      a5 = a[4:0]; b5 = b[4:0];
      #1;
      ref9 = c ? ({1'b0, a} - {1'b0, b}) : ({1'b0, a} + {1'b0, b});
      check(sd == ref9[7:0], $sformatf("sd a=%0d b=%0d c=%0d got %0d", a, b, c, sd));
      check(cd == (c ? (a < b) : ref9[8]), $sformatf("cd a=%0d b=%0d c=%0d", a, b, c));
      if (i % 7 == 0) begin
        logic [5:0] r6;
        r6 = c ? ({1'b0, a5} - {1'b0, b5}) : ({1'b0, a5} + {1'b0, b5});
        check({cd5, sd5} == (c ? {a5 < b5, r6[4:0]} : r6), "5-bit");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
