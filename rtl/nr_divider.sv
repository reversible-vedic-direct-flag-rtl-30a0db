// nr_divider: reversible non-restoring array divider (default 8-bit dividend,
// 4-bit divisor, VW+1 = 5-bit adder/subtractors).
// quotient = dividend / divisor, remainder = dividend % divisor (unsigned).
// Partial remainder A starts at zero. At each of the DW stages A and the next
// dividend bit are shifted left; if A was negative (MSB 1) the divisor is
// added, otherwise subtracted, and the new quotient bit is the inverse of the
// new sign. A final stage adds the divisor back when A ends negative. This is
// the algorithm of the reference; unrolling it into a combinational array of
// DW+1 adder/subtractors instead of a counted loop is an own choice, as is
// the behaviour for divisor 0 (quotient all ones, remainder garbage).
module nr_divider #(
  parameter int unsigned DW = 8,
  parameter int unsigned VW = 4
) (
  input  logic [DW-1:0] dividend,
  input  logic [VW-1:0] divisor,
  output logic [DW-1:0] quotient,
  output logic [VW-1:0] remainder
);
  localparam int unsigned AW = VW + 1;
  logic [AW-1:0] acc [DW+1];  // acc[0] = 0, acc[j] after stage j
  logic [AW-1:0] m;
  logic [AW-1:0] fix, fin;

  assign m      = {1'b0, divisor};
  assign acc[0] = '0;

  for (genvar j = 0; j < DW; j++) begin : g_stage
    // stage j brings in dividend bit DW-1-j
    logic [AW-1:0] sh;
    assign sh = {acc[j][AW-2:0], dividend[DW-1-j]};
    rev_addsub #(.N(AW)) u_as (.a(sh), .b(m), .c(~acc[j][AW-1]), .sd(acc[j+1]), .cd());
    assign quotient[DW-1-j] = ~acc[j+1][AW-1];
  end

  // restoring step: add the divisor when the final remainder is negative
  assign fix = m & {AW{acc[DW][AW-1]}};
  rev_addsub #(.N(AW)) u_fix (.a(acc[DW]), .b(fix), .c(1'b0), .sd(fin), .cd());
  assign remainder = fin[VW-1:0];
endmodule
