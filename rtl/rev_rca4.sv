// rev_rca4: 4-bit reversible ripple-carry adder, {c, s} = a + b.
// A Peres gate is the half adder of bit 0 (Q = sum, R = carry) and three HNG
// gates with D = 0 are the full adders of bits 1 to 3 (R = sum, S = carry),
// as in the reference structure. Combinational.
module rev_rca4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] s,
  output logic       c
);
  logic [4:1] k;
  rev_pg u_pg (.a(a[0]), .b(b[0]), .c(1'b0), .p(), .q(s[0]), .r(k[1]));
  for (genvar i = 1; i < 4; i++) begin : g_hng
    rev_hng u_hng (.a(a[i]), .b(b[i]), .c(k[i]), .d(1'b0), .p(), .q(), .r(s[i]), .s(k[i+1]));
  end
  assign c = k[4];
endmodule
