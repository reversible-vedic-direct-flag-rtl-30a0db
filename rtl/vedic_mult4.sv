// vedic_mult4: 4x4 reversible Vedic multiplier, p = a * b (8-bit product).
// Urdhva Tiryak arrangement: four 2x2 multipliers form LL = aL*bL, HL = aH*bL,
// LH = aL*bH and HH = aH*bH. A first 4-bit RCA adds the two cross products, a
// second adds the upper half of LL; p[3:2] is taken from it. A Feynman gate
// merges the two carries (they are never both set) and a third RCA adds HH to
// the remaining bits to give p[7:4]. The reference names the four RM blocks
// and the RCAs; the exact adder arrangement is an own choice. Combinational.
module vedic_mult4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] ll, hl, lh, hh, s1, s2, s3;
  logic       c1, c2, cm;

  rev_mult2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .m(ll));
  rev_mult2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .m(hl));
  rev_mult2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .m(lh));
  rev_mult2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .m(hh));

  rev_rca4 u_rca1 (.a(hl), .b(lh), .s(s1), .c(c1));
  rev_rca4 u_rca2 (.a(s1), .b({2'b00, ll[3:2]}), .s(s2), .c(c2));
  rev_fg   u_fg   (.a(c1), .b(c2), .p(), .q(cm));
  rev_rca4 u_rca3 (.a(hh), .b({1'b0, cm, s2[3:2]}), .s(s3), .c());

  assign p = {s3, s2[1:0], ll[1:0]};
endmodule
