// rev_mult2x2: 2x2 reversible Vedic multiplier (RM), m = a * b.
// Vertical and crosswise products (Urdhva Tiryak): m0 = a0b0 from a Toffoli
// gate; the cross products a1b0 and a0b1 come from two Peres gates and a third
// Peres gate adds them (Q = m1, R = carry); a fourth Peres gate forms a1b1 and
// a fifth adds the carry (Q = m2, R = m3). The reference lists one Toffoli,
// four Peres and one Feynman gate without their wiring; this wiring is an own
// choice. Combinational.
module rev_mult2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] m
);
  logic pp10, pp01, pp11, c1;
  rev_tg u_tg  (.a(a[0]), .b(b[0]), .c(1'b0), .p(), .q(), .r(m[0]));
  rev_pg u_pg0 (.a(a[1]), .b(b[0]), .c(1'b0), .p(), .q(), .r(pp10));
  rev_pg u_pg1 (.a(a[0]), .b(b[1]), .c(1'b0), .p(), .q(), .r(pp01));
  rev_pg u_pg2 (.a(pp10), .b(pp01), .c(1'b0), .p(), .q(m[1]), .r(c1));
  rev_pg u_pg3 (.a(a[1]), .b(b[1]), .c(1'b0), .p(), .q(), .r(pp11));
  rev_pg u_pg4 (.a(c1),   .b(pp11), .c(1'b0), .p(), .q(m[2]), .r(m[3]));
endmodule
