// rev_comp_msb: comparator cell for the most significant bit.
// p = a > b, q = a < b, r = a == b. As described: a first F2G gate produces
// B' (here by a constant-1 target), a MIG gate on (a, B') gives R = a xor B'
// (equality) and P = a & B' (greater), and its last output a & b goes with b
// into a second F2G gate that gives Q = b xor (a & b) = ~a & b (less).
// Combinational.
module rev_comp_msb (
  input  logic a, b,
  output logic p, q, r
);
  logic nb, bc, ab;
  rev_f2g u_f2g0 (.a(b),  .b(1'b1), .c(1'b0), .p(bc), .q(nb), .r());
  rev_mig u_mig  (.a(a),  .b(nb), .c(1'b0), .d(1'b0), .p(), .q(r), .r(p), .s(ab));
  rev_f2g u_f2g1 (.a(bc), .b(ab), .c(1'b0), .p(), .q(q), .r());
endmodule
