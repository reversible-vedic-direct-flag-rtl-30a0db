// rev_has: reversible half adder/subtractor (RHA/S), the LSB cell of the
// N-bit adder/subtractor.
// c = 0: sd = a + b, cd = carry (a & b).  c = 1: sd = a - b, cd = borrow (~a & b).
// A Feynman gate forms x = a ^ c, a Peres gate on (b, x, 0) gives b ^ x and the
// carry/borrow b & x, and a second Feynman gate removes c from the sum again.
// The cell's name and role come from the adder/subtractor description; this
// gate arrangement is an own choice. Combinational.
module rev_has (
  input  logic a, b, c,
  output logic sd, cd
);
  logic x, y;
  rev_fg u_fg0 (.a(c), .b(a),    .p(),  .q(x));
  rev_pg u_pg  (.a(b), .b(x), .c(1'b0), .p(), .q(y), .r(cd));
  rev_fg u_fg1 (.a(c), .b(y),    .p(),  .q(sd));
endmodule
