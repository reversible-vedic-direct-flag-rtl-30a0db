// rev_fas: reversible full adder/subtractor (RFA/S), the upper cells of the
// N-bit adder/subtractor.
// c = 0: sd = a ^ b ^ cin, cd = carry maj(a, b, cin).
// c = 1: sd = a ^ b ^ cin, cd = borrow maj(~a, b, cin).
// A Feynman gate forms x = a ^ c; an HNG gate on (x, b, cin, 0) yields the
// majority, i.e. carry or borrow, and x ^ b ^ cin; a second Feynman gate
// removes c from that sum. Gate arrangement is an own choice. Combinational.
module rev_fas (
  input  logic a, b, cin, c,
  output logic sd, cd
);
  logic x, y;
  rev_fg  u_fg0 (.a(c), .b(a), .p(), .q(x));
  rev_hng u_hng (.a(x), .b(b), .c(cin), .d(1'b0), .p(), .q(), .r(y), .s(cd));
  rev_fg  u_fg1 (.a(c), .b(y), .p(), .q(sd));
endmodule
