// rev_nft_block: bitwise compare of a and b, lt = a < b, gt = a > b.
// One NFT gate and one F2G gate with two constant-0 inputs, as described for
// the comparator. NFT(0, a, b) gives P = a, Q = ~a & b (lt) and R = a & b;
// F2G(a & b, a, 0) then gives a ^ (a & b) = a & ~b (gt). The exact input
// assignment is an own choice. Combinational.
module rev_nft_block (
  input  logic a, b,
  output logic lt, gt
);
  logic pa, ab;
  rev_nft u_nft (.a(1'b0), .b(a), .c(b), .p(pa), .q(lt), .r(ab));
  rev_f2g u_f2g (.a(ab), .b(pa), .c(1'b0), .p(), .q(gt), .r());
endmodule
