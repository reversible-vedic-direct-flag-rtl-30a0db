// rev_comp_bit: one-bit comparator cell R_Comp of the cascaded comparator.
// Inputs p_in/q_in/r_in are a>b / a<b / a==b of the more significant bits
// (one-hot); outputs are the same for those bits plus this one.
// The NFT block gives this bit's lt_b and gt_b. The first MIG gate,
// MIG(r_in, gt_b, p_in, 0), gives p = p_in xor (r_in & gt_b) and on its last
// output r_in & ~gt_b; the second, MIG(that, lt_b, q_in, 0), gives
// q = q_in xor (r_in & lt_b) and r = r_in & ~gt_b & ~lt_b. The reference
// structure forms a==b with a further TVG gate whose equations are not given;
// here it is read directly off the second MIG gate. Combinational.
module rev_comp_bit (
  input  logic a, b,
  input  logic p_in, q_in, r_in,
  output logic p, q, r
);
  logic lt_b, gt_b, e1;
  rev_nft_block u_nfb (.a(a), .b(b), .lt(lt_b), .gt(gt_b));
  rev_mig u_mig0 (.a(r_in), .b(gt_b), .c(p_in), .d(1'b0), .p(), .q(), .r(p), .s(e1));
  rev_mig u_mig1 (.a(e1),   .b(lt_b), .c(q_in), .d(1'b0), .p(), .q(), .r(q), .s(r));
endmodule
