// rev_addsub: N-bit reversible adder/subtractor (default 8 bits).
// c = 0: {cd, sd} = a + b.  c = 1: sd = (a - b) mod 2^N and cd = 1 when a < b
// (borrow out). One half adder/subtractor cell (rev_has) sits at bit 0 and N-1
// full adder/subtractor cells (rev_fas) ripple the carry or borrow upward, as
// in the reference structure. Using a borrow chain for subtraction (instead of
// a +1 carry-in) is what lets the LSB be a half cell; that is an own choice.
// Combinational, ripple delay of N cells.
module rev_addsub #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         c,
  output logic [N-1:0] sd,
  output logic         cd
);
  logic [N:0] k;  // k[i] is the carry/borrow into bit i
  assign k[0] = 1'b0;

  rev_has u_has (.a(a[0]), .b(b[0]), .c(c), .sd(sd[0]), .cd(k[1]));

  for (genvar i = 1; i < N; i++) begin : g_fas
    rev_fas u_fas (.a(a[i]), .b(b[i]), .cin(k[i]), .c(c), .sd(sd[i]), .cd(k[i+1]));
  end

  assign cd = k[N];
endmodule
