// rev_comparator: N-bit reversible magnitude comparator (default 8 bits).
// gt = a > b (P), lt = a < b (Q), eq = a == b (R), unsigned. The MSB comparator
// cell handles bit N-1 and N-1 one-bit cells (rev_comp_bit) then refine the
// result bit by bit down to bit 0, as in the reference structure. Exactly one
// output is high. Combinational, delay of N cells.
module rev_comparator #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         gt, lt, eq
);
  logic [N-1:0] p, q, r;  // result for bits N-1 down to i

  rev_comp_msb u_msb (.a(a[N-1]), .b(b[N-1]), .p(p[N-1]), .q(q[N-1]), .r(r[N-1]));

  for (genvar i = N - 2; i >= 0; i--) begin : g_bit
    rev_comp_bit u_bit (.a(a[i]), .b(b[i]), .p_in(p[i+1]), .q_in(q[i+1]), .r_in(r[i+1]),
                        .p(p[i]), .q(q[i]), .r(r[i]));
  end

  assign gt = p[0];
  assign lt = q[0];
  assign eq = r[0];
endmodule
