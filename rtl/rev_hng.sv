// rev_hng: HNG gate, P = A, Q = B, R = A xor B xor C, S = (A xor B)C xor AB xor D. With D = 0, R is a full-adder sum and S its carry. Quantum cost 6.
// Purely combinational; every output is a fixed function of the inputs, and
// as a reversible gate the input-to-output map is a bijection. The equations
// are the standard ones for this gate; they are not taken from the divider
// design itself, which only names the gate.
module rev_hng (
  input  logic a, b, c, d,
  output logic p, q, r, s
);
  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
