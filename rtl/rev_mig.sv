// rev_mig: modified Islam gate (MIG), P = A, Q = A xor B, R = AB xor C, S = AB' xor D. Quantum cost 7.
// Purely combinational; every output is a fixed function of the inputs, and
// as a reversible gate the input-to-output map is a bijection. The equations
// are the standard ones for this gate; they are not taken from the divider
// design itself, which only names the gate.
module rev_mig (
  input  logic a, b, c, d,
  output logic p, q, r, s
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
  assign s = (a & ~b) ^ d;
endmodule
