// rev_f2g: double Feynman gate, P = A, Q = A xor B, R = A xor C. Quantum cost 2.
// Purely combinational; every output is a fixed function of the inputs, and
// as a reversible gate the input-to-output map is a bijection. The equations
// are the standard ones for this gate; they are not taken from the divider
// design itself, which only names the gate.
module rev_f2g (
  input  logic a, b, c,
  output logic p, q, r
);
  assign p = a;
  assign q = a ^ b;
  assign r = a ^ c;
endmodule
