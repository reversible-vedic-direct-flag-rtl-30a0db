// rev_fg: Feynman (CNOT) gate, P = A, Q = A xor B. Quantum cost 1.
// Purely combinational; every output is a fixed function of the inputs, and
// as a reversible gate the input-to-output map is a bijection. The equations
// are the standard ones for this gate; they are not taken from the divider
// design itself, which only names the gate.
module rev_fg (
  input  logic a, b,
  output logic p, q
);
  assign p = a;
  assign q = a ^ b;
endmodule
