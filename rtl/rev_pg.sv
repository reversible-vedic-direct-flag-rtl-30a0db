// rev_pg: Peres gate, P = A, Q = A xor B, R = AB xor C. Quantum cost 4.
// Purely combinational; every output is a fixed function of the inputs, and
// as a reversible gate the input-to-output map is a bijection. The equations
// are the standard ones for this gate; they are not taken from the divider
// design itself, which only names the gate.
module rev_pg (
  input  logic a, b, c,
  output logic p, q, r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
