// rev_nft: NFT gate, P = A xor B, Q = B'C xor AC', R = BC xor AC'. Quantum cost 5.
// Purely combinational; every output is a fixed function of the inputs, and
// as a reversible gate the input-to-output map is a bijection. The equations
// are the standard ones for this gate; they are not taken from the divider
// design itself, which only names the gate.
module rev_nft (
  input  logic a, b, c,
  output logic p, q, r
);
  assign p = a ^ b;
  assign q = (~b & c) ^ (a & ~c);
  assign r = (b & c) ^ (a & ~c);
endmodule
