// rft_nft: New Fault Tolerant gate (NFT), a 3x3 reversible, parity-preserving gate.
//
//   P = A ^ B
//   Q = A & ~C  ^  ~B & C
//   R = A & ~C  ^   B & C
//
// R is a multiplexer: C selects B (C = 1) or A (C = 0). Q is the same
// multiplexer with the B leg inverted. Because A ^ B ^ C equals P ^ Q ^ R for
// every input, a single flipped line shows up as a parity mismatch.
// Purely combinational. Quantum cost 5 (rft_pkg::QC_NFT).
module rft_nft (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a ^ b;
    q = (a & ~c) ^ (~b & c);
    r = (a & ~c) ^ (b & c);
  end
endmodule
