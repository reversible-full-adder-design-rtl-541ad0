// rft_snfa: Single NFT Full Adder, a parity-preserving (fault-tolerant)
// reversible full adder built from three F2G gates and one NFT gate.
//
// Five lines enter (a, b, cin and two constant zeros) and five leave (sum,
// cout and three garbage lines). Gate order:
//   F2G1 (a, b, 0)         -> a, a^b, a          (copies a)
//   F2G2 (a^b, 0, a)       -> a^b, a^b, b        (copies a^b, recovers b)
//   NFT  (A=a, B=cin, C=a^b)
//        P = a^cin, R = (a^b) ? cin : a = majority(a, b, cin) = cout
//   F2G3 (a^cin, NFT.Q, b) -> R = a^b^cin = sum
// Garbage: garbage[0] = a^b (the spare copy from F2G2, used as the bit's
// propagate signal by the carry-skip adder), garbage[1] = F2G3.P,
// garbage[2] = F2G3.Q.
//
// The gate list and the sum and carry equations follow the published SNFA
// (quantum cost 11, 3 garbage outputs); which gate output feeds which input is
// this design's choice where the drawing leaves it open. Combinational, no
// clock. Since every gate preserves parity, a ^ b ^ cin always equals the XOR
// of all five outputs.
module rft_snfa
  import rft_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  output logic       sum,
  output logic       cout,
  output logic [SNFA_GARBAGE-1:0] garbage
);
  localparam int unsigned QUANTUM_COST = QC_SNFA;

  logic g1_p, g1_q, g1_r;
  logic g2_p, g2_q, g2_r;
  logic n_p, n_q;

  rft_f2g u_f2g1 (.a(a),    .b(b),    .c(1'b0), .p(g1_p), .q(g1_q), .r(g1_r));
  rft_f2g u_f2g2 (.a(g1_q), .b(1'b0), .c(g1_r), .p(g2_p), .q(g2_q), .r(g2_r));
  rft_nft u_nft  (.a(g1_p), .b(cin),  .c(g2_q), .p(n_p),  .q(n_q),  .r(cout));
  rft_f2g u_f2g3 (.a(n_p),  .b(n_q),  .c(g2_r), .p(garbage[1]), .q(garbage[2]), .r(sum));

  assign garbage[0] = g2_p;
endmodule
