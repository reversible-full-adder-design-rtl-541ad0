// rft_fredkin: Fredkin gate (FRG), a 3x3 reversible, parity-preserving
// controlled swap.
//
//   P = A
//   Q = ~A & B | A & C
//   R =  A & B | ~A & C
//
// A = 1 swaps B and C. With B = 0 the Q output is A & C, which the carry-skip
// block uses to AND propagate signals; with B and C as data, Q is a 2:1
// multiplexer selected by A, which the block uses to skip the carry.
// Purely combinational. Quantum cost 5 (rft_pkg::QC_FRG).
module rft_fredkin (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = (~a & b) | (a & c);
    r = (a & b) | (~a & c);
  end
endmodule
