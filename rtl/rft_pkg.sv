// rft_pkg: shared constants of the reversible fault-tolerant adders.
//
// Every adder in this library is a network of 3-input/3-output reversible
// gates. The gates' quantum costs are the figures usually quoted for them
// (F2G 2, NFT 5, Fredkin 5); the composite modules combine them into a
// QUANTUM_COST localparam so the cost of any configuration can be read off
// the elaborated design. The constants do not change any logic.
package rft_pkg;

  localparam int unsigned QC_F2G = 2;  // Feynman double gate
  localparam int unsigned QC_NFT = 5;  // New Fault Tolerant gate
  localparam int unsigned QC_FRG = 5;  // Fredkin gate

  // One SNFA full adder: three F2G and one NFT.
  localparam int unsigned QC_SNFA      = 3 * QC_F2G + QC_NFT;
  localparam int unsigned SNFA_GARBAGE = 3;

  // Garbage lines of an N-bit carry-skip block as built here: two per SNFA
  // (the third SNFA garbage line, a^b, is consumed as propagate), two per
  // Fredkin gate and one left by the carry-in fan-out.
  function automatic int unsigned csa_garbage(int unsigned n);
    return 2 * n + 2 * n + 1;
  endfunction

  // Quantum cost of an N-bit carry-skip block: N SNFAs, N Fredkin gates and
  // one fan-out F2G, i.e. 16N+2.
  function automatic int unsigned csa_qc(int unsigned n);
    return n * QC_SNFA + n * QC_FRG + QC_F2G;
  endfunction

endpackage
