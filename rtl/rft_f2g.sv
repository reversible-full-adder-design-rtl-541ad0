// rft_f2g: Feynman double gate (F2G), a 3x3 reversible, parity-preserving gate.
//
//   P = A,  Q = A ^ B,  R = A ^ C
//
// With B = C = 0 it copies A onto two further lines, which is how reversible
// circuits fan a signal out. Purely combinational; the equations are the
// standard F2G mapping. Quantum cost 2 (rft_pkg::QC_F2G).
module rft_f2g (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = a ^ c;
  end
endmodule
