// rft_csa_block: N-bit reversible fault-tolerant carry-skip block.
//
// The sum comes from N SNFA full adders in a ripple chain. Beside it, the
// propagate signal of each bit (p_i = a_i ^ b_i, the spare line every SNFA
// already produces) is ANDed by a chain of N-1 Fredkin gates with B tied to
// 0, giving the block propagate P. A last Fredkin gate, controlled by P,
// chooses the carry out: when every bit propagates, the carry in is passed
// straight through (the skip); otherwise the ripple carry of the top SNFA is
// used. One F2G fans the carry in out to SNFA 0 and to that multiplexer.
//
// Gate count: N SNFAs (3N F2G + N NFT), N Fredkin gates, one F2G, so the
// quantum cost is 16N+2 (66 for the 4-bit block), as published. How the
// Fredkin gates are wired, and the use of the extra F2G for the carry-in
// fan-out, are this design's choices. That wiring leaves 4N+1 garbage lines,
// one more than the 4N usually quoted for this adder.
//
// Garbage layout (index from 0):
//   [2i+1:2i]          SNFA i garbage[2:1]              i = 0..N-1
//   2N + 2(i-1) + 1:0  Fredkin AND stage i: {R, P}      i = 1..N-1
//   4N-1 : 4N-2        skip multiplexer {R, P}; P is the block propagate
//   4N                 third copy of the carry in
//
// Combinational, no clock or reset. Every gate preserves parity, so the XOR
// of a, b and cin equals the XOR of sum, cout and garbage.
module rft_csa_block
  import rft_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]          a,
  input  logic [N-1:0]          b,
  input  logic                  cin,
  output logic [N-1:0]          sum,
  output logic                  cout,
  output logic [4*N:0]          garbage
);
  localparam int unsigned QUANTUM_COST = csa_qc(N);
  localparam int unsigned GARBAGE      = csa_garbage(N);

  logic [N:0]   carry;   // ripple carries; carry[0] is the fanned-out cin
  logic [N-1:0] prop;    // per-bit propagate a_i ^ b_i
  logic [N-1:0] acc;     // acc[i] = prop[0] & ... & prop[i]
  logic         cin_skip;

  // Fan the carry in out: one copy to the ripple chain, one to the skip mux.
  rft_f2g u_fanout (
    .a(cin), .b(1'b0), .c(1'b0),
    .p(carry[0]), .q(cin_skip), .r(garbage[4*N])
  );

  for (genvar i = 0; i < N; i++) begin : g_bit
    logic [2:0] fa_garbage;
    rft_snfa u_fa (
      .a(a[i]), .b(b[i]), .cin(carry[i]),
      .sum(sum[i]), .cout(carry[i+1]), .garbage(fa_garbage)
    );
    assign prop[i]             = fa_garbage[0];
    assign garbage[2*i+1:2*i]  = fa_garbage[2:1];
  end

  assign acc[0] = prop[0];
  for (genvar i = 1; i < N; i++) begin : g_and
    rft_fredkin u_and (
      .a(prop[i]), .b(1'b0), .c(acc[i-1]),
      .p(garbage[2*N+2*(i-1)]), .q(acc[i]), .r(garbage[2*N+2*(i-1)+1])
    );
  end

  // Skip multiplexer: Q = ~P & ripple | P & cin.
  rft_fredkin u_skip (
    .a(acc[N-1]), .b(carry[N]), .c(cin_skip),
    .p(garbage[4*N-2]), .q(cout), .r(garbage[4*N-1])
  );

endmodule
