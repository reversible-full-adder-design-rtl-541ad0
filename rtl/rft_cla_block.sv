// rft_cla_block: N-bit reversible fault-tolerant adder of the "carry
// look-ahead" kind: N SNFA full adders in series.
//
// Inside each SNFA the NFT gate forms the stage's carry before the last F2G
// forms its sum, so the carry moves one NFT per bit while the sums follow
// one gate behind. There is no separate generate/propagate look-ahead
// network; the carry chain is the chain of NFT gates. Quantum cost 11N,
// 3N garbage lines (12 for the 4-bit block).
//
// Garbage layout: garbage[3i+2:3i] is SNFA i's garbage, with garbage[3i]
// being a_i ^ b_i.
//
// Combinational, no clock or reset. Parity is preserved: the XOR of a, b and
// cin equals the XOR of sum, cout and garbage.
module rft_cla_block
  import rft_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           cin,
  output logic [N-1:0]   sum,
  output logic           cout,
  output logic [3*N-1:0] garbage
);
  localparam int unsigned QUANTUM_COST = N * QC_SNFA;

  logic [N:0] carry;
  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    rft_snfa u_fa (
      .a(a[i]), .b(b[i]), .cin(carry[i]),
      .sum(sum[i]), .cout(carry[i+1]), .garbage(garbage[3*i+2:3*i])
    );
  end

  assign cout = carry[N];
endmodule
