// rft_csa16: 16-bit reversible fault-tolerant carry-skip adder.
//
// BLOCKS carry-skip blocks of BLOCK_W bits (4 x 4 by default) are chained:
// each block's carry out is the next block's carry in, and the last block's
// carry out is the adder's. Inside a block the carry either ripples through
// its SNFAs or, when all its bits propagate, is passed on by the block's skip
// multiplexer. Block k adds bits [4k+3:4k].
//
// garbage[(4*BLOCK_W+1)*(k+1)-1 : (4*BLOCK_W+1)*k] is block k's garbage
// (17 lines per 4-bit block, 68 in all). Quantum cost 4 x 66 = 264.
// Combinational, no clock or reset.
module rft_csa16
  import rft_pkg::*;
#(
  parameter int unsigned BLOCKS  = 4,
  parameter int unsigned BLOCK_W = 4
) (
  input  logic [BLOCKS*BLOCK_W-1:0]       a,
  input  logic [BLOCKS*BLOCK_W-1:0]       b,
  input  logic                            cin,
  output logic [BLOCKS*BLOCK_W-1:0]       sum,
  output logic                            cout,
  output logic [BLOCKS*(4*BLOCK_W+1)-1:0] garbage
);
  localparam int unsigned GB_BLK       = 4 * BLOCK_W + 1;
  localparam int unsigned QUANTUM_COST = BLOCKS * csa_qc(BLOCK_W);

  logic [BLOCKS:0] carry;
  assign carry[0] = cin;

  for (genvar k = 0; k < BLOCKS; k++) begin : g_blk
    rft_csa_block #(.N(BLOCK_W)) u_blk (
      .a(a[BLOCK_W*k +: BLOCK_W]), .b(b[BLOCK_W*k +: BLOCK_W]), .cin(carry[k]),
      .sum(sum[BLOCK_W*k +: BLOCK_W]), .cout(carry[k+1]),
      .garbage(garbage[GB_BLK*k +: GB_BLK])
    );
  end

  assign cout = carry[BLOCKS];
endmodule
