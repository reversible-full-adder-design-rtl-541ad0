// rft_cla16: 16-bit reversible fault-tolerant CLA-style adder.
//
// BLOCKS adder blocks of BLOCK_W bits (4 x 4 by default), each a chain of
// SNFA full adders (rft_cla_block), with the carry passed from block to
// block. Block k adds bits [4k+3:4k]. garbage[3*BLOCK_W*(k+1)-1 : 3*BLOCK_W*k]
// is block k's garbage (48 lines in all). Quantum cost 16 x 11 = 176.
// Combinational, no clock or reset.
module rft_cla16
  import rft_pkg::*;
#(
  parameter int unsigned BLOCKS  = 4,
  parameter int unsigned BLOCK_W = 4
) (
  input  logic [BLOCKS*BLOCK_W-1:0]   a,
  input  logic [BLOCKS*BLOCK_W-1:0]   b,
  input  logic                        cin,
  output logic [BLOCKS*BLOCK_W-1:0]   sum,
  output logic                        cout,
  output logic [3*BLOCKS*BLOCK_W-1:0] garbage
);
  localparam int unsigned GB_BLK       = 3 * BLOCK_W;
  localparam int unsigned QUANTUM_COST = BLOCKS * BLOCK_W * QC_SNFA;

  logic [BLOCKS:0] carry;
  assign carry[0] = cin;

  for (genvar k = 0; k < BLOCKS; k++) begin : g_blk
    rft_cla_block #(.N(BLOCK_W)) u_blk (
      .a(a[BLOCK_W*k +: BLOCK_W]), .b(b[BLOCK_W*k +: BLOCK_W]), .cin(carry[k]),
      .sum(sum[BLOCK_W*k +: BLOCK_W]), .cout(carry[k+1]),
      .garbage(garbage[GB_BLK*k +: GB_BLK])
    );
  end

  assign cout = carry[BLOCKS];
endmodule
