# Parity-preserving reversible adders: SNFA full adder, carry-skip and ripple-CLA

These adders are built only from reversible 3-input/3-output gates. Each gate
maps its inputs to its outputs one-to-one, and each preserves parity: the XOR
of its three inputs equals the XOR of its three outputs. A network of such
gates inherits both properties. Its outputs therefore carry a free check. If
the XOR of all output lines, including the "garbage" lines that reversibility
forces the network to keep, differs from the XOR of all input lines, then an
odd number of lines was corrupted. This is the sense in which the adders are
*fault tolerant*.

The cost measure is the **quantum cost**: the number of elementary 1- and
2-qubit operations needed to realise each gate. The design keeps it low by
building a one-bit full adder from three cheap F2G gates (cost 2 each) and a
single NFT gate (cost 5). The result is the **SNFA** (Single NFT Full Adder),
with quantum cost 11 and three garbage lines. Two 16-bit adders are built on
it:

| adder | module | structure | quantum cost | garbage lines |
|---|---|---|---|---|
| CLA-style | `rft_cla16` | 16 SNFAs, carry passed NFT to NFT | 176 | 48 |
| carry-skip | `rft_csa16` | four 4-bit skip blocks | 4 × 66 = 264 | 68 |

The RTL is untimed combinational logic: it has no clock, no registers and no
reset. Each gate is a small module with exactly its Boolean equations. The
composite modules instantiate the gates in the order the reversible circuit
uses them. Synthesis will flatten and optimise this freely. The value of the
RTL is that it is a bit-exact, checkable model of the reversible netlist,
garbage lines included. It is not an efficient binary adder.

## The gates

All three gates take inputs `a, b, c` and drive outputs `p, q, r`.

| gate | module | P | Q | R | cost |
|---|---|---|---|---|---|
| Feynman double (F2G) | `rft_f2g` | A | A⊕B | A⊕C | 2 |
| New Fault Tolerant (NFT) | `rft_nft` | A⊕B | AC̄ ⊕ B̄C | AC̄ ⊕ BC | 5 |
| Fredkin (FRG) | `rft_fredkin` | A | ĀB + AC | AB + ĀC | 5 |

Reversible circuits do not allow plain fan-out. Instead, an F2G with B = C = 0
copies A onto two more lines. The NFT's R output is a 2:1 multiplexer: C
selects B when it is 1 and A when it is 0. A Fredkin gate with B = 0 gives
A·C on Q, which is an AND. With B and C used as data, its Q output is a
multiplexer selected by A. The cost constants are in `rft_pkg`. Each
composite module also carries a `QUANTUM_COST` localparam.

## The SNFA full adder (`rft_snfa`)

Five lines enter: `a`, `b`, `cin` and two constant zeros. Five lines leave:
`sum`, `cout` and `garbage[2:0]`.

```
F2G1 (a,   0,    0 )  -> a,      a^b,   a        copy a
F2G2 (a^b, 0,    a )  -> a^b,    a^b,   b        second copy of a^b, recover b
NFT  (a,   cin,  a^b) -> a^cin,  Q,     (a^b) ? cin : a   = cout (majority)
F2G3 (a^cin, Q,  b )  -> g1,     g2,    a^b^cin  = sum
```

`garbage[0]` is the spare copy of `a^b`, which is the bit's propagate signal.
`garbage[2:1]` are F2G3's P and Q outputs. The carry comes out of the NFT,
three gates after the operands and one gate after `cin`. The sum comes one
gate later. In a chain, the carry therefore moves one NFT per bit, and each
sum settles one gate behind its carry.

The gate list, the sum and carry equations, the cost of 11 and the 3 garbage
lines follow the published SNFA. The published drawing does not fully show
which output of each gate feeds which input. The wiring above is this
design's choice: it is the one that produces the published outputs.

## Ripple "CLA" (`rft_cla_block`, `rft_cla16`)

`rft_cla_block #(N)` is N SNFAs in series. The default is N = 4, which gives
12 garbage lines. `rft_cla16` chains four of these blocks. Despite the name,
there is no generate/propagate look-ahead network. The "look-ahead" is only
that each stage forms its carry before its sum. The carry path is one NFT per
bit, so the critical path of the reversible netlist is about n + 3 gates.
That figure is not modelled in the RTL.

Garbage layout: `garbage[3i+2:3i]` belongs to bit i, and `garbage[3i]` is
`a_i ^ b_i`.

## Carry-skip block (`rft_csa_block`, `rft_csa16`)

This is the part of the design that takes the most care. An N-bit block has
four parts:

1. **Ripple path.** N SNFAs add the block and produce the ripple carry.
2. **Block propagate.** The propagate lines `p_i = a_i ^ b_i` already exist
   as each SNFA's `garbage[0]`. A chain of N−1 Fredkin gates with B = 0 ANDs
   them into the block propagate P.
3. **Skip multiplexer.** One Fredkin gate with A = P, B = ripple carry and
   C = carry in produces `cout`. When every bit propagates, the block's carry
   in is passed straight through.
4. **Carry-in fan-out.** One F2G with B = C = 0 copies the carry in, to
   SNFA 0 and to the skip multiplexer.

The block uses N NFT, N FRG and 3N + 1 F2G gates. Its quantum cost is
therefore 16N + 2, which is 66 at N = 4. `rft_csa16` chains four 4-bit
blocks: block k adds bits [4k+3:4k], and its carry out is the next block's
carry in.

Garbage layout of one block, indices counted from 0:

| lines | content |
|---|---|
| `[2i+1:2i]`, i = 0..N−1 | SNFA i's `garbage[2:1]` |
| `[2N+2(i−1)+1 : 2N+2(i−1)]`, i = 1..N−1 | Fredkin AND stage i, {R, P} |
| `[4N−1:4N−2]` | skip multiplexer {R, P}. Line 4N−2 is the block propagate. |
| `[4N]` | third copy of the carry in |

The skip logic is documented only by its gate count and its cost formula.
Two choices here are this design's own: the wiring of the Fredkin gates, and
using the extra F2G to fan out the carry in. The result is 4N + 1 garbage
lines (17 per block, 68 for 16 bits). The usual figure for this adder is 4N
(16 per block). The extra line is the third copy of the carry in.

## Where this departs from the published figures

- **16-bit quantum cost.** The published totals are 254 for the 16-bit CLA
  and 340 for the 16-bit carry-skip adder. Neither follows from the per-gate
  costs. This RTL counts 176 and 264: 11 per SNFA, and 66 per 4-bit skip
  block.
- **Number of F2G gates.** One sentence gives "n NFTs and n F2Gs" for the
  n-bit CLA. This is inconsistent with the three-F2G full adder it is built
  from, and the RTL uses 3n F2Gs. Likewise, one heading gives "n+5" F2Gs for
  the carry-skip adder. The RTL follows the cost formula instead, which
  counts 3n+1.
- **Timing figures are not reproduced.** The unit-gate delays (n+3 for the
  CLA, n+5 for the carry-skip adder) and the FPGA delay and power figures
  describe the reversible netlist and an FPGA implementation. The RTL does
  not model them.
- **Garbage count of the skip block.** It is 4N+1 rather than 4N, as
  explained above.
- **F2G output R.** One drawing of the F2G can be read as R = A⊕B⊕C. The
  gate's labelled outputs, and the standard definition, give R = A⊕C, which
  is used here.

## Checking parity in use

For either adder, the following holds for every input:

```
^{a, b, cin} == ^{sum, cout, garbage}
```

A mismatch means a line is faulty. The top module `rft_adder_top` brings
every garbage line out for this purpose. The checker itself is left to the
user and is not part of the RTL.

## Files

- `rtl/rft_pkg.sv`: quantum-cost constants and the cost and garbage formulas
  of the skip block.
- `rtl/rft_f2g.sv`, `rtl/rft_nft.sv`, `rtl/rft_fredkin.sv`: the gates.
- `rtl/rft_snfa.sv`: the full adder.
- `rtl/rft_cla_block.sv`, `rtl/rft_cla16.sv`: the ripple "CLA".
- `rtl/rft_csa_block.sv`, `rtl/rft_csa16.sv`: the carry-skip adder.
- `rtl/rft_adder_top.sv`: both 16-bit adders side by side, each with its own
  `*_a`, `*_b`, `*_cin`, `*_sum`, `*_cout` and `*_garbage` ports.
- `tb/tb_<module>.sv`: one self-checking testbench per module.

## Tests

Every testbench compares its results with integer arithmetic or with
hand-written truth tables. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- **Gates:** all 8 inputs. Checks the truth table, that the gate is a
  bijection, and that it preserves parity.
- **SNFA:** all 8 inputs. Checks sum and carry, that `garbage[0] = a^b`,
  parity, that the mapping is injective, and that the cost is 11.
- **Blocks:** every input pattern at N = 4. The carry-skip block is also run
  at N = 2 and N = 1, and the CLA block at N = 3. Checks sum, carry, parity,
  the block-propagate line, and the cost and garbage counts.
- **16-bit adders:** the operand pairs from the published waveform captures,
  whose printed sums are reproduced. Then carry-chain corner cases and 20,000
  random pairs.
- **Top (`tb_rft_adder_top`):** runs at full size. It replays the waveform
  pairs, then drives both adders with the same 30,000 operand sets and
  cross-checks them. It counts carry out, a full 16-bit ripple, a carry
  skipped by each of the four skip blocks, a carry skipped across all four
  blocks, and a parity checker flagging a deliberately flipped line. A
  mechanism that never occurs counts as a failure.

The waveform vectors for the carry-skip adder come from a low-resolution
capture. Only pairs whose printed sum equals a + b + cin were kept.

To run the top testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl rtl/rft_pkg.sv tb/tb_rft_adder_top.sv --top-module tb_rft_adder_top
./obj_dir/Vtb_rft_adder_top
```

Any other testbench runs the same way: replace the file and the top-module
name.
