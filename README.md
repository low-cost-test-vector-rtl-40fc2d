# Scan test decompression with a reconfigurable serial multiplier

Many chips already contain a bit-serial multiplier. This design turns that
multiplier into a test-data decompressor, so scan tests need almost no extra
hardware. Each N x N block of a scan test cube (N scan chains, N shift
cycles) is stored on the tester as two N-bit numbers. On chip the two numbers
are multiplied over GF(2), where the full adders act as XOR gates. The N
successive states of the multiplier's sum registers are shifted into the N
scan chains as the N bit-slices of the block.

One block costs 2N stored bits instead of N², and it is expanded in N
clocks. Only two tester channels are needed, one per operand. The operands
for a test cube come from solving GF(2) equations in the cube's specified
bits. That step is offline software and is not part of this RTL.

The defaults describe the organisation used for the ISCAS-89 circuit
s15850:

- an 8 x 8 multiplier;
- 8 scan chains of 80 cells;
- each 640-bit cube cut into 10 blocks of 64 bits.

## How a block becomes a bit-slice matrix

Call the serial operand `s` (sent LSB first) and the parallel operand `p`.
Call the sum registers `S`. In GF(2) mode a multiplier step computes

    S(1) = s[0] ? p : 0                          (first step of a block)
    S(i) = (S(i-1) >> 1) XOR (s[i-1] ? p : 0)    (i = 2 .. N)

`S(i)` is row i of the block's test matrix. Bit j of that row goes to scan
chain j. Written out, bit j of row i is `XOR over k of s[i-1-k] & p[j+k]`.
This closed form is the one the testbenches use as their reference.

Worked 4-bit example, taken from the scheme's own description: serial 1101
and parallel 1011 give the rows 1011, 0101, 1001 and 1111. These rows match
the 9 specified bits of the target matrix

    1 x x 1
    0 1 x 1
    x 0 0 x
    1 x 1 x

So 16 scan bits are stored as 8.

A cube is not always solvable. Cubes that cannot be encoded are stored raw,
and the tester applies them after all the compressed cubes.

## Blocks

| module | role |
|---|---|
| `serial_multiplier` | N cells, each with an AND gate, a full adder, a sum register and a carry register. `MUL_INT` is a carry-save binary multiplier: the product leaves on `prod_bit`, LSB first, over 2N steps. `MUL_GF2` forces the carry outputs to 0. `clear` starts a new product without an extra cycle. `state_next` is the slice that goes to the scan chains. |
| `operand_regs` | B shift register (serial operand, loaded from channel 1), shadow register (loaded from channel 2) and A register (parallel operand). While block k expands, B shifts out block k's serial operand and shifts in block k+1's. At the last clock of a block, A takes the shadow register's value. In raw mode the two registers build raw bit-slices. |
| `decomp_ctrl` | Cycle sequencer with the states idle, setup, expand, raw, capture and done. |
| `test_mode_ctrl` | The VECTOR_COUNT / COMPRESSED_COUNT counters. They select compressed or raw delivery for each cube. |
| `scan_chains` | The circuit's N scan chains of L = BLOCKS*N cells, with shift and capture. |
| `misr` | N-input signature register. It compacts the chain outputs while the next vector shifts in. |
| `mult_decomp_top` | Wires all of the above together. The multiplier is held in GF(2) mode. |
| `mdc_pkg` | Shared types (`mul_mode_e`, `cube_mode_e`) and the MISR polynomials. |

Data path in `mult_decomp_top`:

    ch1 -> B shift reg --b_ser--> serial_multiplier --state_next--+
    ch2 -> shadow reg -> A reg --a_par-->                          +--> scan_chains --scan_out--> misr
    ch1/ch2 --(raw cubes)--> raw_slice ----------------------------+        ^ resp_in (circuit response)

## Timing

Each cycle listed below is one clock:

| phase | cycles | what happens |
|---|---|---|
| setup | N | Before the first compressed cube, and after any raw cube: the first block's operands are loaded into B and the shadow register. A is loaded on the last setup clock. |
| compressed block | N | Each clock does four things at once: one multiplier step, one scan shift, one new bit on each channel, and one MISR update. A is reloaded on the last clock of the block. |
| capture | 1 | After the last block of a cube. The chains load `resp_in`. No channel bits are consumed. |
| raw cube | L·N/2 + 1 | One slice every N/2 clocks, then the capture cycle. |

A set of K compressed cubes therefore takes N + K·(BLOCKS·N + 1) clocks. For
s15850 that is 8 + 142·81 = 11510, the figure the scheme quotes.

`chan_take` is high in every clock in which the tester must present a fresh
bit on both `ch1` and `ch2`. The bits are consumed at that rising edge.

Channel bit order:

- **Compressed cubes:** each operand is sent LSB first. The serial operand
  goes on ch1 and the parallel operand on ch2. The operands of block k+1 are
  sent during block k. During the last block of a cube, the channels carry
  block 0 of the next cube if that cube is compressed; otherwise the N bits
  are ignored.
- **Raw cubes:** slices are sent in shift order. Each slice takes N/2 clocks:
  ch2 carries chains 0 … N/2-1 and ch1 carries chains N/2 … N-1, lowest chain
  first.

In the scan cells, slice r of a cube ends up in cell L-1-r of each chain.
`cells[j*L + k]` is cell k of chain j.

## Compressed and raw cubes

The tester stores all compressed cubes first, then the raw ones, so no
per-cube marker bit is needed. `test_mode_ctrl` works as follows:

- It holds COMPRESSED_COUNT and a total count.
- VECTOR_COUNT is incremented in every capture cycle.
- When VECTOR_COUNT reaches COMPRESSED_COUNT, the mode switches to raw.

With `raw_first = 1` the order is reversed: raw cubes first, then compressed.
The sequencer learns the next cube's mode during the capture cycle, so a
change of mode costs no cycle. The only exception is a compressed cube after
a raw one, which needs the N setup clocks.

Operand sharing (several cubes reusing stored operands through indices) is
purely a tester-side storage format. The chip sees the same bit streams
either way. The testbench tester model includes a shared operand pool.

## Interface of `mult_decomp_top`

| port | dir | meaning |
|---|---|---|
| `cfg_load`, `raw_first`, `compressed_count`, `total_count` | in | Configure a test set. This clears VECTOR_COUNT and the MISR. |
| `start` | in | Start the set. Accepted when idle or done. |
| `ch1`, `ch2`, `chan_take` | in, in, out | The two tester channels and their consume strobe. |
| `resp_in` | in | Response of the circuit's logic, captured into the chains. |
| `cells`, `capture` | out | Scan cell contents. The applied vector is valid in the cycle `capture` is high. |
| `signature` | out | MISR contents. |
| `vector_count`, `cube_mode`, `busy`, `done` | out | Status. |

Parameters:

- `N`: multiplier width and number of scan chains (default 8). Must be even.
- `BLOCKS`: blocks per cube, giving chain length L = BLOCKS·N (default 10).
- `CW`: counter width (default 16).

## What follows the scheme and what is this design's choice

Taken from the scheme:

- the cell structure;
- the carry gating for GF(2) mode;
- B as the serial operand and A as the parallel operand;
- the shadow register and the two tester channels;
- the bit-slice mapping;
- the per-cube cycle count;
- the compressed-first ordering with the VECTOR_COUNT comparison;
- a MISR on the chain outputs.

Choices made here:

- **Slice tap.** The slice is taken from the sum registers' D inputs. The
  scan chains receive row i in the same clock in which the multiplier
  computes it. A registered tap would add a pipeline cycle and break the
  81-cycles-per-cube count.
- **A-register reload.** The scheme speaks of loading A "during the capture
  cycle". It also expands several blocks per cube without extra cycles. Here
  A is reloaded at the end of every block, from the value the shadow
  register holds after that edge.
- **Raw-cube delivery.** The scheme says only that the tester switches mode.
  Here the B and shadow registers double as a two-bit-wide serial-to-parallel
  converter.
- **MISR details.** The width is one stage per chain, in internal-XOR form.
  The polynomials are primitive for N = 4, 8, 16, 32 and 64. For other widths
  the code falls back to x^N + x + 1, which may not be primitive.
- **Other details.** The total count, the `start`/`done` handshake, the reset
  values (everything resets to zero, asynchronously) and the counter width
  are also choices made here.
- **Integer mode.** `MUL_INT` is implemented and tested in
  `serial_multiplier`. It is not reachable from the top, which has no
  functional datapath.
- **Not implemented.** The multiplier's other named reconfigurations (LFSR,
  cyclic code generator) are left out, because no polynomial or wiring is
  given for them.

## Sizes the scheme evaluates

| configuration | N | cells per cube | BLOCKS | fits defaults |
|---|---|---|---|---|
| s15850 | 8 | 611, padded to 640 | 10 | yes |
| s38417 | 8 | 1664 | 26 | no, set `BLOCKS=26` |
| s38584 | 16 | 1464, padded to 1536 | 6 | no, set `N=16, BLOCKS=6` |
| s13207 | 32 | 700, padded to 1024 | 1 | no, set `N=32, BLOCKS=1` |
| random sets, n = 8/16/32/64 | n | n² | 1 | n = 8 only |

All of these configurations are simulated in `tb_workloads`. It uses random
operands, because the real test cubes are not part of this design.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog. Example with plain Verilator:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
      rtl/mdc_pkg.sv rtl/*.sv tb/mdc_tester_pkg.sv tb/tb_mult_decomp_top.sv \
      --top-module tb_mult_decomp_top -Mdir obj -o sim && obj/sim

| testbench | covers |
|---|---|
| `tb_serial_multiplier` | The 4-bit worked example. Random GF(2) products against the closed form. Random integer products against `*`. |
| `tb_operand_regs` | Bit order, A reload timing, raw slice layout, hold. |
| `tb_decomp_ctrl` | Cycle counts per cube for compressed, raw, raw→compressed. Strobe counts. |
| `tb_test_mode_ctrl` | Mode switching in both orders. Counter end conditions. |
| `tb_scan_chains`, `tb_misr` | Shift, capture and scan-out. MISR against polynomial arithmetic, error detection and period 255. |
| `tb_mult_decomp_top` | The default size, end to end. Three test sets: compressed then raw, a shared operand pool, raw then compressed. Every applied vector, the cycle counts and the MISR signature are checked. Each mechanism is counted. |
| `tb_workloads` | The evaluated configurations in the table above, including the 11510-cycle s15850 run. |

`tb/mdc_tester_pkg.sv` is the tester model shared by the last two
testbenches. It lays out the channel bit streams and computes the expected
vectors.

## Limits

- The operands are random in every test. Nothing here computes operands from
  real test cubes; that needs the offline Gauss-Jordan solver.
- The circuit's combinational logic is outside the design. Its response is an
  input.
