# Memory-efficient partially parallel QC-LDPC decoder

This is a decoder for regular quasi-cyclic LDPC codes, written in synthesizable SystemVerilog.
It uses a scaled min-sum algorithm with 4-bit messages. A partially parallel decoder keeps every
message that travels between variable nodes and check nodes in RAM, and that RAM dominates its
size. This design cuts the RAM with one scheduling trick. The variable nodes are visited in an
order that makes them produce, in every clock cycle, all messages of one parity check of the
first block row. That check is then evaluated on the spot. Its incoming messages are never
stored, and its outgoing messages are stored in the compact min-sum form: the signs, the two
smallest magnitudes and the position of the smallest.

The RTL follows the architecture published as *"A Memory Efficient FPGA Implementation of
Quasi-Cyclic LDPC Decoder"*. Its default configuration is the one implemented there:
- a (3,6)-regular code with circulant size P = 256;
- block length N = 1536, rate 1/2;
- at most 15 iterations.

Where that description leaves a detail open, this RTL makes its own choice. Those choices are
listed in [Departures and own choices](#departures-and-own-choices).

## The code

The parity check matrix H is a C x T array of P x P blocks (C = 3 block rows, T = 6 block
columns by default). Block H(i,j) is the identity matrix rotated by a shift s(i,j). Row r of
the block has its single 1 in column (r + s(i,j)) mod P. Variable `v = j*P + c` is column c of
block column j. Check `m = i*P + r` is row r of block row i. Every variable sits in C checks, one
per block row. Every check covers T variables, one per block column.

The shifts are the parameter `SHIFT`, a packed table with entry `i*T + j` (type
`ldpc_pkg::shift_tab_t`, up to 256 entries). The default is `s(i,j) = 13*(i+1)*(j+1) mod P`,
from `ldpc_pkg::gen_shifts`. With P a power of two this table has no cycles of length 4. Any
other table can be passed in.

## Messages and arithmetic

All messages are 4-bit sign-magnitude numbers `{sign, mag[2:0]}`, in the range -7..+7. This
includes the channel values. A positive value means "bit is 0".

**Variable node (`ldpc_vnp`).** One processor per block column handles one variable per cycle.
1. It converts the channel value I and the C incoming check messages R_i to two's complement.
2. It adds them: APP = I + sum R_i.
3. For each edge it forms the extrinsic value APP - R_i.
4. It converts that value back to sign-magnitude.
5. It squeezes the magnitude into 3 bits with the scale rule below.

The hard decision is `APP < 0`, so a sum of zero decides 0.

**Scale rule (`ldpc_scale`).** This replaces the multiplication by alpha in normalized min-sum:

| extrinsic magnitude | stored magnitude |
|---|---|
| 0..3 | unchanged |
| 4..7 | minus 1 |
| 8 and above | 7 |

The rule is applied to the variable-to-check messages. A check node only takes minima, and the
rule is monotone. So the result is the same as scaling the check-to-variable messages.

**Check node.** Message j going out of a check has two parts:
- its sign is the product of the other T-1 incoming signs;
- its magnitude is the smallest of the other T-1 incoming magnitudes.

This is the smallest magnitude of the row, min1, except on the edge that holds min1, which gets
the second smallest, min2. A binary tree of `ldpc_min_unit` cells finds min1, min2 and the
index of min1. Each cell merges two (min1, min2, index) records. The tree (`ldpc_min_tree`) has
ceil(log2 T) levels. Ties go to the lower index.

## The schedule — the central idea

One iteration has two phases of P read cycles each. Each phase is followed by one drain cycle,
so an iteration takes 2P + 2 cycles.

**Variable node phase.** In cycle k, VNP j processes column `(k + s(0,j)) mod P` of block column
j. By the definition of the circulants, that column is exactly the one touched by row k of
H(0,j). So in cycle k the T VNPs together produce the T variable-to-check messages of check k of
block row 0. These messages go straight into CNP1 (`ldpc_cnp1`). CNP1 returns that check's
outgoing messages as one compressed word. The word is written to MEM1 at row k.

The VNPs take their block-row-0 inputs from the same MEM1 word, written in the previous
iteration. `ldpc_cmsg_expand` turns it back into T messages. For block rows i >= 1, VNP j reads
and rewrites memory MEM(i,j) at row `(k + s(0,j) - s(i,j)) mod P`. That row of H(i,j) holds the
current column.

**Check node phase.** In cycle k, the check node processor of block row i (`ldpc_cnp`, one for
each i >= 1) reads row k of MEM(i,0..T-1). It computes the new check-to-variable messages and
writes them back in place. Block row 0 takes no part: its checks were already done in the
variable node phase.

So every memory is walked through consecutive rows from a start row that depends only on the
shifts and the phase. Each memory's address generator (`ldpc_addr_gen`) is therefore just a
counter modulo P, loaded with the start row at each phase change.

Timeline of one row, counting from the cycle its memories are read:

| cycle | uncompressed banks MEM(i,j) | MEM1 (block row 0) |
|---|---|---|
| k   | read row k's address | read row k |
| k+1 | VNP/CNP compute; write back | VNP computes; CNP1 input register |
| k+2 |  | CNP1 minimum tree; output register |
| k+3 |  | write compressed word of row k |

## Memories

| memory | count (default) | words x bits | content |
|---|---|---|---|
| channel memory (`ldpc_spram`) | T (6) | P x 4 | channel values of one block column |
| MEM1 (`ldpc_pmem`) | 1 | P x (T + ceil(log2 T) + 6) = 256 x 15 | compressed messages of block row 0 |
| MEM(i,j) (`ldpc_pmem`) | (C-1)·T (12) | P x 5 | message of one edge + hard decision of its variable |

The compressed word is `{sgn[T-1:0], idx, min1[2:0], min2[2:0]}`, where `sgn` holds the signs of
the outgoing messages. For a (4,32) code it would be 32 + 5 + 6 = 43 bits per check, against
4 x 32 = 128 bits uncompressed.

In total the design has 25,344 memory bits. Of these, 3,072 are the hard-decision bits; the
other 22,272 hold channel values and messages.

**Even/odd partition (`ldpc_pmem`).** Every message memory must be read and written in the same
cycle. Instead of a dual-port RAM, each one is two single-port RAMs of P/2 words. Bank A holds
the even rows and bank B the odd rows. Reads walk through consecutive rows, which alternate
between the banks. Writes follow the reads by an odd number of cycles: 1 for MEM(i,j) and 3 for
MEM1. So in every cycle the read and the write fall into different banks. An assertion in
`ldpc_pmem` guards this, and the design requires P to be even.

## Stopping rule and output

Each MEM(i,j) word carries the hard decision of its variable. This bit is written in the
variable node phase and copied unchanged through the check node phase. The checks are then
tested as follows:
- CNP1 computes the parity of the decisions of each check in block row 0 during the variable
  node phase.
- The CNPs do the same for the other block rows during the check node phase.

The controller (`ldpc_ctrl`) ORs these parities together. At the end of the check node phase
it stops when every check held or when `MAX_ITER` iterations are done. Otherwise it starts the
next iteration.

The decoded word is then read from the hard-decision bits of MEM(1,j), one column per cycle.
The start row is `-s(1,j) mod P`, so that column k of every block column comes out in output
cycle k. The first iteration treats all check-to-variable inputs as zero. The memories therefore
never need clearing.

## Interface and timing (`ldpc_decoder`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset (control only; RAMs are not reset) |
| `in_valid`, `in_ready`, `in_llr[T]` | in/out/in | load handshake; word k carries the channel values of variables j*P + k, j = 0..T-1 |
| `out_valid`, `out_col`, `out_bits[T]` | out | P words; `out_bits[j]` = decoded bit of variable j*P + `out_col` |
| `out_iter`, `out_converged` | out | iterations used and whether all checks held, valid with `out_valid` |
| `done` | out | one-cycle pulse after the last output word; the next codeword may then be loaded |

A frame goes through these steps:
1. Loading takes P accepted words. `in_valid` may have gaps.
2. The first output word comes `iterations x (2P + 2) + 2` cycles after the last input word is
   accepted.
3. The output takes P cycles, and `done` follows.

At the defaults a frame that needs all 15 iterations takes 256 + 7710 + 257 cycles. At 90 MHz
this is about 8.4 Mbit/s of information bits, or 9.0 Mbit/s counting only the decoding
iterations. Loading, decoding and output do not overlap.

Parameters of `ldpc_decoder`:

| parameter | default | meaning |
|---|---|---|
| `C`, `T` | 3, 6 | column weight / block rows, row weight / block columns (C >= 2) |
| `P` | 256 | circulant size (even) |
| `MAX_ITER` | 15 | iteration limit |
| `SHIFT` | `gen_shifts(C,T,P,13)` | shift table, entry i*T+j |

## Module map

| file | role |
|---|---|
| `ldpc_pkg.sv` | message type, phase enum, shift-table type and generator |
| `ldpc_decoder.sv` | top: memories, address generators, processors, wiring of the schedule |
| `ldpc_ctrl.sv` | phase sequencing, iteration count, stopping rule |
| `ldpc_vnp.sv`, `ldpc_scale.sv` | variable node processor and its scale rule |
| `ldpc_cnp1.sv` | pipelined check node processor of block row 0, compressed output |
| `ldpc_cnp.sv` | check node processor of block rows 1..C-1 |
| `ldpc_min_tree.sv`, `ldpc_min_unit.sv` | min1/min2/index search tree and its cell |
| `ldpc_cmsg_expand.sv` | compressed word back to T messages |
| `ldpc_addr_gen.sv` | counter-based address generator |
| `ldpc_pmem.sv`, `ldpc_spram.sv` | even/odd partitioned memory bank, single-port RAM |

## Simulation

Every testbench in `tb/` checks itself and ends with a line `TB_RESULT checks=N failures=M`. For
example, the full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/ldpc_pkg.sv tb/tb_ldpc_decoder.sv \
          --top-module tb_ldpc_decoder -o sim
./obj_dir/sim
```

Replace the file and module names for the other tests:
- `tb_ldpc_decoder_c4t32` runs a (4,32) code with P = 64;
- `tb_ldpc_decoder_shift` runs a (3,6) code with P = 30 and an irregular shift table passed
  through `SHIFT`;
- `tb_ldpc_ctrl`, `tb_ldpc_vnp`, `tb_ldpc_cnp1` and the rest test single blocks.

Each test finishes in well under a second.

The end-to-end testbenches need no outside data or encoder. Each one does the following:
1. It builds H from the shift rule and reduces it over GF(2).
2. It draws random codewords from the null space.
3. It adds integer noise and clips the result to 4 bits.
4. It runs a bit-exact model of the same quantized flooding min-sum algorithm.

The decoder must match the model on every decoded bit, on the iteration count, on the
convergence flag and on the cycle latency.

Each end-to-end run must include at least one of each of these events:
- a frame that stops early after converging;
- a frame that stops at the iteration limit;
- a stalled input handshake;
- a frame whose decoded word differs from the channel's hard decisions.

## How far it can be trusted

- Tested against the model: every block is exercised by random or exhaustive tests against
  independent models. All three code configurations are decoded bit-exactly, with the expected
  cycle counts: the default one at full size (P = 256), (4,32) at P = 64 and (3,6) at P = 30
  with irregular shifts.
- Not tested: timing closure at any clock rate and behaviour on an FPGA.
- Synthesis: with yosys the default top maps to about 1,500 word-level cells, 363 flip-flops
  and 25,344 memory bits, all memories inferred as RAM.
- Decoding strength: the (3,6) code corrects about 3 % raw channel bit errors in 3-4
  iterations with the testbench's noise model. That figure comes from the testbench, not from
  a performance claim.

## Departures and own choices

- **Hard-decision bit in every MEM(i,j) word.** The published design does not say how the
  check equations are tested or where the decoded word is kept. This design adds one bit per
  uncompressed message, (C-1)·N = 3,072 bits. Without it the memory total would be 22,272 bits.
- **Drain cycles.** One extra cycle per phase, 2P + 2 cycles per iteration instead of 2P.
- **Interfaces.** The load and output interfaces, reset behaviour and first-iteration handling
  (inputs forced to zero) are this design's own.
- **Shift values and encodings.** The default shift values are this design's own. So are the
  sign-magnitude layout and the choice to store the outgoing signs in the compressed word.
- **Unpipelined CNPs.** The check node processors of block rows 1..C-1 are combinational, so
  that the one-cycle write-back of the uncompressed banks holds. Only CNP1 is pipelined, with
  two register levels, one before and one after the minimum tree.
- **Variable node processors.** They are combinational, between RAM output and RAM input.
- **Parallelism.** Message packing and wider memory partitions, which would raise throughput,
  are not implemented.
