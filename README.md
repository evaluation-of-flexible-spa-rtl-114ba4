# Flooding sum-product LDPC decoder with CRI soft-XOR check nodes

This is a fully parallel-in-Z, row-serial LDPC decoder for the IEEE 802.11n
code with block length 1944 and rate 5/6. It runs the sum-product algorithm
(SPA) with a flooding schedule. It does not use the usual min-sum
simplification. Instead, the check node update is built from *soft-XOR*
(boxplus) cells. Each cell approximates the non-linear part with one step of
centred recursive interpolation (CRI). What remains is two adders and two
comparators per cell. This makes real SPA check nodes affordable in logic.

Defaults: 7-bit messages (sign, 2 integer bits, 4 fraction bits), 10
iterations, and a *CNU rate* of 4. The CNU rate is the number of base-matrix
entries each check node unit takes per clock.

## The code and how it is laid out

The parity check matrix is quasi-cyclic. A 4 x 24 base matrix lists, for
every block of 81 x 81 bits, either `-` (all-zero block) or a shift `s`. A
shift `s` stands for the identity rotated right by `s`: check node `i` of the
block is connected to variable node `(i + s) mod 81`. The base matrix has 79
non-zero entries. In total there are 1944 variable nodes and 324 check nodes.

`ldpc_pkg` holds the base matrix and computes the ROM image from it at
elaboration. The ROM stores only the 79 non-zero entries, in row-major order.
Each ROM word is 9 bits:

| bits | field | meaning |
|------|-------|---------|
| 6:0  | shift | rotation, 0..80 |
| 8:7  | skip  | number of `-` entries that follow this one in the row-major scan |

Because of the skip field, the controller walks the ROM without looking at the
`-` entries.

## Soft-XOR with CRI (`softxor_cri`)

The boxplus of two LLRs splits into two parts. The sign is the XOR of the two
signs. The magnitude is `Min*(|a|,|b|)`. That function is below `min(|a|,|b|)`,
most of all where `|a|` and `|b|` are close. One CRI step adds a third line
half-way between the two tangents, shifted down by a constant:

    |y| = min(|a|, |b|, (|a| + |b|)/2 - 0.8)

With 4 fraction bits the constant 0.8 becomes 13 LSBs. The subtraction is
unsigned and has no absolute value. When `(|a|+|b|)/2 < 0.8`, the difference
wraps to a large number and drops out of the minimum. Over all 6-bit inputs,
the worst error against the exact `2 atanh(tanh(a/2) tanh(b/2))` is about 0.49.
The testbench checks that bound.

## Forward-backward check node unit (`cnu_fb`)

A check node of degree `d` must send each neighbour the boxplus of the *other*
`d-1` inputs. The unit does this without an inverse boxplus, using prefixes
and suffixes:

    f_i = u_1 [+] ... [+] u_i          (forward, while the row arrives)
    b_i = u_i [+] ... [+] u_d          (backward, after the row is complete)
    out_i = f_{i-1} [+] b_{i+1}        (merge; out_1 = b_2, out_d = f_{d-1})

A row of 24 base-matrix positions arrives as `G = 24 / RATE` groups, one
group per clock. `in_mask` marks `-` positions, and those act as the neutral
element. The forward chain has RATE soft-XORs in series. For each position it
stores the input and the prefix before it in a buffer of `G` entries.

The backward stage needs the complete row, so it reads the buffer back in
reverse group order. The backward chain and the merge cells each also have
RATE soft-XORs. The hard part is keeping the unit busy every cycle, which
needs two rows in flight. The next row is written into the buffer entry the
backward stage reads in that same cycle. The write direction flips every row,
so a location is always free just as it is needed. One buffer of `G` entries
is therefore enough for back-to-back rows with no gap.

Timing of one row:
- The results leave as `G` consecutive groups, in reverse order: last
  positions first.
- The first result group is valid two clocks after the row's last input group.
- `out_last` flags the first group out. `out_first` flags the last group out.

The 81 check nodes of a base-matrix row block work in lock step: there are 81
`cnu_fb` instances, grouped in three banks of 27.

## Permutation networks (`perm_net`)

Messages are stored in variable node order and must reach the CNUs in check
node order. The forward network does this: `out[i] = in[(i+s) mod 81]`. The
inverse network carries the results back. Each network is a barrel shifter of
7 stages, and stage `k` rotates by `2^k mod 81` when shift bit `k` is set. That
is 567 2:1 multiplexers per message bit, and the logic is purely
combinational. Each of the RATE lanes has its own forward and inverse network.

## Memories and the variable node update

All memories are register-bank arrays (`ldpc_ram`). Each is split into three
sub-RAMs of 27 messages with enables. Every sub-RAM is enabled for Z = 81.

| memory | contents | words x width |
|--------|----------|---------------|
| R0 | channel LLRs; loaded before start, read-only while decoding | G x (RATE x 81 x 7) |
| R1 | the last check-to-variable message of every base-matrix position | 4G x (RATE x 81 x 7) |
| R2, R3 | column sums of check-to-variable messages | G x (RATE x 81 x 7) |

R2 and R3 swap roles every iteration. One holds the complete sums of the
previous iteration and is only read. The other is accumulated as this
iteration's results come back.

The variable node unit (`vnu`) is an adder/subtracter pair per message:

    v2c     = sat(ch + sum_prev - c2v_old)       (first iteration: v2c = ch)
    acc_new = sat((first_touch ? 0 : acc) + c2v_new)

The first line is the usual extrinsic VN message. The full column sum is read
from one buffer, and this position's own last message (from R1) is subtracted.
All additions saturate to 7 bits, and the column sums are 7 bits wide as well.

## Schedule and timing (`ldpc_ctrl`)

One iteration proceeds as follows:

1. **RUN**, `4 x G` cycles. One group of RATE positions of the current row is
   issued per cycle. For each group, the datapath:
   - reads R0, R1 and the previous sums;
   - forms the VN messages and rotates them;
   - passes them through a pipeline register into the CNUs.

   For every group, the controller records the mask and shifts. It needs them
   again when the results of that group come back.
2. **DRAIN**, `G + 2` cycles. The next iteration must see complete sums
   (flooding), so the controller waits until the last row's results have been
   written back.

Results of a row return while the next row is entering, so the CNUs overlap
rows during RUN. Every result group is:
- rotated back;
- written to R1;
- added into the sum buffer of this iteration.

The first contribution to a column in an iteration restarts its sum from zero.

After the last iteration, an **OUTPUT** pass reads `sat(ch + sum)` for all
columns, one group per cycle (`out_valid`, `out_addr`, `out_llr`,
`out_hard`). Then `done` pulses.

Cycle counts at rate 4 (`G = 6`):
- 32 cycles per iteration: 24 issue cycles and 8 drain cycles.
- From the clock edge that samples `start` to the rise of `done`:
  `ITERATIONS x 32 + G` = 326 cycles.

The end-to-end testbench checks this count.

## Top-level interface (`ldpc_decoder`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `load_valid`, `load_addr[GW]`, `load_llr[R][81]` | in | while not busy: write R0 word `load_addr`; lane `l` is column block `load_addr*R + l` |
| `start` | in | start decoding; sampled when idle |
| `busy`, `done` | out | busy while decoding; `done` pulses after the last output word |
| `out_valid`, `out_addr`, `out_llr[R][81]`, `out_hard[R][81]` | out | a-posteriori LLRs and hard decisions (1 = negative LLR), G words |

LLRs are 7-bit two's complement with 4 fraction bits, and positive means
bit 0. The value -64 is clipped to -63 inside the CNU.

## How far it follows the reference architecture, and where it departs

These parts follow the reference architecture this design was built from:
- the flooding SPA with boxplus check nodes;
- the CRI approximation with constant 0.8 and no absolute value;
- forward-backward CNUs with first/last flags and a configurable CNU rate;
- 81 CNUs in three banks of 27;
- 7-stage barrel shifters with a 7-bit shift control;
- four RAMs split in three parts, with R0 single-port and R2/R3 alternating
  each iteration;
- a ROM of non-zero entries with skip bits;
- a first-iteration bypass of the VNU;
- 10 iterations and 7-bit messages.

These are this design's own choices or departures:
- **Drain between iterations.** The reference quotes 24 cycles per iteration
  at CNU rate 4. This design spends 32, because it waits for the last row's
  results before the next iteration reads the sums. Without the wait, the
  first rows of the next iteration would see incomplete column sums.
- **One code only.** The architecture is meant to serve all twelve 802.11n
  codes (Z = 27, 54, 81), so the sub-RAM and CNU banks have enables. Only the
  n = 1944, rate 5/6 base matrix is included, and all banks are always on.
- **Rotation direction.** Taken from the 802.11n definition (check `i` to
  variable `(i+s) mod 81`).
- **Fixed point.** 4 fraction bits; 0.8 rounded to 13/16; halving by
  truncation; saturation in every VNU addition; 7-bit column sums.
- **Own additions.** The CNU input register, the mask-based handling of `-`
  positions inside the CNU, the buffer addressing, the load/start/done
  interface and the output pass.
- **Not built.** The reference's min-sum CNU is only a comparison
  point and is not built.

With 7-bit saturated column sums the decoder does correct errors. In the
testbench, a frame with 36 channel errors at sigma = 0.49 decodes to 6, but
the sums limit performance at high LLR magnitude. `SUM_BITS` can be raised
independently of `NOF_BITS`.

## Files

`rtl/`
- `ldpc_pkg.sv`: base matrix, ROM image builder, constants.
- `softxor_cri.sv`, `cnu_fb.sv`: the check node.
- `perm_net.sv`, `vnu.sv`, `ldpc_ram.sv`, `h_rom.sv`: datapath and storage.
- `ldpc_ctrl.sv`: sequencing.
- `ldpc_decoder.sv`: the top.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus
`cnu_fb_checker.sv`, which the CNU test uses at rates 1, 4 and 8.

- `tb_ldpc_decoder` runs the top at its default parameters. It decodes three
  frames: random LLRs, and two noisy all-zero codewords. It compares every
  output bit-exactly against a reference decoder written in the testbench and
  checks the cycle count.
- It also counts these mechanisms, and fails if one never happens:
  - row overlap in the CNUs;
  - skipped `-` entries;
  - the first-iteration bypass;
  - use of both sum buffers;
  - non-zero rotations;
  - corrected errors.

`tb_ldpc_decoder_configs` runs the same kind of end-to-end check through
`ldpc_decoder_checker` in four more configurations, side by side:
- CNU rate 1 (122 cycles per iteration) with 7 bits and 10 iterations;
- CNU rate 8 (17 cycles per iteration) with 7 bits and 10 iterations;
- 6-bit messages (3 fraction bits) with 12 iterations at rate 4;
- 5-bit messages (2 fraction bits) with 12 iterations at rate 4.

Each testbench prints `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/ldpc_pkg.sv tb/tb_ldpc_decoder.sv --top-module tb_ldpc_decoder
    obj_dir/Vtb_ldpc_decoder

Replace `tb_ldpc_decoder` with any other testbench name. The full decoder
builds in well under a minute and simulates in under a second.

To change the CNU rate, override `CNU_RATE` on `ldpc_decoder`; it must divide
24. `NOF_BITS`, `FRAC_BITS`, `SUM_BITS` and `ITERATIONS` are parameters too.
`tb_ldpc_decoder` reads its parameters from `ldpc_pkg`. For another
configuration, add an `ldpc_decoder_checker` instance with the new parameters
to `tb_ldpc_decoder_configs`. That testbench takes about three minutes to
build, because it holds four decoders.
