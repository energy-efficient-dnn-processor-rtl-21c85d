# LUT-based DNN processing core with near-zero skipping

This is a SystemVerilog model of a low-power DNN engine for embedded
human-robot interaction. It is sized for a facial-emotion CNN (a 16-bit-weight
first layer, binary weights after that) and for recurrent dialogue layers with
4- to 8-bit weights. It has no multipliers. Each processing engine keeps a small
**look-up table (LUT)** of sums of its input activations, and the weights
*index* that table. Weights of 2 to 16 bits are handled one bit plane per cycle
by a **bit-serial shifter**. A **near-zero skipper** drops activations of small
magnitude, and the weights that go with them, before they reach the engines.

The top module is `lp_core`, the "LUT-based PE core". It computes convolution
and fully-connected layers, one input coordinate per command.

## The idea: a table instead of multipliers

Take four activations a0..a3 and binary weights w in {+1, -1} (weight bit 1
means +a, bit 0 means -a). Every possible dot product is one of 16 signed sums.
An input activation is reused for every output channel and kernel position (CO·k
times). So it pays to compute those sums once (the **A-step**) and then only look
them up (the **B-step**).

Only 8 of the 16 sums are stored, in the *physical LUT*: the ones whose weight for
a3 is +1,

    LUT[j] = a3 + Σ_{i<3} (j[i] ? +a_i : -a_i)        j = 0..7

The other 8 are their negations: the sum for weight nibble w with w[3] = 0 equals
`-LUT[~w[2:0]]`. The LPE reads such an entry through a bitwise inverter, which
gives `-x-1`. It also raises a flag `inv`, and the adder tree that collects the
LPE outputs adds the flags as carries, which makes the result exact. One LPE
serves 12 output channels at once with twelve 8-to-1 multiplexers. Four
activations per table and twelve outputs per LPE are the best values of the
energy sweep that this design follows.

For multi-bit weights the table is rebuilt over **three** activations with 0/1
weights (`LUT[j] = Σ_{i<3} j[i]·a_i`, no inversion). The weight is fed one bit
plane per cycle, LSB first. The bit-serial shifter adds plane k shifted left by k
and subtracts the MSB plane (two's complement). An N-bit weight therefore costs N
B-cycles, and precision trades directly for throughput.

## Organisation

    host ports ──► act_buffer (1024 × 16b) ──nz_skipper marks near-zero values
                        │ 64 lanes, one activation each per round
                        ▼
         ┌──── lpe_cluster ×4 ─────────────────────────────┐
         │ 4 × lpe (8 × 18b LUT, 12 muxes)                 │◄── wmem: 64 banks × 384 × 12b (36 KB)
         │ 12 × addsub_tree4 (A: fill LUTs, B: add 4 LPEs) │
         └──────────────────────┬──────────────────────────┘
                                ▼
         bit_serial_shifter: 12 × 4-way cluster sum, shift-accumulate over bit planes
                                ▼
         pingpong_accum: shift, saturate, read-modify-write into OMEM[acc_sel]
                         2 × omem (256 × 12 × 16b = 6 KB each)
    lp_controller sequences the whole flow

| unit | count | document | this design |
|---|---|---|---|
| LPE clusters | 4 | 4 | 4 |
| LPEs per cluster | 4 | 4 | 4 |
| activations per LUT | 4 (1b), 3 (2–16b) | same | same |
| LUT entries × width | 8 × 18 b | 8 × 16 b | widened, see below |
| parallel outputs | 12 | 12 | 12 |
| weight memory | 36 KB | 36 KB | 64 banks × 384 × 12 b |
| output memories | 2 × 6 KB | 2 × 6 KB | 256 words × 12 × 16 b each |
| features | 16 b | 16 b | 16 b |
| weight precision | 1 (±1), 2..16 bits | 1..16 bits | same |

## One command, cycle by cycle

A command (`cmd_t` in `lp_pkg`) describes one input coordinate. The host first
writes that coordinate's `ci_count` activations into the activation buffer and
the weights into WMEM. Then it pulses `start`. The controller runs:

1. **RESTART** (1 cycle), then a check of whether any activation was kept (1 cycle).
2. For each **round**:
   - **FETCH** (1 cycle): each of the 64 lanes takes its next kept activation.
   - **A-step** (3 cycles): the 12 trees of each cluster compute the 32 LUT
     entries of its 4 LPEs, 12 per cycle. Entry `e = 8p + j` is computed by tree
     `e mod 12` in cycle `e / 12`.
   - **B-step** (`cog·kh·kw·nb` cycles): one WMEM read per cycle, looping over
     output group (12 channels), kernel row, kernel column and weight bit, LSB
     first. Each read gives every lane a 12-bit word: one weight bit for each of
     the 12 output channels.
3. **DRAIN** (4 cycles). Then `done` pulses.

The total is `2 + R·(4 + cog·kh·kw·nb) + 4` cycles. R is the number of rounds
(see below). A coordinate whose activations are all near zero costs 6 cycles.

Pipeline of a B-cycle: WMEM read (cycle 1) → LUT read and cluster trees,
registered (cycle 2) → sum of the 4 clusters and shift-accumulate, registered
(cycle 3) → OMEM read (cycle 4) → add and write back (cycle 5). Each finished
partial sum (the last bit plane) adds 12 values into the OMEM word

    obase + g·cstride + ky·rstride + kx        (modulo 256)

Convolution works by scatter. An input pixel's contribution through kernel tap
(ky,kx) goes to a different output pixel, and the host picks `obase`,
`rstride` and `cstride` so that the taps land on the right words of an output
frame. A fully-connected layer is the case kh = kw = 1.

## Near-zero skipping and the lane rounds

A value is *near zero* when `-2^s ≤ a < 2^s`, with `s = thr_shift` (s = 2 gives
the threshold of 4 that the FER network uses). The test is what `nz_skipper`
does: invert a negative value bitwise, shift right by s, and block the value
when the result is 0. Each activation is tested as it is written, and a flag is
kept next to it.

Skipping has to remove both the activation and its weights without stalling
the other lanes. The buffer therefore works in **lanes**. In 1b mode lane L
(0..63) serves channels L, L+64, L+128, …. In the multi-bit mode there are 48
lanes (3 per LPE) and the step is 48. At every FETCH each lane moves on to its
next *kept* channel on its own. Lane L's weights live in WMEM bank L, at slot
`j = channel / NL`, which starts at `j·wstride`. The controller adds one shared
`offset`, so every bank is read at its own address without conflicts. The
number of rounds R is the longest per-lane list of kept channels. Near-zero
activations thus shorten the command and are never multiplied. A lane with
nothing left feeds 0 for the rest of the command.

## Ping-pong accumulation

`acc_sel` picks the OMEM that accumulates. The other one is read by the host
(`rd_en`/`rd_addr`, data one cycle later), for instance to hand a finished
layer's outputs on as the next layer's inputs. Each partial sum is first shifted
right by `oshift` and saturated to 16 bits. Then it is added to the stored word
with saturation. The read-modify-write forwards a word written in the previous
cycle, so back-to-back partial sums to the same address are exact.
`clear_start` zeroes the accumulating bank in 256 cycles. The contents start
undefined, so clear a bank before its first use.

Saturation happens per partial sum, once per round. A coordinate that needs
several rounds can therefore round differently from a single full-precision dot
product when `oshift > 0`. This is the design's arithmetic, and the
testbenches model it.

## Where this design departs from, or adds to, the source description

- **LUT width.** The entries are 18 bits rather than 16, so that a sum of four
  full-range 16-bit activations cannot wrap.
- **Inversion carry.** The source obtains the second half of the table with an
  inverter and a multiplexer. This design completes the two's-complement
  negation with a carry into the cluster tree.
- **Cross-cluster sum.** Twelve more 4-way trees (in `bit_serial_shifter`) add
  the four clusters. The source mentions 12 4-way add/sub trees and does not say
  how clusters are combined.
- **B-step length.** The source describes one B-cycle per kernel position for
  a set of 12 output channels. Here the B-step also loops over output groups
  and weight bits.
- **Skipping mechanism.** The lane-wise compaction and the banked WMEM that
  make skipping conflict-free are this design's own.
- **Memory layouts, host ports, command format, output addressing, pipeline
  registers, partial-sum scaling, saturation, reset** (asynchronous, active low)
  are this design's choices.
- **Not modelled:** the face detection and alignment pre-processing core and
  the network-on-chip that links it to this core. Their algorithms and protocol
  are not specified. `lp_core`'s plain load, command and read ports are where
  they would connect. There is no sequencing across layers (stepping through
  coordinates, reloading weights, swapping OMEMs). The host does it, as the
  testbenches do.

## Capacity for the target networks

At the default sizes (1024 activations, 384 words per WMEM bank, 256 OMEM
words):

| layer (FER CNN) | shape | WMEM words per bank needed | weights resident? |
|---|---|---|---|
| C1 | 3→64, 7×7, 16 b | 6·49·16 = 4704 | no: run in bands of ≤3 kernel rows per output group (3·7·16 = 336) |
| C2 | 64→64, 3×3, 1 b | 6·9 = 54 | yes |
| C3 | 64→128, 3×3, 1 b | 11·9 = 99 | yes |
| C4 | 128→128, 3×3, 1 b | 2·99 = 198 | yes |
| C5–C8 | 256→256, 3×3, 1 b | 4·22·9 = 792 | no: 3 weight tiles of ≤8 output groups |
| FC1 | 1024→1024, 1 b | 16·86 = 1376 | no: 4 tiles of ≤24 output groups |
| FC2 | 1024→7, 1 b | 16 | yes |

Every layer's input channels fit the activation buffer. An OMEM bank holds
3072 features, so whole feature maps (a 48×48 input is a common size for this
dataset) are processed in spatial tiles. The sizes of the recurrent dialogue
model are not known, so its fit is not assessed. Its 4- or 8-bit weights are
supported: a 256-input, 48-output 8-bit matrix-vector product fits in one
command.

## Files

`rtl/`, bottom-up:

| file | role |
|---|---|
| `lp_pkg.sv` | sizes, widths, `cmd_t` (command) and `btag_t` (pipeline tag) |
| `lpe.sv` | LUT registers, 12 read muxes with inverter |
| `addsub_tree4.sv` | 4-input adder with per-input add/subtract/zero and carry-in |
| `lpe_cluster.sv` | 4 LPEs + 12 trees; A-step schedule, B-step sum |
| `nz_skipper.sv` | near-zero test |
| `act_buffer.sv` | activation store, skip flags, per-lane compaction |
| `wmem.sv` | 64-bank weight memory with per-lane slot addressing |
| `bit_serial_shifter.sv` | cluster sum, bit-plane shift-accumulate |
| `omem.sv` | one output memory bank |
| `pingpong_accum.sv` | two OMEMs, read-modify-write accumulation, clear, host read |
| `lp_controller.sv` | command sequencer |
| `lp_core.sv` | top |

`tb/` has one self-checking testbench per module (`tb_<module>.sv`). It also has
`tb_workloads.sv`, which runs the shapes of the FER layers C1, C2 and FC2 and of
an 8-bit recurrent gate through the core at its default sizes. It prints the skip
ratio and cycle count of each. Every testbench prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
        rtl/lp_pkg.sv tb/tb_lp_core.sv --top-module tb_lp_core
    ./obj_dir/Vtb_lp_core

Replace `tb_lp_core` with any other testbench name. `tb_lp_core` and
`tb_workloads` use the core at its default parameters and finish in about a
second.

`tb_lp_core` covers binary and multi-bit modes, a negative MSB plane, near-zero
skipping, a fully skipped coordinate, multi-round coordinates, 3×3 scatter,
ping-pong swaps and accumulation forwarding. It counts each of these and fails
if one never happens. It checks both OMEM banks word by word against an
arithmetic model, and the cycle count of every command against the formula
above.

Simulating with `--assert` also enables the interface assertions. They check
that an A-step and a B-step never share the cluster trees, that no partial sum
arrives while a bank is being cleared, that `start` comes only while the core
is idle and with non-zero loop sizes, and that weight writes stay inside a bank.

## Changing it

- Organisation and widths are in `lp_pkg`. The widths of the sums are derived
  from `ACT_W`. `PSUM_W` covers 16-bit weights.
- Memory depths are parameters of `lp_core` (`ACT_DEPTH`, `WBANK_DEPTH`,
  `OMEM_DEPTH`). `cmd_t` has 11 bits for `ci_count`. Lane slots are 5 bits, so
  `ACT_DEPTH` can go up to 48·31.
- Weight words for channel `ci` go to bank `lane(ci)` at address
  `(ci / NL)·wstride + ((g·kh + ky)·kw + kx)·nb + bit`, with `NL` = 64 (1b) or 48.
  In 1b mode `lane(ci) = ci mod 64`. In the multi-bit mode, with `l = ci mod 48`,
  it is `16·(l/12) + 4·((l mod 12)/3) + l mod 3`. Bit o of a word is the weight
  bit of output channel `12·g + o` (1 means +a in 1b mode).
