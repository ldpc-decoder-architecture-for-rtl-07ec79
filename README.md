# Fully pipelined LDPC decoder for IEEE 802.11ad (672-bit codes)

The 60 GHz single-carrier modes of IEEE 802.11ad protect data with four
quasi-cyclic LDPC codes (rates 1/2, 5/8, 3/4 and 13/16), all 672 bits long and
all built from 42x42 cyclically shifted identity blocks over a 16-column base
matrix. At 1.5-3 Gb/s a memory-based decoder needs many tiny, inefficient
memory banks, so this decoder keeps every message in registers and pipelines
the whole datapath:

* all 672 variable nodes (VNs) exist in hardware, in 16 **variable node groups
  (VNGs)** of 42, one VNG per base-matrix column;
* the 42 check nodes (CNs) are **time-multiplexed** over the base-matrix
  layers (rows), one layer use per clock cycle, called a **sub-iteration**;
* the CNs are **granular**: a CN processes one layer of up to 16 edges, or two
  layers that share no column, up to 8 edges each, in the top and bottom halves
  of its compare tree. The rate-1/2 code (8 layers) and the rate-5/8 code
  (6 layers) so need only four sub-iterations per iteration, like rate 3/4;
  rate 13/16 needs three;
* **two independent frames** are decoded at once. The VNs accumulate one
  frame's check messages while sending out the other frame's variable
  messages, which fills the pipeline gap between "all C2V messages of an
  iteration have arrived" and "the next iteration's V2C messages can leave".

The algorithm is offset min-sum with a flooding schedule and 5-bit messages.
The VNs do both marginalizations (removing a node's own contribution), so a CN
only has to find the two smallest input magnitudes and the sign product.

## How a code is given to the hardware

The decoder holds no matrix. Its `cfg` input (`ldpc_pkg::codecfg_t`) describes
one code as `nsub` (3 or 4) sub-iterations. For every sub-iteration `s`:

| field | meaning |
|---|---|
| `dual` | 1: two non-overlapping layers (top and bottom half of each CN); 0: one layer |
| `active[g]` | VNG `g` has an edge in this sub-iteration (at most one, since the layers are disjoint) |
| `shift[g]` | shift 0..41 of that edge's submatrix |
| `post_bot[g]` | dual mode: VNG `g` belongs to the second (bottom) layer |
| `slot_valid[i]`, `slot_sel[i]` | dual mode: CN input slot `i` (0-7 top, 8-15 bottom) is fed by VNG `slot_sel[i]` |

In single mode slot `i` is always VNG `i`, so `slot_*` are ignored. A
submatrix with shift `s` connects check row `r` of the layer to variable
`(r + s) mod 42` of the VNG. The testbench `tb_ldpc_decoder` contains a
function, `build_cfg`, that fills this structure from a base matrix and a list
of layer pairs; use it as the reference for writing descriptions.
`cfg` and `max_iter` must not change while frames are in flight.

## The five pipeline stages

Every stage ends in a register; one sub-iteration enters per cycle.

| stage | work |
|---|---|
| 1 Prepare V2C | each VN forms V2C = accumulator - its stored C2V of this sub-iteration from the previous iteration; a front barrel shifter per VNG applies the submatrix shift |
| 2 Route to CN | pre-routers put VNG messages on CN input slots |
| 3 Compute C2V | each CN: first/second minimum, sign XOR, hard-decision XOR (syndrome) |
| 4 Route + marginalize | post-routers pick top/bottom/full result per VNG, back barrel shifters undo the shift, each VN picks min1 or min2 and fixes the sign |
| 5 Accumulate | VN adds the C2V to its accumulator (to the prior for the first C2V of an iteration) |

### Schedule of the two frames

A phase counter repeats a fixed period. With four sub-iterations the period is
8: frame slot 0 issues sub-iterations 0-3 in phases 0-3, slot 1 in phases 4-7.
A V2C issued at cycle *t* is accumulated at *t*+4, so slot 0's last
accumulation (cycle 7) finishes exactly before its next issue (cycle 8): no
bubble. With three sub-iterations the period is 7 (3 + 3 + one idle cycle),
the one unavoidable bubble.

Because accumulation of the same sub-iteration is always one period back, the
stored C2V values live in a free-running four-deep shift register in each VN:
tap 3 is the value needed with period 8, tap 2 with period 7. The V2C sent out
is held three cycles in a second short shift register so the returning minimum
can be compared with it.

### Frame entry, termination and exit

The cycle before a slot's window (phase 7 for slot 0 and phase 3 for slot 1,
or phases 6 and 2 with three sub-iterations) is that slot's **turn-over
cycle**. The pass that has just ended also XORed, in every CN, the hard
decisions the VNs held when it started. If every check was satisfied, or
`max_iter` iterations are done, the frame is retired: `out_valid` is high for
that cycle, with `out_hd` (672 hard decisions, `[VNG][position]`, bit
`42*VNG + position`), `out_iter` (iterations behind those decisions),
`out_ok` (all checks satisfied) and `out_frame` (the slot). In the same cycle
the slot can take a new frame: `in_ready` is high only then, and a frame
offered with `in_valid` (all 672 priors in parallel on `in_prior`) is loaded;
`load_slot` tells which slot it went to. Frames can finish out of order, so
keep the slot-to-frame mapping from `load_slot`. A frame decoded in *I*
iterations leaves `(I + 1) * period` cycles after it was taken: the extra pass
is the one whose syndrome confirms the result.

Priors are 5-bit two's complement LLRs in [-15, 15]; positive means bit 0.

## Inside the blocks

**Variable node (`ldpc_vn`).** Two prior and two accumulator registers (one per
frame slot), 8-bit two's complement with saturation. V2C is saturated to ±15
and converted to sign-magnitude (1 + 4 bits). On the way back the VN compares
the CN's first minimum with the magnitude it sent; if equal it was its own
message, so the second minimum is used. The sign is the sign product XOR the
sign sent. The offset `BETA` (default 1) is subtracted, floored at zero. A
load takes priority over an accumulation of the same slot.

**Check node (`ldpc_cn`).** Eight pair sorters, then compare-select levels of
4, 2 and 1 blocks; each compare-select keeps the two smallest of two sorted
pairs. The two blocks of the third level give the half results, the last one
the full result. Sign and syndrome XOR trees are split the same way.
Unconnected inputs count as magnitude 15, positive, hard decision 0.

**Barrel shifter (`ldpc_barrel_shifter`).** 42-way rotator built from six
stages rotating by 2^b mod 42; `INVERSE=1` rotates the other way for the back
shifters.

**Routers (`ldpc_pre_router`, `ldpc_post_router`).** One of each per CN. The
pre-router slot is a full 16-to-1 multiplexer, so any code description works;
the post-router is a 2-to-1 choice per VNG plus the single/dual selection.

**Controller (`ldpc_ctrl`).** Phase counter, per-slot busy flag and iteration
count, per-slot syndrome flag, input handshake and retirement. Assertions check
that an offered frame is held until taken and that `nsub` is 3 or 4.

## Sizes and throughput

| | value |
|---|---|
| VNs / CNs | 672 / 42 |
| message | 5 bits sign-magnitude |
| accumulator | 8 bits |
| sub-iterations | 4 (rates 1/2, 5/8, 3/4), 3 (rate 13/16) |
| cycles per iteration | 8 (two frames), 7 with three sub-iterations |
| coded bits per cycle | 1344 / (8 (I + 1)) |

At 150 MHz, 3.08 Gb/s coded needs 20.5 bits per cycle, i.e. at most about
8.2 passes (7.2 iterations plus the confirming pass) on average. The end-to-end
testbench, rate-1/2 code, LLR mean 4, averaged about 6.5 iterations and
measured 20.7 bits per cycle, just above that. The original design was synthesized for a
65 nm low-power process at 200 MHz and reported 1.3 mm², 42 mW at 1.54 Gb/s
(75 MHz) and 84 mW at 3.08 Gb/s (150 MHz); nothing here reproduces those
figures.

## Where this RTL makes its own choices

The overall organization follows the published architecture: VNG grouping,
front and back shifters per VNG, pre- and post-routers, granular 16/2x8-input
CNs with the sort + compare-select tree, a VN with two-frame prior and
accumulator registers and both marginalizations, the five stages and the
two-frame schedule with its bubble. These details are this implementation's:

* **code description as an input** instead of stored matrices; the testbench
  carries the rate-1/2 base matrix, and the other three standard matrices
  must be supplied by the user;
* **full 16-to-1 pre-router multiplexers** rather than a minimal per-code mux
  set;
* **early termination by syndrome**: the hard decision rides with each V2C and
  the CNs XOR it, which costs one confirming pass per frame;
* accumulator width (8), offset `BETA = 1`, saturation points, the shift
  direction convention, asynchronous active-low reset, the valid/ready frame
  interface and the parallel 672-prior load;
* the VN holds its sent V2C three cycles (its V2C is registered after the
  front shifter, outside the VN).

## Files

| file | content |
|---|---|
| `rtl/ldpc_pkg.sv` | constants and types (`v2c_t`, `cnres_t`, `subcfg_t`, `codecfg_t`, `pctl_t`) |
| `rtl/ldpc_vn.sv` | variable node |
| `rtl/ldpc_cn.sv` | granular check node |
| `rtl/ldpc_barrel_shifter.sv` | cyclic shifter |
| `rtl/ldpc_pre_router.sv`, `rtl/ldpc_post_router.sv` | routers |
| `rtl/ldpc_ctrl.sv` | schedule and termination |
| `rtl/ldpc_decoder.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -j 4 \
    rtl/ldpc_pkg.sv rtl/ldpc_vn.sv rtl/ldpc_cn.sv rtl/ldpc_barrel_shifter.sv \
    rtl/ldpc_pre_router.sv rtl/ldpc_post_router.sv rtl/ldpc_ctrl.sv \
    rtl/ldpc_decoder.sv tb/tb_ldpc_decoder.sv --top-module tb_ldpc_decoder -o sim
./obj_dir/sim
```

Build time is under a minute; the run takes well under a second. Swap in
another `tb/tb_ldpc_*.sv` and its `--top-module` for the unit tests.

`tb_ldpc_decoder` runs the decoder at its full size on three codes: the
rate-1/2 matrix as four layer pairs, its first six layers as two pairs plus two
single layers, and a synthetic three-layer code in single mode (period 7). It
draws random codewords (by solving the parity checks over GF(2)), sends them
through a Gaussian channel quantized to 5 bits, and adds noise-only frames
(stopped by `max_iter` = 15) and noiseless frames (retired after zero
iterations). An independent flooding min-sum model written directly over the
base matrix, with the same quantization, predicts every frame's 672
decisions, iteration count and parity flag; with the rate-1/2 code every
frame that ends with all checks satisfied must also equal the codeword sent.
The two derived test codes are weak (the six-layer one leaves base columns 14
and 15 unchecked), so there a decoded frame may be a different valid
codeword. The test also checks each frame's latency and that dual and single
sub-iterations, bubbles, both slots busy, early termination, the iteration
limit and out-of-order exit all occurred. The unit testbenches compare each block with a direct model:
random CN inputs against a linear scan, every shift amount for the shifters,
random routing descriptions, a cycle-accurate model of one VN across both
schedules with reloads, and a model of the slot schedule for the controller.

## Limits

* The testbench's rate-1/2 base matrix should be compared entry by entry with
  the IEEE 802.11ad standard before it is relied on. The rate-5/8, 3/4 and 13/16 matrices are not included; the
  hardware supports their shape (checked for sizes, not with the real
  matrices).
* The derived six-layer and three-layer codes in the testbench stand in for
  the rate-5/8 and 13/16 codes only in shape, not in error-correcting power.
* No timing or power closure was attempted.
