# Max-log-MAP turbo decoder with branch metric normalization

This is a turbo decoder for a rate-1/3 turbo code built from two 8-state
recursive systematic convolutional codes (constraint length K = 4). Each of
its two soft-in soft-out (SISO) decoders runs the max-log-MAP algorithm with a
sliding window of 40 steps and decodes one trellis step per clock.

The design's main idea is about the recursion loop of the state metric units.
A conventional unit must keep its metrics from growing without bound, so it
subtracts a normalization term inside the loop. That puts a normalization
stage on the critical path, after the add, compare and select stages.

This design moves the normalization out of the loop and applies it to the
**branch** metrics instead, before they enter the loop. The state metric loop
is then only add, compare and select. A second change concerns the LLR unit:
it is split into two pipeline stages, which shortens its path as well.

## Contents

- [Branch metric normalization](#branch-metric-normalization)
- [The sliding-window SISO decoder](#the-sliding-window-siso-decoder)
- [LLR computation unit](#llr-computation-unit)
- [Turbo decoder top level](#turbo-decoder-top-level)
- [Numbers](#numbers)
- [Choices and departures](#choices-and-departures)
- [Files](#files)
- [Simulating](#simulating)
- [What to check before use](#what-to-check-before-use)

## Branch metric normalization

### The four branch metrics

Soft values are positive for bit 1. A trellis branch has an information bit u
and a parity bit p, and its branch metric is

    gamma(u,p) = (2u-1)(La + x) + (2p-1) y

where:

- x is the systematic symbol;
- y is the parity symbol;
- La is the a-priori value.

The usual factor 1/2 is dropped; it is put back in the LLR unit. Only four
values occur per step, and they are symmetric:

    g0 = La + x + y,  g1 = La + x - y
    gamma(1,1) = +g0, gamma(1,0) = +g1, gamma(0,0) = -g0, gamma(0,1) = -g1

### How the branch metric unit normalizes

The largest of the four metrics is m = max(|g0|, |g1|), and the smallest is -m.
The branch metric unit (`bmu_norm`) forms the absolute values, compares them
and selects m. It then does one of two things:

- **normalize by the maximum**: it subtracts m from all four metrics, so every
  branch metric is <= 0;
- **normalize by the minimum**: it adds m to all four metrics, so every branch
  metric is >= 0.

Adding the same constant to every branch of a step shifts every state metric
by the same amount. So the metric differences, and with them the decisions and
LLRs, do not change.

### How the state metric unit chooses the direction

The state metric unit (`smu_acs`) tells its branch metric unit which
normalization to use:

- if every state metric is above zero, it asks for the maximum, which pulls
  the metrics down;
- if every state metric is below zero, it asks for the minimum, which pushes
  them up;
- if the signs are mixed, it keeps its previous choice.

The metrics therefore drift towards zero and stay in a band around it. With
4-bit symbols and 5-bit a-priori values, |gamma| <= 32. The spread between the
state metrics of an 8-state K = 4 code is limited, so the metrics fit in 10
bits. An assertion in `smu_acs` checks every metric against the 10-bit range,
and no test has tripped it.

### Timing of the loop

The decision is made from the registered metrics. The branch metrics are
registered between the two units (`metric_unit`). So a choice acts on the
metrics two steps later. This costs nothing in accuracy, since any choice is
exact. It only widens the band the metrics move in.

The loop that has to close in one clock is: 10-bit add, compare, select. The
sign test and the branch metric arithmetic are outside it.

## The sliding-window SISO decoder

`siso_decoder` cuts a frame into windows of W = 40 steps. Time is cut into
slots of W cycles. In every slot five stages each work on a different window:

| stage | unit | what it does with window n |
|---|---|---|
| 0 | LIFO 1 | stores it |
| 1 | gamma1/beta1 ("dummy" backward unit) | runs backwards over it, from equal metrics, only to get a good starting point for window n-1 |
| 1 | FIFO 1, LIFO 2 | FIFO 1 keeps the reversed window; LIFO 2 turns it back into natural order |
| 2 | gamma/alpha (forward unit) | runs forwards over it; the metrics go into LIFO 3 |
| 3 | gamma2/beta2 (backward unit) + LCU | FIFO 2 supplies the reversed window again; beta2 starts from beta1's result on window n+1 and runs backwards; the LCU combines alpha (from LIFO 3, reversed), beta2 and gamma2 |
| 4 | LIFO 4 | turns the LLRs, produced last-to-first, back into natural order |

In cycles, beta1 works on window n+1 during the same slot in which alpha works
on window n. At the start of the next slot, beta1's final metrics become
beta2's start for window n. Beta2 of the last window of a frame starts from
equal metrics, because the code is not terminated. Alpha starts each frame in
state 0.

### Buffers

Every LIFO is a single W-entry memory. Its address runs up in one slot and
down in the next (read before write at the same address). So it reverses each
window without double buffering. A FIFO is a W-entry circular memory, which
delays its data by exactly one slot.

`siso_ctrl` keeps three things:

- the position in the slot (idx);
- the slot parity (dir);
- a tag for each stage, which says whether the stage holds a valid window and
  whether that window is the first or last of its frame.

### Latency and throughput

Step j of a frame leaves 4W + 3 = 163 cycles after it entered:

- four slots;
- one branch metric register;
- two LCU pipeline stages.

Throughput is one step per clock, and frames can follow each other back to
back.

### Extrinsic output

The extrinsic output is le = LLR - La - x, saturated to 5 bits. It is the
a-priori input of the other decoder.

## LLR computation unit

The LLR is the difference of two maxima over the 8 trellis branches, one for
u = 1 and one for u = 0:

    L1 = max over branches with u=1 of alpha(s) + gamma(s,s') + beta(s')
    LLR = (L1 - L0) / 2

`lcu_tree` computes one such maximum in two stages.

### Stage 1

The four branches of one value of u are in two pairs, and both branches of a
pair share the same branch metric. The grouping uses the parity bit, so each
pair holds two branches with equal (u, p). So the pair can be compared on
alpha + beta alone. The shared gamma is added after the comparison, to both
sums, and the selector picks the winner. This gives four registered values
LV0..LV3.

### Stage 2

Six comparators compare every pair of LV0..LV3. A single 4-way selector takes
the value that beats all the others.

### Output

`lcu` runs two trees, for L1 and L0. It subtracts them and halves the result.
The halving is exact, because every path metric difference in this code is
even. It then saturates the LLR to 10 bits and registers it.

The internal sums are 12 bits wide, so they cannot wrap. The unit's latency is
two cycles.

## Turbo decoder top level

`turbo_decoder` holds:

- the received frame: memories for x, y1 and y2;
- one extrinsic memory;
- one memory for the final LLRs;
- two `siso_decoder`s;
- two `block_interleaver` address generators.

### Half-iterations

The two decoders run one after the other. Each half-iteration needs every
extrinsic value of the one before it.

- **SISO 1** reads x, y1 and the extrinsic memory in natural order. It writes
  its extrinsic values back in natural order. The a-priori values are zero in
  the first iteration.
- **SISO 2** reads x and the extrinsic values at interleaved addresses, and y2
  in order. It writes its extrinsic values back at the same interleaved
  addresses, which is the deinterleaver.

One memory serves both directions, because each half-iteration reads an
address before it rewrites it.

### Iterations and padding

After 8 iterations the LLRs of SISO 2 give the decisions. The interleaver is a
32 x 32 block interleaver: it writes by rows and reads by columns, so
pi(j) = (j mod 32)*32 + j div 32.

1024 is not a multiple of 40, so every half-iteration feeds 1040 steps. The
last 16 steps have zero symbols and zero a-priori values.

### Protocol

1. **Load.** While `in_ready` is high, each cycle with `in_valid` stores one
   (x, y1, y2) triple. After 1024 triples, decoding starts.
2. **Decode.** 16 half-iterations of 1040 + 163 = 1203 cycles each, which is
   19248 cycles.
3. **Output.** `out_valid` is high for 1024 cycles, with `out_bit`, `out_llr`
   and `out_last` on the final bit.

A frame therefore takes 21296 cycles. At 1/2.85 ns, about 350 MHz, that would
be about 16.9 Mbit/s; at 50 MHz it is 2.4 Mbit/s.

## Numbers

| item | value |
|---|---|
| constraint length, states | K = 4, 8 |
| window length | 40 |
| received symbols | signed 4 bit |
| branch and state metrics | signed 10 bit |
| a-priori / extrinsic | signed 5 bit (saturated) |
| LLR | signed 10 bit (saturated) |
| LCU internal | 12 bit |
| frame / interleaver | 1024 bits, 32 x 32 block |
| iterations | 8, fixed |
| SISO latency | 4W + 3 = 163 cycles |
| alpha start | state 0: 0, others: -384 |

All of these are parameters (`W_P`, `ROWS_P`, `COLS_P`, `ITER_P`, `SYM_W_P`,
`LA_W_P`, `SM_W_P`, `LLR_W_P`). Their defaults are in `rtl/turbo_pkg.sv`.

## Choices and departures

### Taken from the design

These follow the design:

- the branch metric normalization and its sign rule;
- the two-stage LLR unit;
- the window schedule and the buffer arrangement;
- window length 40, K = 4, 4-bit symbols and 10-bit internal words;
- the 1024-bit block interleaver;
- 8 iterations.

### This implementation's own choices

- **Code.** The constituent code is the UMTS code: feedback 1+D^2+D^3,
  feed-forward 1+D+D^3, octal 13/15. Only K = 4 is given.
- **Mixed signs.** When the state metric signs are mixed, the normalization
  direction is kept.
- **Word lengths.** The a-priori/extrinsic width is 5 bits, the LLR width 10
  bits and the LCU's internal width 12 bits.
- **Halving in the LCU.** The 1/2 of the branch metric is moved into the LCU.
- **Trellis ends.** There is no trellis termination. The last window's beta
  starts from equal metrics, and frames are padded to whole windows with zero
  symbols.
- **Forward start.** Alpha starts in state 0, with a finite penalty of -384 on
  the other states.
- **Buffers.** The LIFOs are single memories with alternating address
  direction, and the FIFO depths follow from the schedule.
- **Interfaces.** The handshakes (in_valid/in_sof/in_eof/in_ready and the
  frame load and output protocol) are this design's own. So are the
  sequential half-iteration control and the fixed iteration count: there is no
  early stop.
- **Reset.** The reset is asynchronous and active low. The memories are not
  reset.

### Not built

- The conventional comparison architectures: state metric normalization, and
  the three-stage LCU with and without pipelining.
- Anything process-specific: timing, area, power.

## Files

| file | what it is |
|---|---|
| `rtl/turbo_pkg.sv` | constants, window tag type, trellis functions |
| `rtl/bmu_norm.sv` | branch metric unit with normalization |
| `rtl/smu_acs.sv` | add-compare-select state metric unit, forward or backward |
| `rtl/metric_unit.sv` | BMU + register + SMU, with the normalization feedback |
| `rtl/lcu_tree.sv` | one two-stage maximum tree of the LCU |
| `rtl/lcu.sv` | LLR computation unit |
| `rtl/lifo_buf.sv`, `rtl/fifo_buf.sv` | window buffers |
| `rtl/siso_ctrl.sv` | window schedule |
| `rtl/siso_decoder.sv` | sliding-window SISO decoder |
| `rtl/block_interleaver.sv` | interleaver address generator |
| `rtl/turbo_decoder.sv` | top level |
| `tb/turbo_ref_pkg.sv` | reference models |
| `tb/tb_*.sv` | one self-checking testbench per module |

The reference models in `tb/turbo_ref_pkg.sv` are:

- a windowed max-log-MAP SISO model without normalization, using plain
  integers;
- the RSC encoder;
- the interleaver function;
- a Gaussian channel.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops; each
has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
      --top-module tb_turbo_decoder -y rtl -y tb +libext+.sv \
      rtl/turbo_pkg.sv tb/turbo_ref_pkg.sv tb/tb_turbo_decoder.sv -o sim
    ./obj_dir/sim

Replace `tb_turbo_decoder` with any other testbench.

### The end-to-end test

`tb_turbo_decoder` runs the top level at its full default size. It runs three
1024-bit frames: one noiseless and two at noise sigma 0.95 and 0.84. It checks:

- every output LLR, bit for bit, against a software turbo decoder with the
  same arithmetic;
- the decisions against the source bits;
- the decoding time.

It counts these events and fails if one never happens:

- normalization direction changes;
- forward frame starts;
- beta1-to-beta2 handoffs;
- last-window starts;
- padded steps;
- saturated extrinsic values;
- half-iterations.

Building takes about half a minute and the run under a second. The noisy
frames have about 150 channel bit errors, and every one is corrected.

### The SISO test

`tb_siso_decoder` checks, bit for bit against the reference model:

- frames of 1 to 5 windows, back to back and after idle gaps;
- the 163-cycle latency.

### The bit error rate run

`tb_turbo_ber` measures bit error rates. It feeds the same noisy frames to
four top-level instances, built with 1, 2, 4 and 8 iterations. It runs 32
frames at each of three points: 1.0, 1.5 and 2.0 dB Eb/N0 (rate 1/3, BPSK,
AWGN).

It checks every LLR, bit for bit, against the reference. It also checks that
more iterations and more Eb/N0 do not make things worse. The run takes about
15 seconds.

One run gave these bit error rates:

| Eb/N0 | 1 iteration | 2 iterations | 4 iterations | 8 iterations |
|---|---|---|---|---|
| 1.0 dB | 9.5e-2 | 5.1e-2 | 1.6e-2 | 4.4e-3 |
| 1.5 dB | 4.4e-2 | 7.2e-3 | 5.8e-4 | 4.6e-4 |
| 2.0 dB | 1.7e-2 | 2.7e-4 | 0 | 0 |

Each point has only 32768 bits, so rates below about 1e-4 are not resolved.

## What to check before use

- **Metric range.** The 10-bit range is shown by assertion and simulation, not
  by proof. Wider symbols or a-priori values need `SM_W_P` raised, and the
  assertion in `smu_acs` will say so.
- **Frame length.** Frame lengths must be a whole number of windows at the
  SISO interface. The top level pads to this itself.
- **Memories.** The frame memories are plain arrays with combinational reads.
  For an SRAM with a registered read, the read addresses must move one cycle
  earlier.
- **Throughput.** Only one SISO decoder is active at a time. A design that
  needs more throughput would decode two frames in turns.
