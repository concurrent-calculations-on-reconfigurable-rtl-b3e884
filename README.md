# Frame-similarity engine for video shot detection

A video is cut into shots by finding the frames where the picture content
jumps. This engine measures how alike each pair of consecutive frames is,
using only their luminance histograms, and gives one similarity value per
frame. A value near 1.0 means the two frames look alike. A clear drop marks a
cut.

For frames n-1 and n, with H the 64-level luminance histogram of a frame and
W its windowed form, W[b] = H[b-1] + H[b] + H[b+1]:

```
                         sum_b H[n-1][b] * W[n][b]
  f(n-1, n) = -----------------------------------------------------
              sqrt(sum_b H[n-1][b]*W[n-1][b]) * sqrt(sum_b H[n][b]*W[n][b])
```

The windowing makes the measure tolerate small shifts in brightness.

The engine does not read pixels. It reads the DC coefficients of compressed
frames, one 8-bit value per 8x8 block, which are 64 times fewer. A frame of
1600 DC coefficients is 400 words of 32 bits in an external static RAM.

The architecture follows the published Spartan-3 design *Concurrent
Calculations on Reconfigurable Logic Devices Applied to the Analysis of Video
Images*:

- block memories used as histogram counters;
- a six-wide pipelined windowed correlation;
- sequential shift-and-subtract square root and division.

It is written here as generic, synthesizable SystemVerilog. The section
"Departures and open points" lists where it differs from that design.

## The two halves and their timing

The work splits into two halves that run at the same time.

* **Histogram stage.** This is the bottleneck. The external memory delivers
  one 32-bit word (four coefficients) every two clock cycles, so a frame
  takes 800 cycles. The four coefficients of a word are counted in parallel.
  Consecutive frames are counted in alternate pages of the counter memories.
* **Back end.** This covers read-out, windowed correlation, square root,
  product and division. It runs once per frame, as soon as the frame's
  histogram is complete, while the next frame is already being counted in the
  other page. It needs 115 cycles and then sits idle for the rest of the
  800-cycle frame time.

So after the first two frames, one result comes out every 800 cycles, and it
arrives 115 cycles after the last word of its frame. The first frame of a
sequence has no predecessor and gives no result.

| step | cycles | unit |
|---|---|---|
| count one frame (400 words) | 800 | `hist_unit` |
| wait for the last counter update | 2 | `controller` |
| read out and clear the page into the intermediate store (32 pairs) | 32 + 2 | `hist_unit`, `wcorr_unit` |
| windowed correlation, both sums | 28 | `wcorr_unit` |
| square root of the self sum (starts 1 cycle before the correlation ends) | 16 | `sqrt_stage` / `isqrt` |
| product Q(n)·Q(n-1) | 1 | `sqrt_stage` |
| division | 32 (+1 to register) | `divider` |

## Histogram stage (`hist_unit`, `hist_bram`)

Each of the four coefficient lanes has its own counter memory, so the four
coefficients of a word never compete for a port. `hist_bram` is a dual-port
block memory with two views of the same storage:

* **Port A:** 1024 × 16 bits. The address is `{page[3:0], bin[5:0]}`, where
  the bin is the upper six bits of the coefficient.
* **Port B:** 512 × 32 bits. One read returns the counter pair
  `{H[2k+1], H[2k]}`.

A count is a read-modify-write on port A. The address is registered and read
in one cycle, and the old value plus one is written in the next. This is why
a word may come at most every second cycle, which matches the memory rate.
An assertion checks it. Because each update ends before the next word's read,
two words hitting the same bin in a row count correctly.

Read-out walks the 32 pairs of a page on port B. In the same cycle it writes
zeros, with read-first semantics, so the page is cleared while it is read and
is ready for a later frame. The four lanes' pairs are summed by two adder
levels: lanes 0+1 and 2+3, then registered, then the total. Pair k comes out
on `pair_valid` two cycles after it is addressed. Counting on one page and
reading out the other can overlap without conflict.

The counters are 16 bits wide. A frame must therefore have fewer than 65,536
coefficients. Under that limit no counter, windowed value or sum of products
can overflow.

## Intermediate store: eight neighbouring bins in one cycle (`wcorr_unit`, `wbram`)

The correlation handles six bins per cycle, E[6g]..E[6g+5]. For that it needs
the eight bins H[6g-1]..H[6g+6] at once. Two 512 × 32 dual-port memories give
four 32-bit ports, which is eight 16-bit values. However, eight values that
start at an odd bin do not line up with pairs stored as `{H[2k+1], H[2k]}`.

The store therefore realigns the histogram as it is written. Word k holds
`{H[2k], H[2k-1]}`, with H[-1] = 0. Group g then reads words 3g, 3g+1, 3g+2
and 3g+3:

* memory 4 reads words 3g and 3g+1 on its ports A and B;
* memory 5 reads words 3g+2 and 3g+3 on its ports A and B.

Both memories hold the same copy.

The realignment is done on the fly while the read-out arrives. For pair k:

* port A writes word k from the pair's low half, together with the previous
  pair's high half, which is kept in a register;
* port B writes word k+1 in advance, as `{0, H[2k+1]}`.

The last pair therefore leaves word 32 = `{0, H[63]}`, which supplies the zero
bin above the top of the histogram. Bins outside 0..63 are taken as zero. The
last group (g = 10) would produce E[64] and E[65], and their products are
forced to zero.

Each memory holds two pages, one for frame n and one for frame n-1. A page is
overwritten two frames later, long after its last use.

## Windowed correlation pipeline (`wcorr_unit`, `window_adder`)

Both sums share the same windowed values W[n]:

* S_prev = Σ H[n-1]·W[n] is the numerator;
* S_self = Σ H[n]·W[n] is needed for this frame's square root.

Each of the 11 window groups is read twice: first from the page of frame n,
then from the page of frame n-1. The first read forms W[n] and the centre
bins H[n]. On the second read the W register keeps its value and only the
centre bins advance to H[n-1]. This is the `w_load` input of `window_adder`.
So in consecutive cycles the same W meets H[n] and then H[n-1]. The result is
22 reads.

| stage | contents | width |
|---|---|---|
| P0 | memory outputs, 8 bins | 128 |
| P1 | 8 bins + 3 shared pair sums (h1+h2, h3+h4, h5+h6) | 176 |
| P2 | 6 windowed values (held on the second read) + 6 centre bins | 192 |
| P3 | 6 products, 16 × 16 → 32 bits | 192 |
| P4 | 3 sums | 96 |
| P5 | 2 sums | 64 |
| P6 | last addition into one of two 32-bit accumulators | 64 |

Each windowed value is a pair sum plus one neighbour. For example,
E[6g] = H[6g-1] + (H[6g] + H[6g+1]) and E[6g+1] = (H[6g] + H[6g+1]) + H[6g+2].
This takes nine adders instead of twelve.

A tag (valid, frame select, group, last) travels alongside the data. It steers
each sum into S_prev or S_self, and it tells P3 which products to mask.

`done` pulses 28 cycles after `start`. `self_done` pulses one cycle earlier,
when S_self is already final. The square root is started from `self_done`.

## Root, product and division (`sqrt_stage`, `isqrt`, `divider`)

The denominator's two roots belong to two frames, and the second root of one
pair is the first root of the next. So each frame needs only one new root.
`sqrt_stage` works as follows:

1. It takes √S_self with `isqrt`: the restoring method, two radicand bits per
   cycle, 16 cycles for 32 bits.
2. It keeps the new root as Q(n) and moves the old one to Q(n-1).
3. In the same cycle it registers Q(n)·Q(n-1) as the denominator.
4. It holds the numerator S_prev. `has_prev` shows that two roots exist.

`divider` gives floor(num · 2^31 / den) in 32 cycles by restoring shift and
subtract. The result is an unsigned fixed-point number with one integer bit
and 31 fraction bits, so 1.0 is `32'h8000_0000`. Integer roots can push the
ratio slightly above 1.0. Ratios of 2 or more, and a zero denominator,
saturate to all ones and set `similarity_ovf`.

## Control (`controller`)

The controller is two small state machines.

* **Front machine:** `WAIT` → `TRIGGER` → `ERASE0` → `ERASE1` → `FRAMES`.
  * On `pul_down` it waits in `TRIGGER` until the level input `clk100_90`
    is high.
  * It then clears both counter pages. This is two read-outs with the
    data discarded, 64 cycles.
  * It then starts the memory interface, which streams `num_frames` frames
    with no gap.
  * It returns to `WAIT` when the back end has finished the last frame.
* **Back machine:** `IDLE` → `STORE` → `WINDOWED` → `ROOT` → (`DIVIDE`) → `IDLE`.
  * Two cycles after a frame's last word it starts the read-out of that page
    into the store. The wait lets the last counter update land.
  * It starts the correlation in the cycle the last pair is stored, and
    starts the division in the cycle the denominator arrives.
  * It skips the division for the first frame of a sequence.

The back end must be idle when the next frame completes. With 800-cycle
frames against a 115-cycle back end this always holds, and an assertion
checks it.

## Interface of `similarity_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `pul_down` | in | 1 | start pulse, taken while `busy` is low |
| `clk100_90` | in | 1 | trigger level, sampled on `clk`; start-up waits until it is high (tie high if unused) |
| `num_frames` | in | 16 | frames in the sequence (≥ 1) |
| `busy` / `seq_done` | out | 1 | sequence running / pulse after the last frame |
| `sram_addr`, `sram_oe` | out | 18, 1 | external RAM address and read enable |
| `sram_data` | in | 32 | four coefficients, byte l = lane l |
| `result_valid` | out | 1 | pulse per frame pair (n-1, n) |
| `result_frame` | out | 16 | n, counted from 0 within the sequence |
| `similarity`, `similarity_ovf` | out | 32, 1 | quotient (1.31 fixed point) and saturation flag |
| `numerator`, `denominator` | out | 32 | S_prev and Q(n)·Q(n-1), valid with `result_valid` |

External RAM:

* Frame f occupies words f·400 .. f·400+399, and the address wraps at 2^18.
* The interface holds each address for two cycles and samples `sram_data` at
  the end of the second. An asynchronous 10 ns part therefore suits an
  internal clock of up to about 200 MHz.
* How coefficients get into the RAM, for example by a decoder, is outside
  this design.

Parameters: `WORDS_PER_FRAME` (default 400), `SRAM_ADDR_W` (18) and
`FRAME_W` (16). The bin count, counter width and lane count are constants in
`sim_pkg`.

## Departures and open points

* **Clocking.** Everything runs on one clock. The original design used a
  clock manager to run the internal logic at twice the memory rate, with a
  phase-shifted clock (`Clk100_90`) that its control machine synchronised to.
  That clock manager is not modelled here. Its effect, one memory word per two
  internal cycles, is kept. `clk100_90` is an ordinary input level that the
  `TRIGGER` state waits for.
* **Control machine.** The original control machine had 17 numbered states,
  of which only a few phases are known: wait, trigger, erase, first frame, a
  loop of addition, windowed, and the remainder of the frame loop. The
  controller here is this design's own, built around the same phases. Only
  the signal names of its first two states come from the original: `pul_down`
  for wait and `clk100_90` for trigger.
* **Back-end latency.** The back end takes 115 cycles, against 109 obtained
  by adding the stage counts. The extra cycles are the wait for the last
  counter update, the read-out pipeline and the division's result register.
  The 800-cycle frame period is unchanged.
* **Histogram boundaries and bin selection.** Bins outside 0..63 are taken as
  zero, and the bin is the upper six bits of the coefficient. The original
  design handled the boundary by writing some values twice through crossed
  buses. The exact scheme is not known, so the store layout above is this
  design's own.
* **Number formats.** The 1.31 fixed-point format of the result and its
  saturation are this design's choices.
* **Resources.** The original design used seven 18 × 18 multipliers, which
  matches the six here plus the root product. It used seven block memories,
  one more than the six here (four counter memories and two store memories).
  The use of the seventh is not known. Multipliers are written as `*`, and
  memories as arrays with synchronous read-first ports, so a synthesis tool
  can map them onto block RAM and DSP blocks.
* **Not modelled:** the external static RAM itself (a behavioural model,
  `tb/ext_sram.sv`, serves the testbenches), the clock manager, and the
  board-level pads. Also not built: the earlier windowing scheme that the
  original design replaced with the six-wide pipeline, and the variant with
  a 128-bit memory bus that it discusses as a way to count faster.

## Simulating

Every testbench checks itself and ends by printing a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_similarity_top \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/sim_pkg.sv tb/tb_similarity_top.sv
./obj_dir/Vtb_similarity_top
```

Replace the top module and file to run another testbench. The tests start
with random register contents, which you can force with
`+verilator+rand+reset+2`. The design resets them.

| testbench | what it shows |
|---|---|
| `tb_similarity_top` | default size, two sequences (7 and 3 frames). Checks every result, numerator and denominator against a reference model; the 800-cycle period; the 115-cycle back-end latency. Confirms that the trigger wait, erase, first frame, page alternation, overlap of counting with the back end, early root start and the held windowed values all occur |
| `tb_workloads` | a 25,000-frame sequence at the default size (about 20 M cycles, tens of seconds), and 65,532-coefficient frames of a single level, the worst case for the 32-bit sums |
| `tb_hist_unit`, `tb_hist_bram` | counting with repeated bins and gaps, overlapped read-out, clear-on-read, read-out timing |
| `tb_wcorr_unit`, `tb_wbram`, `tb_window_adder` | both sums against a reference, with heavy edge bins and a near-limit total; 28-cycle latency; W hold |
| `tb_isqrt`, `tb_sqrt_stage`, `tb_divider` | edge and random operands; 16, 17 and 32-cycle latencies; saturation |
| `tb_ext_mem_if`, `tb_controller` | word order, rate, page and last-word marks; sequencing against timing models of the units |

## Files

`rtl/`:

* `sim_pkg.sv`: shared constants and types.
* `similarity_top.sv`: the top level.
* `hist_unit.sv` and `hist_bram.sv`: the histogram stage.
* `wcorr_unit.sv`, `wbram.sv` and `window_adder.sv`: the store and the
  correlation.
* `sqrt_stage.sv`, `isqrt.sv` and `divider.sv`: root, product and division.
* `ext_mem_if.sv`: the external memory interface.
* `controller.sv`: the controller.

`tb/`:

* one `tb_<module>.sv` per module;
* `tb_workloads.sv`;
* `ext_sram.sv`, the memory model.
