# Carry-chain time-to-digital converter (coarse counter + tapped delay line)

This RTL measures when a digital "hit" edge arrives, to a resolution of
about 16 ps, against a 300 MHz clock. It follows a published FPGA design
(a 17 ps TDC in a 65 nm Virtex-5 device) that reaches this resolution with
ordinary logic:

* A **free running coarse counter** counts whole clock periods (3.33 ns).
* A **fine delay line**, built from the FPGA's dedicated carry chain, measures
  where the hit falls inside a period. The hit launches an edge at the head of
  the line, and the edge ripples along at roughly 16 ps per tap. On every
  clock the flip-flops next to the taps take a snapshot, so the number of
  taps the edge has passed says how long before that clock edge the hit came.
* **Digital calibration** turns the tap count into time. The chain's delay
  drifts with process, voltage and temperature, so the design measures how
  many taps one clock period spans while it runs (*automatic range
  adjustment*) and rescales the codes with a look-up table.

A hit is reported as the coarse count of the clock edge that sampled it and a
fine code:

    t_hit = coarse * T  -  raw * tau            (tau = T / range)
          = coarse * T  -  cal * T / 2^8         (calibrated code)

measured from the clock edge at which the counter was 0.

## Block diagram

```
          turbo                                  range_mean (taps per period)
            |                             +-----------------------------+
hit --> hit_filter --> carry_delay_line --> tap_sampler --> thermo_encoder --> ara
            ^          (416 taps)         (3 FF stages)        |  hit/code
            | line_rst                          ^ clr          v
      coarse_rst_ctrl ---------------------------+      interp_map | dither_map
      (counter, frames,  tag (coarse) --------------------------+  | cal_mode
       reset cycle)                                             v  v
                                                              tdc_fifo --> rd_*
```

| file | role |
|---|---|
| `rtl/tdc_pkg.sv` | constants, encoder option enum, FIFO word struct |
| `rtl/carry_delay_line.sv` | **behavioural model** of the carry-chain line (transport delays) |
| `rtl/hit_filter.sv` | flip-flop clocked by the hit; launches edges into the line |
| `rtl/tap_sampler.sv` | sampling flip-flops, three-stage synchronizer, downsampling |
| `rtl/coarse_rst_ctrl.sv` | coarse counter, 16-cycle frames, line reset, coarse tag alignment |
| `rtl/thermo_encoder.sv` | thermometer-to-binary, bubble suppression, hit detection |
| `rtl/ara.sv` | automatic range adjustment (taps per clock period, running mean) |
| `rtl/interp_map.sv` | linear interpolation table, rebuilt when the range changes |
| `rtl/dither_map.sv`, `rtl/lfsr.sv` | pseudorandom bin dithering from code-density results |
| `rtl/tdc_fifo.sv` | readout FIFO |
| `rtl/tdc_top.sv` | everything wired together |

## Normal mode and Turbo mode

The input `turbo` selects between the two modes.

**Normal mode.** Time is cut into frames of 16 clock cycles. In the last
cycle of each frame (counter low bits = 15) the controller holds the input
filter at 1. The line refills with ones, and the sampler's first stage loads
all ones. The first hit in the other 15 cycles loads a 0 into the filter, and
a falling edge ripples down the line. Later hits in the frame change nothing,
so a frame gives at most one measurement. A hit can be measured for 15
cycles of each frame (a 50 ns range), and there are 300 MHz / 16 =
18.75 M frames per second (about 20 MS/s).

**Turbo mode.** The filter toggles on every hit, launching rising and falling
edges alternately, and nothing is ever reset. A new hit can be measured in
every clock cycle (300 MS/s, range 16 cycles = 53.3 ns), and a frame can hold
several hits. The cost of Turbo mode: rising and falling edges need not travel
at the same speed in silicon (the published measurements show 2-3 taps of
mismatch), and the never-reset flip-flops make metastability likelier. The
model line here is symmetric.

## How the encoder reads the line (the subtle part)

The synchronized snapshot is a thermometer code: taps behind the edge hold
the new value, and taps ahead of it hold the old one. Two complications
drive the encoder's design.

1. **Which bits are "new"?** In Turbo mode the polarity changes with every
   hit, and up to two older edges may still be in the line. The encoder
   therefore compares each tap with `ref`, the value of tap 0 in the
   *previous* snapshot (the value the head of the line had at the previous
   clock). A tap differs from `ref` only if an edge launched since that clock
   has passed it. The search is limited to the first `window` taps, where
   `window` is the range-adjustment result (taps per clock period). An edge
   launched during the last period cannot have got further. The edge launched
   the period before is at least one period along, so it lies just beyond
   the window.
   *Consequence:* `window` must not exceed the true number of taps per period
   in Turbo mode. In normal mode, the encoder takes only one hit per frame
   (`one_per_frame`) for the same reason: the rest of an old line state inside
   an oversized window is not mistaken for a hit.
2. **Bubbles.** A tap caught exactly while its input changes can resolve
   either way. Because of clock skew between flip-flops, a tap ahead of the
   edge can also read "new" while one behind it reads "old". The default
   `BUBBLE_FIRST_BIT` method reports the furthest new tap (1-based), which
   ignores bubbles behind the edge. The `BUBBLE_COUNT` method counts new taps
   instead: cheaper, but each bubble costs one code.

A measurement N(x) (the code of snapshot x) is flagged `first` when
N(x-1) = 0. The range adjustment uses these flagged measurements.

## Calibration

**Automatic range adjustment (`ara`).** For each `first` measurement N(x),
the encoder also reports N(x+1), the same edge one clock later. It finds this
as the furthest tap in the *whole* 416-tap line that holds the edge's
polarity. If the edge has not yet run off the end (N(x+1) ≠ 416), then
N(x+1) − N(x) is the number of taps in one clock period. This works during
normal operation, with no test pattern. The result is averaged exponentially
(weight 1/16, starting at 208) and rounded. It feeds the encoder window and
the interpolation table. `range_stb`/`range_raw` expose every single range
sample, for a histogram.

**Linear interpolation (`interp_map`, `cal_mode = 0`).** A raw code c in
]0, N] maps to floor(c · 256 / N) in ]0, 256]. With 256 > N some output codes
never occur. The map sits in a RAM. Whenever N changes, the RAM is
recomputed: one 9-step serial division gives 256 / N, then one entry is
written per clock by adding the quotient and carrying the remainder (about
430 clocks). The RAM has two banks, so look-ups keep using the old table
until the new one is complete.

**Pseudorandom bin dithering (`dither_map`, `cal_mode = 1`).** Real taps are
not equally wide. A code density test measures their widths: random hits,
with code c counted n_c times, give a width ∝ n_c. The host writes the
cumulative widths as a boundary table: entry c = end of bin c on a 0..256
scale, with 8 fraction bits, entry 0 = 0. A look-up of code c picks a
uniformly random point inside [bnd[c−1], bnd[c]) using 8 bits of a 16-bit
LFSR. It outputs the slot containing that point, plus one. A bin that covers
a slot by 40 % lands there 40 % of the time. Each output slot thus receives
hits in proportion to the time it covers, even where the taps are uneven.

## Interface and timing (`tdc_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | 300 MHz clock (the "stop" reference), synchronous reset |
| `hit` | in | asynchronous hit; its rising edge is measured |
| `turbo` | in | 0 normal mode, 1 Turbo mode |
| `cal_mode` | in | 0 linear table, 1 dithering |
| `dt_we/dt_addr/dt_data` | in | write the dithering boundary table (17-bit entries) |
| `rd_en`, `rd_data`, `empty`, `overflow` | | FIFO read: show-ahead head word, pop with `rd_en`; `overflow` is sticky |
| `range_mean`, `range_stb`, `range_raw` | out | range adjustment result and raw samples |
| `interp_ready`, `interp_refill`, `interp_n` | out | linear table status |

FIFO word (`tdc_pkg::tdc_word_t`, 34 bits): `coarse` (16) is the counter
value right after the sampling clock edge, `raw` (9) is the taps travelled by
then, and `cal` (9) is the calibrated code. A word is written 5 clocks after
its sampling edge: 2 synchronizer stages, encoder, calibration, then the FIFO
write. After reset, wait for `interp_ready` (about 430 clocks) before trusting
`cal`.

## Parameters

| parameter | default | origin |
|---|---|---|
| `NTAPS` | 416 | own choice: two clock periods of 208 taps (104 four-tap slices) |
| `TAP_PS` | 16 | model only; the measured bin width is 16.1 ps |
| `UNEVEN` | 0 | model only; 1 = uneven in-slice tap delays (see below) |
| `DS` | 1 | downsampling; 1 = four taps per slice, as in the published design; 2 and 4 were evaluated too |
| `METHOD` | `BUBBLE_FIRST_BIT` | the method used for the published results |
| `FIFO_DEPTH` | 64 | own choice |
| frame length | 16 cycles | published design |
| synchronizer | 3 stages | published design |
| coarse counter | 16 bits | own choice |
| output scale 2^b | b = 8 | own choice (must exceed the taps per period) |
| range start value | 208 | measured range 207-208 taps at 20 °C |

## What is this design's own, and how far to trust it

Taken from the published design: the architecture (filter flip-flop, carry
chain line, sampling flip-flops, three-stage synchronizer, encoder, coarse
counter with reset control, FIFO), 16-cycle frames with one reset cycle, the
toggling Turbo filter, both bubble methods, the range-measurement rule, the
linear mapping via a recomputed RAM, and the dithering principle.

Own choices, not given by the source: the line length, code widths, FIFO
depth and word layout, the `ref`/window rule for finding new taps, one hit
per frame enforced in the encoder, the averaging weight, the division-free
table fill with double buffering, the dithering fixed-point format and LFSR,
and combining both modes in one build.

Departures and limits:

* `carry_delay_line` is a behavioural model and is not synthesizable. On an
  FPGA it is replaced by the vendor's carry primitives, placed by constraint
  in one column. By default all taps are 16 ps. With `UNEVEN = 1` the four
  taps of each slice get 20/9/21/14 ps. That is the shape of a simulated
  CARRY4 slice (carry-in to flip-flop delays of 33, 47, 81 and 104 ps),
  scaled to the measured 16 ps mean. The model still lacks the clock-skew
  step between slice groups, jitter and metastability. On the uniform line
  the simulated DNL is pure counting noise.
* The encoder searches 416 taps in one clock. That simulates correctly, but
  a 300 MHz FPGA build would need the search split into pipeline stages (the
  encoder is the speed-limiting block of this architecture).
* The source does not describe an error correction for the Turbo-mode
  rise/fall asymmetry, and there is none here.
* The analog supply-feedback alternative for PVT compensation, the clock
  synthesiser and global clock buffer, the USB link to the PC, and the SPAD
  photodetector used as a hit source are outside this RTL.

## Simulation

All files are SystemVerilog-2017 with `timeunit 1ps`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tdc_pkg.sv tb/tb_tdc_top.sv \
          --top-module tb_tdc_top -Mdir obj && ./obj/Vtb_tdc_top
```

Replace `tb_tdc_top` by any other testbench. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_tdc_top` | full design at default parameters. It runs normal-mode hits with exact expected coarse/raw/cal; hits in the reset cycle and second hits per frame (dropped); dithering; Turbo hits in consecutive cycles; FIFO overflow. Each mechanism is counted and must occur. |
| `tb_tdc_workloads` | four builds side by side. The default build runs a code density test (800 random hits, DNL/INL printed). Downsampling by 4 and by 2 are checked. A slow 26 ps/tap corner must re-range from 208 to 128 taps and rebuild its table. A fixed-delay repeatability run follows. About 1.5 min. |
| `tb_tdc_uneven_line` | code density test on the uneven line. The share of codes at each position in a slice must match the tap delays. A dithering table is built from the measured histogram and loaded. Dithered codes must stay inside the slots each bin covers and must reach almost all of the 256 slots, where linear mapping leaves about 48 unreachable. About 1 min. |
| `tb_thermo_encoder` | line patterns with bubbles, normal frames, Turbo edge trains, both bubble methods |
| `tb_ara`, `tb_interp_map`, `tb_dither_map` | calibration arithmetic, table rebuild latency, dithering statistics (the 20/40/40 % example) |
| `tb_carry_delay_line`, `tb_hit_filter`, `tb_tap_sampler`, `tb_coarse_rst_ctrl`, `tb_tdc_fifo` | the remaining blocks |

Hits in the testbenches are placed a known number of picoseconds before a
clock edge, which makes the expected fine code exact. In `tb_tdc_top` the
offset is T − 8 − 16·n for code n, which keeps each hit clear of tap
boundaries.
