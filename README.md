# Double-chain tapped-delay-line TDC for MRPC time-of-flight readout

This is the FPGA logic of a time digitization module for Multi-gap Resistive
Plate Chamber (MRPC) time-of-flight detectors. Its target is a time precision
of about 10 ps RMS. A front-end discriminator (outside this RTL) turns each
detector signal into a digital hit pulse. The FPGA stamps the pulse's leading
edge with a time. A stamp has two parts:

- **Coarse time**: a counter of the 320 MHz main clock (3125 ps per count).
- **Fine time**: where the edge is inside the clock period. A carry chain of
  an Artix-7 FPGA is used as a tapped delay line (TDL). The hit ripples up
  the chain. On each main clock edge a row of flip-flops takes a snapshot of
  all taps. The number of taps the edge had passed gives the time from the
  hit to that clock edge, in steps of one tap (about 17.35 ps).

Every channel has **two** such delay lines that see the same hit. The channel
reports the mean of their two measurements. Averaging two lines with
independent bin errors improves precision by about √2. The prototype this
RTL is modelled on reports 10.0 ps RMS for one line and 7.1 ps RMS for two.

## Sizing the delay line against the clock

Each line is 50 CARRY-4 primitives long: 200 taps, 4 per CARRY-4. On the
prototype, a hit edge took about 69.4 ps to cross one CARRY-4, so the full
line spans 3470 ps. One period of the 320 MHz clock is 3125 ps, about 45
CARRY-4s or 180 taps. So the edge never runs off the end of the line before
the next clock edge samples it.

50 CARRY-4s is also the longest chain that stays within one Artix-7 clock
region when its first CARRY-4 sits at the bottom of the region. A chain that
crosses into another region gets one "ultra-wide" bin at the crossing, which
hurts precision. Placement is a floorplanning constraint and is not part of
this RTL.

## The time stamp

The readout word is `tdc_pkg::tdc_word_t`, 32 bits:

| bits  | field      | meaning |
|-------|------------|---------|
| 31:28 | `channel`  | TDC channel number |
| 27    | `single`   | only one of the two lines saw this hit |
| 26:10 | `coarse`   | number of the clock edge the result refers to |
| 9:0   | `fine_sum` | the two lines' tap counts added together (half-tap units) |

The hit time, counted from the first clock edge after reset, is

    t = coarse * T_clk - fine_sum * T_tap / 2        (T_clk = 3125 ps, T_tap ≈ 17.35 ps)

`fine_sum` counts *backwards* from the clock edge named by `coarse`: a hit
that came just before the edge has a small `fine_sum`. The counter is 17 bits
wide and wraps every 409.6 µs, so the host has to extend it. Converting with a
single `T_tap` assumes every bin is the same width. Real carry chains have
very uneven bins. For the best precision the host should replace
`code * T_tap` with a bin-by-bin calibration table built from a code-density
test. This RTL sends raw codes so that such a table can be applied later.

### How the two lines are paired

Both lines are sampled by the same clock edge, so they normally report in
the same clock and `fine_sum = code_a + code_b`. The lines have slightly
different delays, though, for example from their placement. A hit that
arrives within a few picoseconds of a clock edge can be caught by one line
at that edge and by the other only at the next. The averaging stage holds the
first report for one clock. It then pairs it with the second report, refers
both to the later edge, and adds one clock period's worth of taps to the
earlier line's code:

    fine_sum = code_early + code_late + TAPS_PER_CLK     (TAPS_PER_CLK = 180 = 3125 / 17.35)

If the second line does not report within that clock, the first report is
sent alone, with `fine_sum = 2 * code` and `single = 1`. This can happen when
a very short dropout on the input is seen by one line only. The
`skewed_pair` and `single_sent` outputs pulse once for each such event.

## Data path and timing

```
hit ─┬─> tdl_carry_chain A ─> tdl_sample_reg ─> therm_encoder ─┐
     │                              └─(tap 0)─> pulse_detector ─┤ single_tdl A
     └─> tdl_carry_chain B ─> ...same...                        ┤ single_tdl B
coarse_counter ─────────────────────────────────────────────────┤
                                                      averaging ─> data_packaging ─> FIFO read port
```

The behaviour of each block:

- **`tdl_sample_reg`**: captures all 200 taps on the edge, called edge *k*
  below. The coarse count of that edge is captured alongside.
- **`pulse_detector`**: reports a new hit when the captured tap 0 is 1 at
  edge *k* and was 0 at edge *k−1*. A hit is therefore reported once,
  however long the pulse lasts. A line can report at most every other clock.
- **`therm_encoder`**: counts the ones in the captured word. On a clean
  thermometer code this equals the transition position. It also tolerates
  the "bubbles" that carry chains produce near the transition.
- Edge *k+1*: each line presents `{valid, code, coarse}`.
- Edge *k+2*: the channel's averaged result (a same-clock pair). A skewed
  pair or a single result takes one clock more.
- **`data_packaging`**: gives each channel a one-word holding register and
  moves one held result per clock into a 512-word FIFO, scanning the channels
  round-robin. A result is readable two clocks after it was presented. A
  channel produces at most one result per two clocks, so two channels never
  outrun the scan. A result is lost only if the FIFO stays full until the
  channel's next result overwrites the held one. `drop_count` counts such
  losses and saturates at 65535.
- The FIFO read port is first-word fall-through: `rd_word` is valid while
  `rd_empty` is low, and `rd_en` pops it.

Reset (`rst`) is synchronous and active high. It clears the counters, the
sample registers and the FIFO. The coarse count is 0 until the first edge
after reset is released.

## Files

`rtl/`:

| file | what it is |
|------|-----------|
| `tdc_pkg.sv` | shared constants (line length, tap delay, clock period, widths) and the `tdc_hit_t` / `tdc_word_t` structs |
| `readout_top.sv` | top: `NCH` channels and the packaging stage |
| `double_tdl_tdc.sv` | one channel: two lines, coarse counter, averaging |
| `single_tdl.sv` | one line: chain, DFF array, encoder, pulse detector |
| `tdl_carry_chain.sv` | **behavioural model** of the CARRY-4 delay line |
| `tdl_sample_reg.sv` | tap flip-flops |
| `therm_encoder.sv` | ones counter |
| `pulse_detector.sv` | new-hit detection on tap 0 |
| `coarse_counter.sv` | free-running clock counter |
| `averaging.sv` | pairing and summing of the two lines |
| `data_packaging.sv` | word formatting, channel arbitration, drop counter |
| `sync_fifo.sv` | single-clock FIFO used by the packaging stage |

`tb/` holds one self-checking testbench per block (`tb_<block>.sv`).
`tb_readout_top.sv` is the end-to-end test. `tb_readout_full.sv` runs the top
at its default configuration. `readout_ref_pkg.sv` is a reference model
shared by the last two: from the recorded hit waveforms it works out what
every tap holds at every clock edge, and so which words must come out.

## What is synthesizable

Everything except `tdl_carry_chain` is plain synthesizable SystemVerilog.
`tdl_carry_chain` models the delay of the carry chain with timing controls.
Each input edge is walked up the 200 taps by its own thread, so short pulses
and gaps survive as they would in silicon. For an FPGA build, replace it with
50 cascaded `CARRY4` primitives per line:

- the hit enters the carry input of the first CARRY4 (`CIN`, or `CYINIT` when it comes from general routing), with `S = 4'b1111` and `DI = 0`;
- `CO[3:0]` of each CARRY4 gives four taps;
- placement constraints put the first CARRY4 at the bottom of a clock region.

The tap flip-flops should be the slice flip-flops next to each CARRY4. As
long as the model stays in `single_tdl`, synthesis tools that reject timing
controls will refuse the hierarchy above it.

## Where this design makes its own choices

The prototype's description gives the structure and the sizes: two lines per
channel, 50 CARRY-4s per line, 69.4 ps per CARRY-4, a 320 MHz main clock, a
coarse counter, an encoder, a pulse detector, averaging and a data packaging
stage. It does not give their internals. The following are this design's
choices:

- **Encoder**: ones counting, chosen for its tolerance of bubbles.
- **Pulse detector**: a 0→1 step of the captured first tap.
- **Averaging**:
  - works as a sum of raw tap codes, with no calibration table;
  - handles a pair sampled one edge apart with a fixed 180-tap correction;
  - sends a result from one line alone, flagged, when its partner is missing.
- **Widths and sizes**:
  - coarse counter: 17 bits;
  - word layout: as in the table above;
  - channel count: 2, the number tested on the prototype; the full board's
    count is not given;
  - FIFO depth: 512.
- **Tap delay**: the same for all four outputs of a CARRY-4 (69.4 ps / 4).
  The real bins are far from equal: their widths vary between roughly 0 and
  3 LSB. `ALT_PS` and the per-line `*_TAP_PS` / `*_ENTRY_PS` parameters let a
  simulation make the bins and the two lines differ.

## Not in this RTL

The following parts of the readout chain have no logic here:

- the NINO amplifier/discriminator on the front-end board;
- the 5 m coaxial cable and the LVDS repeater;
- the CPLD that implements the PXI crate interface;
- the crate's single board computer;
- the source of the 320 MHz clock.

`hit[]` and the FIFO read port are the points where they connect.

## Simulating

All testbenches are self-checking. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog. They need Verilator 5
with timing support, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/tdc_pkg.sv tb/readout_ref_pkg.sv tb/tb_readout_top.sv --top tb_readout_top
./obj_dir/Vtb_readout_top
```

Replace `tb_readout_top` with any other testbench name.

- **`tb_readout_top`** shortens the FIFO to 16 words and makes the two lines
  differ (line B is 4 ps later and has 17.1 ps taps). This makes every
  mechanism occur, and the test counts each one:
  - same-clock pairs;
  - skewed pairs;
  - single-line results;
  - both channels reporting in the same clock;
  - FIFO overflow with dropped words.

  Each word read must match the reference model, and the words the reader
  never sees must equal `drop_count`.
- **`tb_readout_full`** uses the default configuration. It checks every word
  exactly, and checks that each decoded time lies within one tap of the true
  hit time.

The block testbenches check their block against values computed in the
testbench:

- `tb_single_tdl` and `tb_double_tdl_tdc` predict each code from the hit time
  and the tap delays. They also check the clock on which each result appears.
- `tb_averaging` checks all three pairing cases and their latencies.

Two more testbenches repeat the measurements that are made on such a TDC
in the lab:

- **`tb_code_density`** sends hits at uniformly random clock phases into one
  line whose bins alternate between 21.35 ps and 13.35 ps. It rebuilds the
  bin widths from the code histogram: a bin's width is
  `T_clk * hits_in_bin / all_hits`. The mean DNL of the wide and the narrow
  bins must come out as ±0.23 LSB.
- **`tb_precision`** splits one pulse into both channels with a 220 ps
  delay and measures the spread of the delay. It runs two copies of the
  readout side by side:
  - both lines of a channel identical: about 8.1 ps RMS;
  - line B half a tap behind line A: about 4.1 ps RMS.

  Each result must match its quantisation limit, `b * sqrt(p(1-p))` with
  `p = frac(D/b)` and `b` the bin width. These figures are for ideal bins and
  a jitter-free clock. Measured precision on hardware also includes bin
  non-uniformity and jitter.

Each run takes a few seconds.

## Changing it

- **Line length**: `N_CARRY4` in `tdc_pkg`, or `N_C4` on the modules. The
  line must stay longer than one clock period. Keep
  `TAPS_PER_CLK ≈ T_clk / T_tap` in step with it. `CODE_W` and the
  `fine_sum` width follow from the line length.
- **Clock frequency**: changes `TAPS_PER_CLK` and the line length needed.
- **Channels**: `NCH` on `readout_top`, up to 16 with the 4-bit channel
  field. With three or more channels, hits arriving every other clock on all
  channels can outrun the one-word-per-clock scan.
- **Word layout**: `tdc_word_t` in `tdc_pkg`. `COARSE_W`, `FINE_SUM_W` and
  `CH_W` must sum to 31 with the `single` flag, for a 32-bit word.
