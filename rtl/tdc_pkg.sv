// tdc_pkg: constants and types shared by the double-chain TDL TDC readout.
//
// The delay line is 50 CARRY-4 primitives long (4 taps each, 200 taps), which
// is the longest carry chain that fits in one Artix-7 clock region. The main
// clock runs at 320 MHz (3125 ps period) and a hit edge needs about 69.4 ps to
// cross one CARRY-4, i.e. about 17.35 ps per tap, so one clock period spans
// about 180 taps and the 200-tap line is never overrun within one period.
// Those numbers follow the published design. The result word layout, the
// coarse counter width and the channel count are this design's own choices.
`timescale 1ps / 1fs
package tdc_pkg;

  // Delay line geometry
  localparam int unsigned N_CARRY4      = 50;
  localparam int unsigned TAPS_PER_C4   = 4;
  localparam int unsigned N_TAPS        = N_CARRY4 * TAPS_PER_C4;   // 200
  localparam int unsigned CODE_W        = $clog2(N_TAPS + 1);       // 8

  // Timing of the published implementation (ps)
  localparam real         CARRY4_DELAY_PS = 69.4;
  localparam real         TAP_DELAY_PS    = CARRY4_DELAY_PS / 4.0;  // 17.35
  localparam real         CLK_PERIOD_PS   = 3125.0;                 // 320 MHz

  // Taps covered by one clock period: 3125 / 17.35 = 180.1, rounded down
  localparam int unsigned TAPS_PER_CLK  = 180;

  // Result formats
  localparam int unsigned COARSE_W      = 17;  // 409.6 us range at 3.125 ns
  localparam int unsigned FINE_SUM_W    = 10;  // code_a + code_b (+ TAPS_PER_CLK)
  localparam int unsigned CH_W          = 4;   // up to 16 channels per word
  localparam int unsigned N_CH          = 2;   // double-chain channels
  localparam int unsigned WORD_W        = 32;

  // One averaged hit of a double-chain channel. The hit time is
  //   t = coarse * T_clk - fine_sum * (T_tap / 2)
  // so fine_sum is the mean of the two chains' codes in half-tap units.
  typedef struct packed {
    logic [COARSE_W-1:0]   coarse;
    logic [FINE_SUM_W-1:0] fine_sum;
    logic                  single;   // only one chain saw the hit
  } tdc_hit_t;

  // Readout word: {channel, single, coarse, fine_sum} = 4+1+17+10 = 32 bits
  typedef struct packed {
    logic [CH_W-1:0]       channel;
    logic                  single;
    logic [COARSE_W-1:0]   coarse;
    logic [FINE_SUM_W-1:0] fine_sum;
  } tdc_word_t;

endpackage
