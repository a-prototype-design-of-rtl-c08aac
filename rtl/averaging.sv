// averaging: combines the results of the two delay lines of one TDC channel.
//
// Both lines see the same hit, so the channel's time is the mean of the two
// measurements, which lowers the quantisation and bin-width error by about
// sqrt(2) (the published figures are 10.0 ps RMS for one line and 7.1 ps for
// the pair). A line's measurement is t = coarse * T_clk - code * T_tap. The sum
// of two such measurements, referred to the later of the two sampling edges C,
// is 2 * (C * T_clk) - fine_sum * T_tap with
//   fine_sum = code_a + code_b + TAPS_PER_CLK * (number of lines sampled one
//              edge earlier than C)
// and the output is {C, fine_sum}: the mean time is C * T_clk - fine_sum *
// T_tap / 2. Averaging in tap units without a per-bin calibration table is
// this design's choice; the published design states only that the two
// results are averaged.
//
// Pairing: the two lines normally report in the same clock. A hit that
// arrives right at a clock edge may be caught by one line an edge earlier
// than the other; the first result is then held for one clock and paired with
// the second ("skewed pair"). If the other line does not report within that
// clock, the held result is sent alone, with fine_sum = 2 * code and the
// single flag set.
//
// Interface: clk, rst, per line {valid, code, coarse} -> out_valid, out
// (tdc_pkg::tdc_hit_t), registered. Latency one clock for a same-clock pair,
// two for a skewed pair or a single.
`timescale 1ps / 1fs
module averaging
  import tdc_pkg::*;
#(
  parameter int unsigned W      = CODE_W,
  parameter int unsigned P      = TAPS_PER_CLK
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                a_valid,
  input  logic [W-1:0]        a_code,
  input  logic [COARSE_W-1:0] a_coarse,
  input  logic                b_valid,
  input  logic [W-1:0]        b_code,
  input  logic [COARSE_W-1:0] b_coarse,
  output logic                out_valid,
  output tdc_hit_t            out,
  output logic                skewed_pair,  // pulses when a skewed pair is sent
  output logic                single_sent   // pulses when a single result is sent
);
  logic                pend;
  logic                pend_is_a;
  logic [W-1:0]        pend_code;
  logic [COARSE_W-1:0] pend_coarse;

  always_ff @(posedge clk) begin
    if (rst) begin
      pend        <= 1'b0;
      pend_is_a   <= 1'b0;
      pend_code   <= '0;
      pend_coarse <= '0;
      out_valid   <= 1'b0;
      out         <= '0;
      skewed_pair <= 1'b0;
      single_sent <= 1'b0;
    end else begin
      out_valid   <= 1'b0;
      skewed_pair <= 1'b0;
      single_sent <= 1'b0;
      if (pend) begin
        if (pend_is_a ? b_valid : a_valid) begin
          // second line reported one edge later: pair them
          out_valid    <= 1'b1;
          skewed_pair  <= 1'b1;
          out.coarse   <= pend_is_a ? b_coarse : a_coarse;
          out.fine_sum <= FINE_SUM_W'(pend_code) + FINE_SUM_W'(pend_is_a ? b_code : a_code)
                          + FINE_SUM_W'(P);
          out.single   <= 1'b0;
          pend         <= 1'b0;
        end else begin
          // no partner: send the held result on its own
          out_valid    <= 1'b1;
          single_sent  <= 1'b1;
          out.coarse   <= pend_coarse;
          out.fine_sum <= FINE_SUM_W'(pend_code) << 1;
          out.single   <= 1'b1;
          pend         <= 1'b0;
          // a line cannot report twice in a row, so a new lone result can
          // only come from the held line's partner, handled above
        end
      end else if (a_valid && b_valid) begin
        out_valid    <= 1'b1;
        out.coarse   <= a_coarse;
        out.fine_sum <= FINE_SUM_W'(a_code) + FINE_SUM_W'(b_code);
        out.single   <= 1'b0;
      end else if (a_valid || b_valid) begin
        pend        <= 1'b1;
        pend_is_a   <= a_valid;
        pend_code   <= a_valid ? a_code : b_code;
        pend_coarse <= a_valid ? a_coarse : b_coarse;
      end
    end
  end

  // Both lines share the sampling clock, so a same-clock pair names one edge
  a_same_edge: assert property (@(posedge clk) disable iff (rst)
                                (!pend && a_valid && b_valid) |-> (a_coarse == b_coarse));
endmodule
