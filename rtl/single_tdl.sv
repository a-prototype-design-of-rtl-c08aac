// single_tdl: one tapped-delay-line time interpolator.
//
// The hit ripples along the carry chain; the main clock captures the taps in
// the DFF array, the encoder turns the thermometer code into the number of
// taps passed (the fine time, measured back from the sampling edge), and the
// pulse detector marks the sample in which the hit first appeared. The coarse
// count is captured on the same edge as the taps so that the result names the
// sampling edge: the hit arrived code * T_tap before clock edge number
// `coarse`. The arrangement (delay cells, DFFs, encoder) follows the published
// block diagram; the pipeline alignment is this design's choice.
//
// Interface: clk, rst, hit (async), coarse (from the coarse counter) ->
// valid, code, coarse_o, which appear one clock after the edge that sampled
// the line.
// The delay line inside is a behavioural model, so this module simulates but
// needs CARRY4 primitives in its place for an FPGA build.
`timescale 1ps / 1fs
module single_tdl
  import tdc_pkg::*;
#(
  parameter int unsigned N_C4      = N_CARRY4,
  parameter int unsigned CW        = COARSE_W,
  parameter real         TAP_PS    = TAP_DELAY_PS,
  parameter real         ENTRY_PS  = 0.0,
  parameter real         ALT_PS    = 0.0,
  localparam int unsigned NT       = N_C4 * 4,
  localparam int unsigned W        = $clog2(NT + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          hit,
  input  logic [CW-1:0] coarse,
  output logic          valid,
  output logic [W-1:0]  code,
  output logic [CW-1:0] coarse_o
);
  logic [NT-1:0] taps, sampled;
  logic [CW-1:0] coarse_s;

  tdl_carry_chain #(.N_C4(N_C4), .TAP_PS(TAP_PS), .ENTRY_PS(ENTRY_PS), .ALT_PS(ALT_PS))
    u_chain (.hit(hit), .taps(taps));

  tdl_sample_reg #(.N(NT)) u_dff (.clk(clk), .rst(rst), .taps(taps), .q(sampled));

  therm_encoder #(.N(NT), .W(W)) u_enc (.clk(clk), .rst(rst), .therm(sampled), .code(code));

  pulse_detector u_pd (.clk(clk), .rst(rst), .first_tap(sampled[0]), .hit_valid(valid));

  always_ff @(posedge clk) begin
    if (rst) begin
      coarse_s <= '0;
      coarse_o <= '0;
    end else begin
      coarse_s <= coarse;     // value before the sampling edge
      coarse_o <= coarse_s;
    end
  end
endmodule
