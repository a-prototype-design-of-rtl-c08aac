// readout_top: the FPGA part of the time digitization module (TDM) of the
// iTOF readout. Discriminated detector pulses arrive as hit inputs; each goes
// to its own double-chain TDL TDC channel, and the channels' time stamps are
// packed into 32-bit words and queued for the board's readout interface.
//
// Time stamp of a word: t = coarse * T_clk - fine_sum * T_tap / 2, with T_clk
// the main clock period (3125 ps at 320 MHz) and T_tap the delay of one tap
// (about 17.35 ps). The channel chain (delay line, DFF array, encoder, coarse
// counter, averaging) and the packaging stage follow the published block
// diagrams; the front-end discriminator, cable, repeater and the crate
// interface, which lie outside the FPGA, are not part of this module: hit[]
// and the FIFO read port are where they connect. The channel count, word
// layout and FIFO depth are this design's choices.
//
// Interface: clk (main clock), rst (sync, active high), hit[N_CH] (async) ->
// rd_en / rd_word / rd_empty (FIFO read port, first-word fall-through),
// fifo_level, drop_count, and per-channel pulses for skewed-pair and
// single-line results. The delay lines are behavioural models, so this top
// simulates; an FPGA build places CARRY4 primitives in their place.
`timescale 1ps / 1fs
module readout_top
  import tdc_pkg::*;
#(
  parameter int unsigned NCH        = N_CH,
  parameter int unsigned N_C4       = N_CARRY4,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter real         A_TAP_PS   = TAP_DELAY_PS,
  parameter real         B_TAP_PS   = TAP_DELAY_PS,
  parameter real         B_ENTRY_PS = 0.0,
  localparam int unsigned AW        = $clog2(FIFO_DEPTH)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NCH-1:0]  hit,
  input  logic            rd_en,
  output tdc_word_t       rd_word,
  output logic            rd_empty,
  output logic [AW:0]     fifo_level,
  output logic [15:0]     drop_count,
  output logic [NCH-1:0]  skewed_pair,
  output logic [NCH-1:0]  single_sent
);
  logic [NCH-1:0] ch_valid;
  tdc_hit_t       ch_hit [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    double_tdl_tdc #(.N_C4(N_C4), .A_TAP_PS(A_TAP_PS), .B_TAP_PS(B_TAP_PS),
                     .B_ENTRY_PS(B_ENTRY_PS))
      u_tdc (.clk(clk), .rst(rst), .hit(hit[c]), .out_valid(ch_valid[c]), .out(ch_hit[c]),
             .skewed_pair(skewed_pair[c]), .single_sent(single_sent[c]));
  end

  data_packaging #(.N(NCH), .FIFO_DEPTH(FIFO_DEPTH)) u_pack (
    .clk(clk), .rst(rst), .hit_valid(ch_valid), .hits(ch_hit), .rd_en(rd_en),
    .rd_word(rd_word), .rd_empty(rd_empty), .fifo_level(fifo_level), .drop_count(drop_count));
endmodule
