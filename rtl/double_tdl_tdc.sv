// double_tdl_tdc: one TDC channel made of two tapped delay lines that measure
// the same hit, a coarse counter and the averaging stage.
//
// The hit fans out to both lines. Each line is sampled by the main clock and
// reports the number of taps the hit had passed at the sampling edge; the
// coarse counter supplies the edge number. The averaging stage merges the two
// reports into one time stamp whose fine part has half-tap resolution. This
// is the published double-chain structure; the two lines may be given
// different delay parameters here to model their different placement.
//
// Interface: clk (main clock, 320 MHz in the published design), rst (sync),
// hit (async) -> out_valid, out (tdc_pkg::tdc_hit_t), plus pulses that mark a
// skewed pair or a single-line result. A same-clock pair appears two clocks
// after the sampling edge.
`timescale 1ps / 1fs
module double_tdl_tdc
  import tdc_pkg::*;
#(
  parameter int unsigned N_C4       = N_CARRY4,
  parameter real         A_TAP_PS   = TAP_DELAY_PS,
  parameter real         A_ENTRY_PS = 0.0,
  parameter real         A_ALT_PS   = 0.0,
  parameter real         B_TAP_PS   = TAP_DELAY_PS,
  parameter real         B_ENTRY_PS = 0.0,
  parameter real         B_ALT_PS   = 0.0,
  parameter int unsigned P          = TAPS_PER_CLK,
  localparam int unsigned W         = $clog2(N_C4 * 4 + 1)
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     hit,
  output logic     out_valid,
  output tdc_hit_t out,
  output logic     skewed_pair,
  output logic     single_sent
);
  logic [COARSE_W-1:0] coarse, a_coarse, b_coarse;
  logic                a_valid, b_valid;
  logic [W-1:0]        a_code, b_code;

  coarse_counter #(.W(COARSE_W)) u_coarse (.clk(clk), .rst(rst), .count(coarse));

  single_tdl #(.N_C4(N_C4), .CW(COARSE_W), .TAP_PS(A_TAP_PS), .ENTRY_PS(A_ENTRY_PS),
               .ALT_PS(A_ALT_PS))
    u_tdl_a (.clk(clk), .rst(rst), .hit(hit), .coarse(coarse),
             .valid(a_valid), .code(a_code), .coarse_o(a_coarse));

  single_tdl #(.N_C4(N_C4), .CW(COARSE_W), .TAP_PS(B_TAP_PS), .ENTRY_PS(B_ENTRY_PS),
               .ALT_PS(B_ALT_PS))
    u_tdl_b (.clk(clk), .rst(rst), .hit(hit), .coarse(coarse),
             .valid(b_valid), .code(b_code), .coarse_o(b_coarse));

  averaging #(.W(W), .P(P)) u_avg (
    .clk(clk), .rst(rst),
    .a_valid(a_valid), .a_code(a_code), .a_coarse(a_coarse),
    .b_valid(b_valid), .b_code(b_code), .b_coarse(b_coarse),
    .out_valid(out_valid), .out(out), .skewed_pair(skewed_pair), .single_sent(single_sent));
endmodule
