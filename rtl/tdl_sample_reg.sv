// tdl_sample_reg: the D flip-flop array behind the delay line taps.
//
// On every rising edge of the main clock all taps are captured at once; the
// captured word is the thermometer code of how far the hit edge travelled
// along the line before that edge. This follows the published structure (one
// DFF per carry output, clocked by the main clock). A synchronous reset that
// clears the array is this design's choice.
//
// Interface: clk (main clock), rst (sync, active high), taps (async) ->
// q (registered, one clock of latency).
`timescale 1ps / 1fs
module tdl_sample_reg #(
  parameter int unsigned N = 200
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] taps,
  output logic [N-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= taps;
  end
endmodule
