// therm_encoder: converts the sampled thermometer code of one delay line into
// the binary fine time, the number of taps the hit edge had passed when the
// main clock sampled the line.
//
// The code is counted as the number of ones in the word. For a clean
// thermometer code this equals the position of the 1->0 transition; for a
// code with bubbles (isolated zeros or ones near the transition, common on
// carry chains) it gives the mean position, which is why a ones counter was
// chosen here. The published design names an encoder but does not say how it
// works: the ones count is this design's choice. The count is formed in one
// combinational stage and registered once.
//
// Interface: clk, rst, therm[N-1:0] -> code (one clock of latency).
`timescale 1ps / 1fs
module therm_encoder #(
  parameter int unsigned N = 200,
  parameter int unsigned W = $clog2(N + 1)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] therm,
  output logic [W-1:0] code
);
  logic [W-1:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < N; i++) ones = ones + W'(therm[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) code <= '0;
    else     code <= ones;
  end
endmodule
