// coarse_counter: free-running counter of main clock cycles, the coarse part
// of every time stamp. It wraps at 2**W. Each count is one main clock period
// (3125 ps at the published 320 MHz). The counter width is this design's
// choice; the published design gives the counter but not its size.
//
// Interface: clk, rst (sync, clears to 0) -> count, which is the number of
// clock edges seen since reset was released.
`timescale 1ps / 1fs
module coarse_counter #(
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] count
);
  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end
endmodule
