// sync_fifo: single-clock first-in first-out buffer with a registered read
// port, used to hold packed TDC words until the readout side takes them.
//
// Storage is an array of DEPTH words addressed by wrapping read and write
// pointers one bit wider than the address, so full and empty are told apart
// by the extra bit; DEPTH must be a power of two. A write when full and a read when empty are ignored.
// rd_data shows the oldest word whenever empty is low (first-word
// fall-through); rd_en pops it. The depth and the fall-through behaviour are
// this design's choices.
//
// Interface: clk, rst, wr_en/wr_data, rd_en -> rd_data, empty, full, level.
`timescale 1ps / 1fs
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic [AW:0]  level
);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign level   = wp - rp;
  assign empty   = (wp == rp);
  assign full    = (level == (AW+1)'(DEPTH));
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_en && !full) wp <= wp + 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end
endmodule
