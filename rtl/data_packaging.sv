// data_packaging: collects the time stamps of all TDC channels into 32-bit
// readout words and queues them for the board's readout interface.
//
// Each channel's result is caught in a one-word holding register. A
// round-robin scan moves one held result per clock into the output FIFO,
// formatted as tdc_pkg::tdc_word_t {channel, single, coarse, fine_sum}. A
// channel produces at most one result every two clocks, so with fewer than
// three channels the scan never falls behind; results are lost only when the
// FIFO has stayed full long enough for a held result to be overwritten, and
// each such loss is counted in drop_count. The published design shows a data
// packaging stage between the TDC and the readout interface without
// describing it; the word layout, holding registers, scan order and FIFO are
// this design's choices.
//
// Interface: clk, rst, hit_valid[N]/hits[N] from the channels; rd_en ->
// rd_word, rd_empty (first-word fall-through FIFO read port), fifo_level,
// drop_count. A result is in the FIFO two clocks after its valid at the
// earliest.
`timescale 1ps / 1fs
module data_packaging
  import tdc_pkg::*;
#(
  parameter int unsigned N          = N_CH,
  parameter int unsigned FIFO_DEPTH = 512,
  localparam int unsigned AW        = $clog2(FIFO_DEPTH)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N-1:0]    hit_valid,
  input  tdc_hit_t        hits [N],
  input  logic            rd_en,
  output tdc_word_t       rd_word,
  output logic            rd_empty,
  output logic [AW:0]     fifo_level,
  output logic [15:0]     drop_count
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] held;
  tdc_hit_t     hold [N];
  logic [IW-1:0] rr;           // channel the scan starts from
  logic          fifo_full;
  logic          wr_en;
  tdc_word_t     wr_word;
  logic [IW-1:0] pick;
  logic          found;
  logic [IW:0]   n_drop;       // results overwritten this clock

  // Round-robin choice among held results, starting at rr
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 0; k < N; k++) begin
      logic [IW:0] idx;
      idx = (IW+1)'(rr) + (IW+1)'(k);
      if (idx >= (IW+1)'(N)) idx = idx - (IW+1)'(N);
      if (!found && held[IW'(idx)]) begin
        found = 1'b1;
        pick  = IW'(idx);
      end
    end
  end

  assign wr_en = found && !fifo_full;

  always_comb begin
    n_drop = '0;
    for (int i = 0; i < N; i++)
      if (hit_valid[i] && held[i] && !(wr_en && int'(pick) == i)) n_drop = n_drop + 1'b1;
  end
  always_comb begin
    wr_word          = '0;
    wr_word.channel  = CH_W'(pick);
    wr_word.single   = hold[pick].single;
    wr_word.coarse   = hold[pick].coarse;
    wr_word.fine_sum = hold[pick].fine_sum;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      held       <= '0;
      rr         <= '0;
      drop_count <= '0;
      for (int i = 0; i < N; i++) hold[i] <= '0;
    end else begin
      if (wr_en) rr <= (int'(pick) == N - 1) ? '0 : pick + 1'b1;
      // a result still waiting is overwritten by the newer one; saturate
      if (n_drop != '0)
        drop_count <= (17'(drop_count) + 17'(n_drop) > 17'hFFFF) ? 16'hFFFF
                                                                 : drop_count + 16'(n_drop);
      for (int i = 0; i < N; i++) begin
        if (hit_valid[i]) begin
          hold[i] <= hits[i];
          held[i] <= 1'b1;
        end else if (wr_en && int'(pick) == i) begin
          held[i] <= 1'b0;
        end
      end
    end
  end

  sync_fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk), .rst(rst), .wr_en(wr_en), .wr_data(wr_word), .rd_en(rd_en),
    .rd_data(rd_word), .empty(rd_empty), .full(fifo_full), .level(fifo_level));
endmodule
