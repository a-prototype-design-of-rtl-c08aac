// tb_data_packaging: three channels post results into the packaging stage.
// Phase 1: the reader pops whenever a word is waiting; channels post at
// random, often in the same clock. Every result must come out once, in
// order per channel, with its channel number and fields intact, within a
// few clocks, and nothing may be dropped (each channel posts at most every
// third clock, the rate three channels can share). Phase 2: the reader stops; channels
// keep posting until the FIFO is full and the holding registers are being
// overwritten. Then the reader drains everything. Expected: FIFO_DEPTH words
// plus one held word per channel (its latest result), and a drop count of
// the rest.
`timescale 1ps / 1fs
module tb_data_packaging;
  import tdc_pkg::*;
  localparam int N = 3;
  localparam int DEPTH = 8;
  logic clk = 0, rst;
  logic [N-1:0] hit_valid;
  tdc_hit_t     hits [N];
  logic         rd_en;
  tdc_word_t    rd_word;
  logic         rd_empty;
  logic [3:0]   fifo_level;
  logic [15:0]  drop_count;
  int checks = 0, failures = 0, cyc = 0, simultaneous = 0;

  typedef struct { tdc_hit_t h; int cyc; } post_t;
  post_t sent [N][$];

  data_packaging #(.N(N), .FIFO_DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .hit_valid(hit_valid), .hits(hits), .rd_en(rd_en),
    .rd_word(rd_word), .rd_empty(rd_empty), .fifo_level(fifo_level), .drop_count(drop_count));

  always #1562.5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic tdc_hit_t rnd_hit();
    tdc_hit_t h;
    h.coarse   = COARSE_W'($urandom);
    h.fine_sum = FINE_SUM_W'($urandom_range(580));
    h.single   = 1'($urandom_range(1));
    return h;
  endfunction

  // compare a popped word with the oldest result its channel sent
  task automatic check_word(input int max_lat);
    int c = int'(rd_word.channel);
    checks++;
    if (c >= N || sent[c].size() == 0) begin
      failures++; $display("FAIL word from channel %0d not expected", c);
    end else begin
      post_t p;
      p = sent[c].pop_front();
      if (rd_word.coarse != p.h.coarse || rd_word.fine_sum != p.h.fine_sum ||
          rd_word.single != p.h.single) begin
        failures++;
        $display("FAIL channel %0d word c=%0d f=%0d, expected c=%0d f=%0d",
                 c, rd_word.coarse, rd_word.fine_sum, p.h.coarse, p.h.fine_sum);
      end
      if (max_lat > 0) checks++;
      if (max_lat > 0 && cyc - p.cyc > max_lat) begin
        failures++; $display("FAIL channel %0d latency %0d", c, cyc - p.cyc);
      end
    end
  endtask

  initial begin
    int last_post [N];
    rst = 1; hit_valid = '0; rd_en = 0;
    for (int i = 0; i < N; i++) begin hits[i] = '0; last_post[i] = -10; end
    repeat (3) @(posedge clk);
    #2 rst = 0;
    // phase 1
    for (int n = 0; n < 600; n++) begin
      @(posedge clk); #2;
      hit_valid = '0;
      for (int i = 0; i < N; i++)
        if (cyc - last_post[i] >= N && $urandom_range(3) == 0) begin
          hit_valid[i] = 1'b1;
          hits[i] = rnd_hit();
          sent[i].push_back('{hits[i], cyc});
          last_post[i] = cyc;
        end
      if ($countones(hit_valid) > 1) simultaneous++;
      #1 rd_en = !rd_empty;
      if (rd_en) check_word(N + 3);   // the word shown now is popped at the next edge
    end
    @(posedge clk); #2;
    hit_valid = '0; rd_en = 0;
    repeat (8) begin
      @(posedge clk); #2;
      #1 rd_en = !rd_empty;
      if (rd_en) check_word(N + 3);
      @(posedge clk); #2;
      rd_en = 0;
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (sent[i].size() != 0) begin failures++; $display("FAIL channel %0d lost words", i); end
    end
    checks++;
    if (drop_count != 0 || simultaneous == 0) begin
      failures++; $display("FAIL drops %0d simultaneous %0d", drop_count, simultaneous);
    end
    // phase 2: overflow
    begin
      int posted = 0, popped = 0;
      for (int n = 0; n < 60; n++) begin
        @(posedge clk); #2;
        hit_valid = '0;
        if (n % 3 == 0)
          for (int i = 0; i < N; i++) begin
            hit_valid[i] = 1'b1;
            hits[i] = rnd_hit();
            sent[i].push_back('{hits[i], cyc});
            posted++;
          end
      end
      @(posedge clk); #2;
      hit_valid = '0;
      repeat (3) @(posedge clk);
      #2;
      checks++;
      if (int'(drop_count) != posted - DEPTH - N) begin
        failures++;
        $display("FAIL drop_count %0d expected %0d", drop_count, posted - DEPTH - N);
      end
      // first DEPTH words are the oldest results; then each channel's latest
      for (int k = 0; k < DEPTH + N + 2; k++) begin
        #1 rd_en = !rd_empty;
        if (rd_en) begin
          automatic int c = int'(rd_word.channel);
          if (k == DEPTH && c < N) begin
            // from here on, only the newest result of each channel is left
            for (int i = 0; i < N; i++)
              while (sent[i].size() > 1) void'(sent[i].pop_front());
          end
          check_word(0);
          popped++;
        end
        @(posedge clk); #2;
        rd_en = 0;
      end
      checks++;
      if (popped != DEPTH + N) begin
        failures++; $display("FAIL popped %0d expected %0d", popped, DEPTH + N);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
