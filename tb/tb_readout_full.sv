// tb_readout_full: the readout logic at its default configuration (two
// channels, 200-tap lines at 17.35 ps per tap, 320 MHz main clock, 512-word
// FIFO). Both channels receive a run of hits at random clock phases, some of
// them common to both channels; the reader takes every word. Each word must
// match the one readout_ref_pkg derives from the hit waveforms, nothing may
// be dropped, and every time stamp must lie within one tap of the true hit
// time: |coarse * 3125 - fine_sum * 17.35 / 2 - t_hit| (relative to the
// counter's start) below 17.35 ps.
`timescale 1ps / 1fs
module tb_readout_full;
  import tdc_pkg::*;
  import readout_ref_pkg::*;
  localparam real TCLK = 3125.0;
  localparam real T0   = TCLK / 2.0;
  localparam int  HITS = 200;

  logic clk = 0, rst;
  logic [N_CH-1:0] hit;
  logic rd_en;
  tdc_word_t rd_word;
  logic rd_empty;
  logic [9:0] fifo_level;
  logic [15:0] drop_count;
  logic [N_CH-1:0] skewed_pair, single_sent;
  int checks = 0, failures = 0, n_edge = -1, n0 = 0, words = 0;
  int drivers_done = 0;
  bit running = 0;
  realtime t_zero;                      // time of the edge the counter starts from
  realtime hit_times [N_CH][$];
  readout_ref rf;

  always #(TCLK / 2.0) clk = ~clk;

  readout_top dut (
    .clk(clk), .rst(rst), .hit(hit), .rd_en(rd_en), .rd_word(rd_word), .rd_empty(rd_empty),
    .fifo_level(fifo_level), .drop_count(drop_count),
    .skewed_pair(skewed_pair), .single_sent(single_sent));

  always @(posedge clk) begin
    n_edge++;
    if (running) rf.on_edge($realtime, n_edge - n0 - 1);
  end

  always @(posedge clk) begin
    #3;
    rd_en = !rd_empty && !rst;
    if (rd_en) begin
      automatic int c = int'(rd_word.channel);
      checks++;
      words++;
      if (c >= N_CH || rf.expect_q[c].size() == 0 || hit_times[c].size() == 0) begin
        failures++; $display("FAIL unexpected word from channel %0d", c);
      end else begin
        automatic word_t w = rf.expect_q[c].pop_front();
        automatic realtime th = hit_times[c].pop_front();
        automatic real t_meas = real'(rd_word.coarse) * TCLK
                                - real'(rd_word.fine_sum) * TAP_DELAY_PS / 2.0;
        if (int'(rd_word.coarse) != w.coarse || int'(rd_word.fine_sum) != w.fine ||
            rd_word.single != w.single) begin
          failures++;
          $display("FAIL ch %0d got c=%0d f=%0d, expected c=%0d f=%0d",
                   c, rd_word.coarse, rd_word.fine_sum, w.coarse, w.fine);
        end
        checks++;
        if (t_meas - (th - t_zero) > TAP_DELAY_PS || (th - t_zero) - t_meas > TAP_DELAY_PS) begin
          failures++;
          $display("FAIL ch %0d time %f ps, hit at %f ps", c, t_meas, th - t_zero);
        end
      end
    end
  end

  initial begin
    rf = new(N_CH, N_TAPS, TAPS_PER_CLK, TAP_DELAY_PS, TAP_DELAY_PS, 0.0, 0.0);
    hit = '0; rd_en = 0; rst = 1;
    repeat (4) @(posedge clk);
    #1;
    n0 = n_edge;
    t_zero = T0 + (n0 + 1) * TCLK;   // edge at which the counter leaves 0
    rst = 0;
    running = 1;
  end

  for (genvar c = 0; c < N_CH; c++) begin : g_drv
    initial begin
      @(negedge rst);
      repeat (3) @(posedge clk);
      for (int h = 0; h < HITS; h++) begin
        if (h % 4 != 0) #(real'($urandom_range(3124)) + 0.37 + 0.11 * c);
        else #(0.5 * c);
        hit[c] = 1'b1;
        rf.record(c, $realtime, 1'b1);
        hit_times[c].push_back($realtime);
        #(real'(4000 + $urandom_range(3000)));
        hit[c] = 1'b0;
        rf.record(c, $realtime, 1'b0);
        #(real'(8000 + $urandom_range(4000)));
      end
      drivers_done++;
    end
  end

  initial begin
    wait (drivers_done == N_CH);
    repeat (50) @(posedge clk);
    checks++;
    if (words != N_CH * HITS || drop_count != 0) begin
      failures++; $display("FAIL %0d words, %0d dropped", words, drop_count);
    end
    $display("words %0d, pairs %0d", words, rf.n_kind[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100_000_000.0);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
