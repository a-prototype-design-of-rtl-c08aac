// tb_readout_top: end-to-end test of the readout FPGA logic with two
// channels. Line B of every channel starts 4 ps later and has 17.1 ps taps
// (line A: 17.35 ps), and the FIFO is shortened to 16 words, so that every
// mechanism of the design shows up within a short run:
//   - same-clock pairs (most hits),
//   - skewed pairs (hits timed to reach line A's first tap just before a
//     clock edge and line B's just after),
//   - single-line results (a 3 ps dropout of the input timed so that only
//     line A sees it low at an edge, and so detects the rise that follows),
//   - both channels reporting in the same clock (common hits),
//   - FIFO overflow and dropped words (the reader stalls for a while).
// Expected words come from readout_ref_pkg, which derives them from the hit
// waveforms. Every word read must match its channel's next expected word;
// words the reader skips must be exactly those counted by drop_count.
`timescale 1ps / 1fs
module tb_readout_top;
  import tdc_pkg::*;
  import readout_ref_pkg::*;
  localparam int  NCH   = 2;
  localparam real TAU_A = 17.35;
  localparam real TAU_B = 17.1;
  localparam real ENT_B = 4.0;
  localparam real TCLK  = 3125.0;
  localparam real T0    = TCLK / 2.0;
  localparam int  HITS  = 240;

  logic clk = 0, rst;
  logic [NCH-1:0] hit;
  logic rd_en;
  tdc_word_t rd_word;
  logic rd_empty;
  logic [4:0] fifo_level;
  logic [15:0] drop_count;
  logic [NCH-1:0] skewed_pair, single_sent;
  int checks = 0, failures = 0, n_edge = -1, n0 = 0;
  int skipped = 0, words = 0, both_same_clock = 0, fifo_full_seen = 0;
  bit stall = 0, running = 0;
  int drivers_done = 0;
  readout_ref rf;

  always #(TCLK / 2.0) clk = ~clk;

  readout_top #(.FIFO_DEPTH(16), .A_TAP_PS(TAU_A), .B_TAP_PS(TAU_B), .B_ENTRY_PS(ENT_B)) dut (
    .clk(clk), .rst(rst), .hit(hit), .rd_en(rd_en), .rd_word(rd_word), .rd_empty(rd_empty),
    .fifo_level(fifo_level), .drop_count(drop_count),
    .skewed_pair(skewed_pair), .single_sent(single_sent));

  int dut_skew = 0, dut_single = 0;

  // reference model, evaluated at every clock edge
  always @(posedge clk) begin
    n_edge++;
    if (running) begin
      dut_skew   += $countones(skewed_pair);
      dut_single += $countones(single_sent);
    end
    if (running) begin
      automatic int s0 = rf.expect_q[0].size(), s1 = rf.expect_q[1].size();
      rf.on_edge($realtime, n_edge - n0 - 1);
      if (rf.expect_q[0].size() > s0 && rf.expect_q[1].size() > s1) both_same_clock++;
    end
  end

  function automatic realtime next_edge(input realtime after);
    int n = 0;
    while (T0 + n * TCLK < after) n++;
    return T0 + n * TCLK;
  endfunction

  task automatic set_hit(input int c, input bit v);
    hit[c] = v;
    rf.record(c, $realtime, v);
  endtask

  // one hit on channel c of the given pattern; the waveform is recorded
  task automatic drive(input int c, input int pattern);
    realtime e;
    case (pattern)
      1: begin   // skewed: reaches line A's tap 0 just before an edge, line B's after
        e = next_edge($realtime + 200.0);
        #(e - 19.2 + real'($urandom_range(100)) / 100.0 - 0.5 - $realtime);
        set_hit(c, 1);
        #(real'(4000 + $urandom_range(3000)));
      end
      2: begin   // dropout seen only by line A
        set_hit(c, 1);
        #(real'(4000 + $urandom_range(1000)));
        e = next_edge($realtime + 200.0);
        #(e - 18.85 - $realtime);
        set_hit(c, 0);
        #(3.0);
        set_hit(c, 1);
        #(real'(4000 + $urandom_range(1000)));
      end
      default: begin
        set_hit(c, 1);
        #(real'(4000 + $urandom_range(3000)));
      end
    endcase
    set_hit(c, 0);
  endtask

  // reader: pops when a word is shown, except while stalled
  always @(posedge clk) begin
    #3;
    if (fifo_level == 5'd16) fifo_full_seen++;
    rd_en = !rd_empty && !stall && !rst && ($urandom_range(3) != 0);
    if (rd_en) begin
      automatic int c = int'(rd_word.channel);
      automatic bit matched = 0;
      words++;
      checks++;
      while (!matched && c < NCH && rf.expect_q[c].size() > 0) begin
        automatic word_t w = rf.expect_q[c].pop_front();
        if (int'(rd_word.coarse) == w.coarse && int'(rd_word.fine_sum) == w.fine &&
            rd_word.single == w.single) matched = 1;
        else skipped++;
      end
      if (!matched) begin
        failures++;
        $display("FAIL word ch %0d c=%0d f=%0d s=%0b matches no expected word",
                 c, rd_word.coarse, rd_word.fine_sum, rd_word.single);
      end
    end
  end

  initial begin
    rf = new(NCH, N_TAPS, TAPS_PER_CLK, TAU_A, TAU_B, 0.0, ENT_B);
    hit = '0; rd_en = 0; rst = 1;
    repeat (4) @(posedge clk);
    #1;
    n0 = n_edge;
    rst = 0;
    running = 1;
  end

  for (genvar c = 0; c < NCH; c++) begin : g_drv
    initial begin
      @(negedge rst);
      repeat (3) @(posedge clk);
      for (int h = 0; h < HITS; h++) begin
        automatic int pattern = (h % 5 == 1) ? 1 : (h % 5 == 3) ? 2 : 0;
        if (h % 4 != 0) #(real'($urandom_range(3124)) + 0.37 + 0.11 * c);
        else #(0.5 * c);   // nearly common hit on both channels
        drive(c, pattern);
        #(real'(8000 + $urandom_range(4000)));
      end
      drivers_done++;
    end
  end

  initial begin
    @(negedge rst);
    #(1_000_000.0);
    stall = 1;            // reader stops: the FIFO fills and words are lost
    #(600_000.0);
    stall = 0;
    wait (drivers_done == NCH);
    repeat (200) @(posedge clk);
    checks++;
    if (skipped != int'(drop_count)) begin
      failures++;
      $display("FAIL %0d expected words never read, drop_count %0d", skipped, drop_count);
    end
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (rf.expect_q[c].size() != 0) begin
        failures++; $display("FAIL channel %0d: %0d words not delivered", c, rf.expect_q[c].size());
      end
    end
    $display("flagged by the design: skewed pairs %0d, singles %0d", dut_skew, dut_single);
    $display("words %0d: same-clock pairs %0d, skewed pairs %0d, singles %0d, both channels %0d, FIFO full %0d, dropped %0d",
             words, rf.n_kind[0], rf.n_kind[1], rf.n_kind[2], both_same_clock, fifo_full_seen, drop_count);
    checks++;
    if (rf.n_kind[0] == 0 || rf.n_kind[1] == 0 || rf.n_kind[2] == 0 || both_same_clock == 0 ||
        fifo_full_seen == 0 || drop_count == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
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
