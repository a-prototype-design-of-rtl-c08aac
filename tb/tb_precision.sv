// tb_precision: the time-precision measurement, done as on a test bench: one
// pulse is split into both channels with a fixed delay D = 220 ps between
// them, at random phases of the clock, and the spread of the measured delay
// is taken. With ideal, equal bins the spread is pure quantisation: for a bin
// of width b and p = frac(D / b), the measured delay takes two values and
// its RMS is b * sqrt(p * (1 - p)). Two readouts run side by side:
//   - "single": both lines of a channel identical, so the pair acts as one
//     line with bins of one tap (b = 17.35 ps);
//   - "double": line B starts half a tap after line A, so the average of the
//     two lines has bins of half a tap (b = 8.675 ps).
// Both measured means must be within 1 ps of D, both RMS values within 15 %
// of the formula, and the double chain must be the more precise.
`timescale 1ps / 1fs
module tb_precision;
  import tdc_pkg::*;
  localparam real TCLK = 3125.0;
  localparam real TAU  = TAP_DELAY_PS;
  localparam real D    = 220.0;
  localparam int  HITS = 2000;

  logic clk = 0, rst;
  logic [1:0] hit;
  logic rd_s, rd_d, empty_s, empty_d;
  tdc_word_t word_s, word_d;
  logic [9:0] lvl_s, lvl_d;
  logic [15:0] drop_s, drop_d;
  logic [1:0] skew_s, skew_d, single_s, single_d;
  int checks = 0, failures = 0;
  real tq_s [2][$];
  real tq_d [2][$];

  always #(TCLK / 2.0) clk = ~clk;

  readout_top u_single (
    .clk(clk), .rst(rst), .hit(hit), .rd_en(rd_s), .rd_word(word_s), .rd_empty(empty_s),
    .fifo_level(lvl_s), .drop_count(drop_s), .skewed_pair(skew_s), .single_sent(single_s));

  readout_top #(.B_ENTRY_PS(TAU / 2.0)) u_double (
    .clk(clk), .rst(rst), .hit(hit), .rd_en(rd_d), .rd_word(word_d), .rd_empty(empty_d),
    .fifo_level(lvl_d), .drop_count(drop_d), .skewed_pair(skew_d), .single_sent(single_d));

  function automatic real stamp(input tdc_word_t w);
    return real'(w.coarse) * TCLK - real'(w.fine_sum) * TAU / 2.0;
  endfunction

  always @(posedge clk) begin
    #3;
    rd_s = !empty_s && !rst;
    rd_d = !empty_d && !rst;
    if (rd_s) tq_s[word_s.channel].push_back(stamp(word_s));
    if (rd_d) tq_d[word_d.channel].push_back(stamp(word_d));
  end

  task automatic evaluate(input string name, input real tq [2][$], input real bin,
                          output real rms);
    real sum = 0.0, sum2 = 0.0, mean, p, expect_rms;
    int n = tq[0].size();
    for (int i = 0; i < n; i++) begin
      real d = tq[1][i] - tq[0][i];
      sum += d;
      sum2 += d * d;
    end
    mean = sum / n;
    rms = (sum2 / n - mean * mean) > 0.0 ? $sqrt(sum2 / n - mean * mean) : 0.0;
    p = D / bin - $floor(D / bin);
    expect_rms = bin * $sqrt(p * (1.0 - p));
    $display("%s chain: %0d delays, mean %f ps, RMS %f ps (quantisation limit %f ps)",
             name, n, mean, rms, expect_rms);
    checks++;
    if (n != HITS || tq[1].size() != HITS) begin
      failures++; $display("FAIL %s: %0d/%0d stamps", name, n, tq[1].size());
    end
    checks++;
    if (!(mean - D < 1.0 && D - mean < 1.0)) begin
      failures++; $display("FAIL %s: mean off", name);
    end
    checks++;
    if (!(rms < 1.15 * expect_rms && rms > 0.85 * expect_rms)) begin
      failures++; $display("FAIL %s: RMS off", name);
    end
  endtask

  initial begin
    real rms_s, rms_d;
    hit = '0; rd_s = 0; rd_d = 0; rst = 1;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk);
    for (int h = 0; h < HITS; h++) begin
      #(real'($urandom_range(31249)) / 10.0 + 0.013);
      hit[0] = 1'b1;
      #(D);
      hit[1] = 1'b1;
      #(4000.0);
      hit[0] = 1'b0;
      #(D);
      hit[1] = 1'b0;
      #(5000.0);
    end
    repeat (20) @(posedge clk);
    evaluate("single", tq_s, TAU, rms_s);
    evaluate("double", tq_d, TAU / 2.0, rms_d);
    checks++;
    if (!(rms_d < rms_s) || drop_s != 0 || drop_d != 0) begin
      failures++; $display("FAIL double chain not better, or words dropped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200_000_000.0);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
