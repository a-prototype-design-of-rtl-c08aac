// tb_double_tdl_tdc: one double-chain channel whose two lines differ (line B
// starts 4 ps later and has 17.1 ps taps against 17.35 ps for line A), fed
// with hits at random clock phases and, for a third of them, just before a
// clock edge so that line A catches the hit one edge earlier than line B.
// For each hit the testbench works out each line's sampling edge and code
// from the hit time and the line's delays, combines them (same edge: sum of
// codes; different edges: sum + 180 on the later edge) and checks the output
// word and the clock it appears on (two clocks after the later sampling
// edge). Both same-clock and skewed pairs must occur.
`timescale 1ps / 1fs
module tb_double_tdl_tdc;
  import tdc_pkg::*;
  localparam int  NT    = 200;
  localparam real TAU_A = 17.35;
  localparam real TAU_B = 17.1;
  localparam real ENT_B = 4.0;
  localparam real TCLK  = 3125.0;
  localparam real T0    = TCLK / 2.0;

  logic clk = 0, rst, hit;
  logic out_valid, skewed_pair, single_sent;
  tdc_hit_t out;
  int checks = 0, failures = 0, n_edge = -1, n0;
  int n_pair = 0, n_skew = 0, n_skew_dut = 0;

  typedef struct { int edge_idx; int coarse; int fine; } exp_t;
  exp_t expq[$];

  always #(TCLK / 2.0) clk = ~clk;

  double_tdl_tdc #(.A_TAP_PS(TAU_A), .B_TAP_PS(TAU_B), .B_ENTRY_PS(ENT_B)) dut (
    .clk(clk), .rst(rst), .hit(hit), .out_valid(out_valid), .out(out),
    .skewed_pair(skewed_pair), .single_sent(single_sent));

  always @(posedge clk) n_edge++;

  function automatic void line(input realtime th, input real ent, input real tau,
                      output int edge_idx, output int code);
    int n = 0;
    while (T0 + n * TCLK <= th + ent + tau) n++;
    edge_idx = n;
    code = 0;
    for (int i = 0; i < NT; i++)
      if (th + ent + (i + 1) * tau < T0 + n * TCLK) code++;
  endfunction

  function automatic exp_t predict(input realtime th);
    int ea, ca, eb, cb;
    exp_t e;
    line(th, 0.0, TAU_A, ea, ca);
    line(th, ENT_B, TAU_B, eb, cb);
    if (ea == eb) begin
      e = '{ea + 2, ea - n0 - 1, ca + cb};
      n_pair++;
    end else begin
      int late = (ea > eb) ? ea : eb;
      e = '{late + 2, late - n0 - 1, ca + cb + TAPS_PER_CLK};
      n_skew++;
    end
    return e;
  endfunction

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      if (skewed_pair) n_skew_dut++;
      if (single_sent) begin failures++; $display("FAIL single result at edge %0d", n_edge); end
      if (out_valid) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("FAIL unexpected output at edge %0d", n_edge);
        end else begin
          exp_t e;
          e = expq.pop_front();
          if (e.edge_idx != n_edge || int'(out.coarse) != e.coarse ||
              int'(out.fine_sum) != e.fine || out.single) begin
            failures++;
            $display("FAIL edge %0d got c=%0d f=%0d, expected edge %0d c=%0d f=%0d",
                     n_edge, out.coarse, out.fine_sum, e.edge_idx, e.coarse, e.fine);
          end
        end
      end else if (expq.size() > 0 && n_edge >= expq[0].edge_idx) begin
        failures++;
        $display("FAIL missing output due at edge %0d", expq[0].edge_idx);
        void'(expq.pop_front());
      end
    end
  end

  initial begin
    hit = 0; rst = 1;
    repeat (4) @(posedge clk);
    #1;
    n0  = n_edge;
    rst = 0;
    repeat (3) @(posedge clk);
    for (int h = 0; h < 300; h++) begin
      realtime th;
      if (h % 3 == 0) begin
        // land between line A's and line B's tap 0 arrival at the next edge
        realtime e_next;
        automatic int n = 0;
        while (T0 + n * TCLK < $realtime + 200.0) n++;
        e_next = T0 + n * TCLK;
        #(e_next - 19.2 + real'($urandom_range(100)) / 100.0 - 0.5 - $realtime);
      end else begin
        #(real'($urandom_range(3124)) + 0.37);
      end
      th = $realtime;
      expq.push_back(predict(th));
      hit = 1;
      #(real'(4000 + $urandom_range(3000)));
      hit = 0;
      #(real'(8000 + $urandom_range(3000)));
    end
    repeat (4) @(posedge clk);
    #2;
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    checks++;
    if (n_pair == 0 || n_skew == 0 || n_skew_dut != n_skew) begin
      failures++;
      $display("FAIL pairs %0d skewed %0d (dut flagged %0d)", n_pair, n_skew, n_skew_dut);
    end
    $display("same-clock pairs %0d, skewed pairs %0d", n_pair, n_skew);
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
