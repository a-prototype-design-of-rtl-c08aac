// tb_single_tdl: sends hits at random phases of the 320 MHz main clock into
// one delay line and checks the reported fine code, coarse count and the
// clock on which the report appears. The expected values come from the hit
// time alone: the sampling edge is the first clock edge after the hit has
// reached tap 0, the code is the number of taps it reached before that edge,
// and the coarse count is the number of clock edges since reset release
// before that edge. The report must appear on the next edge.
`timescale 1ps / 1fs
module tb_single_tdl;
  localparam int  NC4  = 50;
  localparam int  NT   = NC4 * 4;
  localparam int  CW   = 17;
  localparam real TAU  = 17.35;
  localparam real TCLK = 3125.0;
  localparam real T0   = TCLK / 2.0;   // time of edge 0

  logic clk = 0, rst, hit;
  logic [CW-1:0] coarse;
  logic          valid;
  logic [7:0]    code;
  logic [CW-1:0] coarse_o;
  int checks = 0, failures = 0, reports = 0;
  int n_edge = -1;
  int n0;   // last edge with reset asserted

  typedef struct { int edge_idx; int code; int coarse; } exp_t;
  exp_t expq[$];

  always #(TCLK / 2.0) clk = ~clk;

  coarse_counter #(.W(CW)) u_cnt (.clk(clk), .rst(rst), .count(coarse));
  single_tdl #(.N_C4(NC4), .CW(CW), .TAP_PS(TAU)) dut (
    .clk(clk), .rst(rst), .hit(hit), .coarse(coarse),
    .valid(valid), .code(code), .coarse_o(coarse_o));

  always @(posedge clk) n_edge++;

  // predict the report of a hit rising at time th
  function automatic exp_t predict(input realtime th);
    exp_t e;
    int   n;
    n = 0;
    while (T0 + n * TCLK <= th + TAU) n++;
    e.edge_idx = n;
    e.code = 0;
    for (int i = 0; i < NT; i++)
      if (th + (i + 1) * TAU < T0 + n * TCLK) e.code++;
    e.coarse = n - n0 - 1;
    return e;
  endfunction

  // monitor
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      if (valid) begin
        reports++;
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("FAIL unexpected report at edge %0d", n_edge);
        end else begin
          exp_t e;
          e = expq.pop_front();
          if (n_edge != e.edge_idx + 1 || int'(code) != e.code || int'(coarse_o) != e.coarse) begin
            failures++;
            $display("FAIL edge %0d code %0d coarse %0d; expected edge %0d code %0d coarse %0d",
                     n_edge, code, coarse_o, e.edge_idx + 1, e.code, e.coarse);
          end
        end
      end else if (expq.size() > 0 && n_edge > expq[0].edge_idx + 1) begin
        failures++;
        $display("FAIL missing report for edge %0d", expq[0].edge_idx);
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
      // random phase with sub-ps offset so no tap lands exactly on an edge
      #(real'($urandom_range(3124)) + 0.37);
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
    if (expq.size() != 0 || reports != 300) begin
      failures++; $display("FAIL %0d reports, %0d pending", reports, expq.size());
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
