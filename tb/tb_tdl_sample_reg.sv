// tb_tdl_sample_reg: drives random tap words and checks that the DFF array
// shows each word one clock after it was presented, and zero after reset.
`timescale 1ps / 1fs
module tb_tdl_sample_reg;
  localparam int N = 200;
  logic clk = 0, rst;
  logic [N-1:0] taps, q, expect_q;
  int checks = 0, failures = 0;

  tdl_sample_reg #(.N(N)) dut (.clk(clk), .rst(rst), .taps(taps), .q(q));
  always #1562.5 clk = ~clk;

  initial begin
    rst = 1; taps = '1;
    @(posedge clk); #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int n = 0; n < 100; n++) begin
      for (int w = 0; w < N; w += 32) taps[w +: 8] = 8'($urandom);
      for (int w = 8; w < N; w += 32) taps[w +: 8] = 8'($urandom);
      for (int w = 16; w < N; w += 32) taps[w +: 8] = 8'($urandom);
      for (int w = 24; w < N - 8; w += 32) taps[w +: 8] = 8'($urandom);
      expect_q = taps;
      @(posedge clk); #1;
      taps = ~taps;   // change after the edge: must not show until next edge
      #1;
      checks++;
      if (q !== expect_q) begin failures++; $display("FAIL word %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
