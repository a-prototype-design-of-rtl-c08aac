// tb_coarse_counter: checks that the counter is zero in reset, advances by
// one per clock and wraps at 2**W (W = 5 here to reach the wrap quickly).
`timescale 1ps / 1fs
module tb_coarse_counter;
  localparam int W = 5;
  logic clk = 0, rst;
  logic [W-1:0] count;
  int checks = 0, failures = 0, wraps = 0;

  coarse_counter #(.W(W)) dut (.clk(clk), .rst(rst), .count(count));
  always #1562.5 clk = ~clk;

  initial begin
    int edges = 0;
    rst = 1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (count !== '0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int n = 0; n < 100; n++) begin
      @(posedge clk); #1;
      edges++;
      checks++;
      if (int'(count) != edges % (1 << W)) begin
        failures++;
        $display("FAIL count %0d after %0d edges", count, edges);
      end
      if (count == '0) wraps++;
    end
    checks++;
    if (wraps != 3) begin failures++; $display("FAIL wraps %0d", wraps); end
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
