// tb_therm_encoder: feeds clean thermometer codes of every length 0..200 and
// codes with bubbles next to the transition, and checks the registered code
// against a count of ones made in the testbench, one clock later.
`timescale 1ps / 1fs
module tb_therm_encoder;
  localparam int N = 200;
  localparam int W = 8;
  logic clk = 0, rst;
  logic [N-1:0] therm;
  logic [W-1:0] code;
  int checks = 0, failures = 0;

  therm_encoder #(.N(N), .W(W)) dut (.clk(clk), .rst(rst), .therm(therm), .code(code));
  always #1562.5 clk = ~clk;

  function automatic int ref_count(input logic [N-1:0] v);
    int c = 0;
    for (int i = 0; i < N; i++) if (v[i]) c++;
    return c;
  endfunction

  task automatic apply(input logic [N-1:0] v);
    therm = v;
    @(posedge clk); #1;
    checks++;
    if (int'(code) != ref_count(v)) begin
      failures++;
      $display("FAIL code %0d expected %0d", code, ref_count(v));
    end
  endtask

  initial begin
    logic [N-1:0] v;
    rst = 1; therm = '1;
    @(posedge clk); #1;
    checks++;
    if (code !== '0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int k = 0; k <= N; k++) begin
      v = '0;
      for (int i = 0; i < k; i++) v[i] = 1'b1;
      apply(v);
    end
    for (int n = 0; n < 200; n++) begin
      automatic int k = 3 + int'($urandom_range(N - 6));
      v = '0;
      for (int i = 0; i < k; i++) v[i] = 1'b1;
      v[k - 1 - int'($urandom_range(2))] = 1'b0;   // bubble below the edge
      if ($urandom_range(1) == 1) v[k + int'($urandom_range(2))] = 1'b1;
      apply(v);
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
