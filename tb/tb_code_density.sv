// tb_code_density: code-density test of one delay line, the usual way of
// measuring the bin widths (DNL) of a TDL TDC. Hits arrive at uniformly
// random phases of the 320 MHz clock, so the number of hits that land in a
// bin is proportional to its width: width_k = T_clk * count_k / total.
// The line is given uneven bins (ALT_PS = 4: taps alternate 21.35 ps and
// 13.35 ps). The test checks that the measured widths show this pattern:
// the mean DNL of the wide and of the narrow bins must be within 0.05 of
// +4/17.35 and -4/17.35, and that the codes span one clock period.
`timescale 1ps / 1fs
module tb_code_density;
  localparam int  CW    = 17;
  localparam real TAU   = 17.35;
  localparam real ALT   = 4.0;
  localparam real TCLK  = 3125.0;
  localparam int  HITS  = 12000;

  logic clk = 0, rst, hit;
  logic [CW-1:0] coarse, coarse_o;
  logic valid;
  logic [7:0] code;
  int checks = 0, failures = 0, total = 0;
  int hist [256];

  always #(TCLK / 2.0) clk = ~clk;

  coarse_counter #(.W(CW)) u_cnt (.clk(clk), .rst(rst), .count(coarse));
  single_tdl #(.CW(CW), .TAP_PS(TAU), .ALT_PS(ALT)) dut (
    .clk(clk), .rst(rst), .hit(hit), .coarse(coarse),
    .valid(valid), .code(code), .coarse_o(coarse_o));

  always @(posedge clk) begin
    #1;
    if (!rst && valid) begin
      hist[code]++;
      total++;
    end
  end

  initial begin
    real dnl_even = 0.0, dnl_odd = 0.0, lsb;
    int  n_even = 0, n_odd = 0, max_code = 0;
    hit = 0; rst = 1;
    for (int i = 0; i < 256; i++) hist[i] = 0;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    repeat (2) @(posedge clk);
    for (int h = 0; h < HITS; h++) begin
      #(real'($urandom_range(31249)) / 10.0 + 0.013);
      hit = 1;
      #(3500.0);
      hit = 0;
      #(3500.0);
    end
    repeat (4) @(posedge clk);
    #2;
    checks++;
    if (total != HITS) begin failures++; $display("FAIL %0d of %0d hits reported", total, HITS); end
    for (int k = 0; k < 256; k++) if (hist[k] > 0) max_code = k;
    checks++;
    if (max_code < 178 || max_code > 182 || hist[0] != 0) begin
      failures++; $display("FAIL codes span 1..%0d, code 0 seen %0d times", max_code, hist[0]);
    end
    lsb = TAU;
    // skip the partial bins at both ends of the period
    for (int k = 2; k < 176; k++) begin
      automatic real w = TCLK * real'(hist[k]) / real'(total);
      if (k % 2 == 0) begin dnl_even += w / lsb - 1.0; n_even++; end
      else            begin dnl_odd  += w / lsb - 1.0; n_odd++;  end
    end
    dnl_even /= n_even;
    dnl_odd  /= n_odd;
    $display("mean DNL of wide bins %f, of narrow bins %f (expected %f, %f)",
             dnl_even, dnl_odd, ALT / TAU, -ALT / TAU);
    checks++;
    if (!(dnl_even - ALT / TAU < 0.05 && ALT / TAU - dnl_even < 0.05)) begin
      failures++; $display("FAIL wide-bin DNL");
    end
    checks++;
    if (!(dnl_odd + ALT / TAU < 0.05 && -ALT / TAU - dnl_odd < 0.05)) begin
      failures++; $display("FAIL narrow-bin DNL");
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
