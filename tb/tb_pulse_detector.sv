// tb_pulse_detector: drives random sequences of the sampled first tap and
// compares hit_valid with a reference that flags a 0->1 step of the input,
// one clock later. Long pulses must give one report only.
`timescale 1ps / 1fs
module tb_pulse_detector;
  logic clk = 0, rst, first_tap, hit_valid;
  logic prev_ref, exp_valid;
  int checks = 0, failures = 0, detections = 0;

  pulse_detector dut (.clk(clk), .rst(rst), .first_tap(first_tap), .hit_valid(hit_valid));
  always #1562.5 clk = ~clk;

  initial begin
    rst = 1; first_tap = 1;
    @(posedge clk); #1;
    rst = 0; prev_ref = 0; exp_valid = 0;
    first_tap = 1;   // held high coming out of reset counts as a new hit
    for (int n = 0; n < 400; n++) begin
      @(posedge clk);
      exp_valid = first_tap & ~prev_ref;
      prev_ref  = first_tap;
      #1;
      checks++;
      if (hit_valid !== exp_valid) begin
        failures++;
        $display("FAIL cycle %0d valid %0b expected %0b", n, hit_valid, exp_valid);
      end
      if (hit_valid) detections++;
      first_tap = (n < 20) ? 1'b1 : 1'($urandom_range(1));
    end
    checks++;
    if (detections < 20) begin failures++; $display("FAIL too few detections"); end
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
