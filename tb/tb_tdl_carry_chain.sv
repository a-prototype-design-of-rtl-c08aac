// tb_tdl_carry_chain: checks the delay line model. A rising and then a
// falling hit edge are sent in; every tap must still be low just before
// (i + 1) * T_tap after the input edge and high just after it, and the same
// for the falling edge. The expected times are computed from the tap delay
// alone, independently of the model.
`timescale 1ps / 1fs
module tb_tdl_carry_chain;
  localparam int  NC4 = 50;
  localparam int  NT  = NC4 * 4;
  localparam real TAU = 17.35;

  logic          hit;
  logic [NT-1:0] taps;
  int checks = 0, failures = 0;

  tdl_carry_chain #(.N_C4(NC4), .TAP_PS(TAU)) dut (.hit(hit), .taps(taps));

  task automatic check_edge(input logic level, input realtime t0);
    for (int i = 0; i < NT; i += 7) begin
      realtime tt;
      tt = t0 + (i + 1) * TAU;
      #(tt - 0.5 - $realtime);
      checks++;
      if (taps[i] !== ~level) begin
        failures++;
        $display("FAIL tap %0d already %0b at %0t", i, taps[i], $realtime);
      end
      #(1.0);
      checks++;
      if (taps[i] !== level) begin
        failures++;
        $display("FAIL tap %0d not %0b at %0t", i, level, $realtime);
      end
    end
  endtask

  initial begin
    realtime t0;
    hit = 1'b0;
    #(5000);
    checks++;
    if (taps !== '0) begin failures++; $display("FAIL taps not all low at rest"); end
    t0 = $realtime; hit = 1'b1;
    check_edge(1'b1, t0);
    #(5000);
    checks++;
    if (taps !== '1) begin failures++; $display("FAIL taps not all high"); end
    t0 = $realtime; hit = 1'b0;
    check_edge(1'b0, t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
