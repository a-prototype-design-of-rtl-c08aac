// pulse_detector: flags the main clock cycle in which a new hit entered the
// delay line.
//
// It watches the first tap of the sampled thermometer code. A hit is detected
// when that tap was 0 in the previous sample and is 1 in the current one, so
// a hit is reported once however long the pulse stays high, and the next hit
// is accepted only after the line has seen the input low for a sample. The
// published design names a pulse detector ahead of the fine time capture but
// does not describe it; the rising-edge test on the first sampled tap is this
// design's choice.
//
// Interface: clk, rst, first_tap (sampled tap 0) -> hit_valid, registered, so
// it lines up with the registered output of the encoder.
`timescale 1ps / 1fs
module pulse_detector (
  input  logic clk,
  input  logic rst,
  input  logic first_tap,
  output logic hit_valid
);
  logic prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      prev      <= 1'b0;
      hit_valid <= 1'b0;
    end else begin
      prev      <= first_tap;
      hit_valid <= first_tap & ~prev;
    end
  end

  // A hit can be reported at most every other clock
  a_no_back_to_back: assert property (@(posedge clk) disable iff (rst)
                                      hit_valid |=> !hit_valid);
endmodule
