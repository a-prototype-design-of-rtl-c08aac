// tdl_carry_chain: behavioural model of the tapped delay line built from a
// chain of Artix-7 CARRY-4 primitives. This is a simulation model, not
// synthesizable logic: in the FPGA the delay comes from the carry
// multiplexers and this module is replaced by N_CARRY4 CARRY4 instances placed
// from the bottom of one clock region upward.
//
// The hit enters the carry input of the first CARRY-4 and ripples upward. Each
// CARRY-4 has four carry outputs (LE0..LE3), which are the taps. Tap i goes
// high TAP_PS * (i + 1) + ENTRY_PS after the hit does (transport delay, so
// short pulses and gaps are kept). The default per-tap
// delay is a quarter of the 69.4 ps per CARRY-4 that was measured on the
// published design; ALT_PS adds an alternating +/- term per tap so that the
// bin widths are uneven, as they are on real silicon (default 0: uniform).
//
// Interface: hit (async, the discriminated detector pulse) -> taps[N_TAPS-1:0]
// (async thermometer pattern, tap 0 nearest to the input).
`timescale 1ps / 1fs
module tdl_carry_chain
  import tdc_pkg::*;
#(
  parameter int unsigned N_C4     = N_CARRY4,
  parameter real         TAP_PS   = TAP_DELAY_PS,
  parameter real         ENTRY_PS = 0.0,
  parameter real         ALT_PS   = 0.0
) (
  input  logic                    hit,
  output logic [N_C4*4-1:0]       taps
);
  localparam int unsigned NT = N_C4 * 4;

  // Transport delays: every edge is passed on, however short the pulse.
  function automatic real tap_delay(input int i);
    return (i % 2 == 1) ? (TAP_PS - ALT_PS) : (TAP_PS + ALT_PS);
  endfunction

  // The line starts at rest, all taps low
  initial taps = '0;

  // Every input edge starts its own thread that walks the edge up the chain,
  // so an edge is never lost while an earlier one is still in flight.
  always @(hit)
    fork
      automatic logic v = hit;
      begin
        #(ENTRY_PS);
        for (int i = 0; i < NT; i++) begin
          #(tap_delay(i));
          taps[i] = v;
        end
      end
    join_none

endmodule
