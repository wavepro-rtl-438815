// strobe_fine_tune: configurable fine-tune delay and inversion of the strobe.
//
// The balanced strobe carrier arrives at the nominal settling time of the
// logic. This block adds a programmable extra delay, to cover the capture
// registers' setup time and to move the sampling point into the middle of the
// passing window after silicon is back (which is also how hold problems are
// repaired), and can invert the strobe so that the capture registers sample on
// the falling edge of the carried clock, half a launch period later. The
// delay and the inversion option follow the description; how they are built
// is this design's choice: a chain of TAPS-1 delay cells, a multiplexer that
// picks tap sel (tap 0 is the undelayed strobe; values above TAPS-1 pick the
// last tap) and an XOR with inv.
//
// Interface: strobe_in, sel, inv in; strobe_out out. sel and inv are static
// settings: change them only while no capture is expected, as the switch can
// produce a spurious edge.
// Timing: strobe_out = strobe_in delayed by sel delay cells, inverted if inv.
module strobe_fine_tune
  import wavepro_pkg::DEL_TAPS;
#(
  parameter int TAPS  = DEL_TAPS,
  parameter int SEL_W = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic             strobe_in,
  input  logic [SEL_W-1:0] sel,
  input  logic             inv,
  output logic             strobe_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [TAPS-1:0] tap;

  assign tap[0] = strobe_in;

  for (genvar k = 1; k < TAPS; k++) begin : g_chain
    delay_cell u_cell (
      .a(tap[k-1]),
      .y(tap[k])
    );
  end

  logic picked;

  always_comb begin
    if (int'(sel) >= TAPS) picked = tap[TAPS-1];
    else                   picked = tap[sel];
    strobe_out = picked ^ inv;
  end
endmodule
