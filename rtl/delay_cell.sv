// delay_cell: behavioural model of one library delay buffer.
//
// The balancing flow slows fast paths down by inserting delay buffers (and,
// for fine steps, extra load or always-on pass gates). This model is one such
// non-inverting buffer with a fixed transport delay, used here to build the
// fine-tune delay line on the strobe. The 100 ps default is this design's
// choice, equal to the strobe-delay step of the published sweep. Not
// synthesizable: a real cell comes from the standard-cell library.
//
// Interface: a in; y out.
// Timing: y(t) = a(t - DELAY_PS); low until the first change arrives.
module delay_cell
  import wavepro_pkg::DEL_STEP_PS;
#(
  parameter int DELAY_PS = DEL_STEP_PS
) (
  input  logic a,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  initial y = 1'b0;

  // Transport delay: each input change gets its own delayed update.
  initial forever begin
    @(a);
    fork
      automatic logic v = a;
      begin
        #(DELAY_PS) y = v;
      end
    join_none
  end
endmodule
