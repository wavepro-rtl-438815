// wave_window: behavioural model of the balanced path delays of the wave logic.
//
// After skew balancing every path from the launch registers to the capture
// registers has nearly the same delay, so a launched operation appears at the
// logic outputs as a "wave" confined to a narrow time window, and a new
// operation can be launched once per window width rather than once per full
// delay. dp_unit computes the result in zero time; this model gives it the
// timing of the balanced netlist. DMIN_PS after the zero-delay result changes
// the outputs start to move (shown here as the bit-inverted result and valid
// flag, a value that always differs from the result); DMAX_PS after the
// change they hold the correct result. Both events are transport delays, so
// several launches are in flight at once. If a later wave's front arrives
// before a wave has settled (launches closer together than
// DMAX_PS - DMIN_PS), the two collide and the earlier wave never settles.
//
// The window model is this design's; its numbers are fitted to the published
// pass region of the wave-period / strobe-delay sweep (narrowest passing
// wave period 0.7 ns; here the window is 0.6 ns wide). The real delays exist
// only in a placed netlist after delay insertion. Not synthesizable: it holds
// only delays, and a synthesis tool should see a wire (the netlist flow, not
// RTL, creates the delays).
//
// Interface: ideal (result_t, zero-delay output of dp_unit) in;
// result (result_t, as seen at the capture registers) out.
// Timing: result correct from DMAX_PS after a launch until DMIN_PS after the
// next launch.
module wave_window
  import wavepro_pkg::result_t, wavepro_pkg::WAVE_DMIN_PS, wavepro_pkg::WAVE_DMAX_PS;
#(
  parameter int DMIN_PS = WAVE_DMIN_PS,
  parameter int DMAX_PS = WAVE_DMAX_PS
) (
  input  result_t ideal,
  output result_t result
);
  timeunit 1ps;
  timeprecision 1ps;

  int unsigned n_launch  = 0;  // waves started so far
  int unsigned front_seq = 0;  // number of the latest wave front to arrive

  initial result = '0;

  // Each change schedules its own two updates, so up to
  // DMAX_PS / launch period waves are in flight together.
  initial forever begin
    @(ideal);
    n_launch++;
    fork
      automatic result_t     v   = ideal;
      automatic int unsigned seq = n_launch;
      begin
        #(DMIN_PS);
        front_seq = seq;
        result    = ~v;                  // wave front arrives: outputs unsettled
      end
      begin
        #(DMAX_PS);
        if (front_seq == seq) result = v;   // wave tail: outputs settled
      end
    join_none
  end
endmodule
