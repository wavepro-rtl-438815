// capture_reg: capture registers of the wave pipeline.
//
// The capture registers are clocked by the self-timed strobe: a copy of the
// launch clock that has travelled through a path balanced with the wave
// logic, plus a configurable fine-tune delay. Each strobe rising edge
// therefore arrives while the result of the matching launch is settled at the
// logic output, and the register samples the result and its valid flag. The
// clocking scheme follows the description; the valid flag and the
// asynchronous active-low reset (the launch-side reset, used here without
// synchronisation because the strobe is a delayed copy of the launch clock)
// are this design's choices.
//
// Interface: strobe (capture clock), rst_n, d (result_t) in; q out.
// Timing: q changes one clock-to-q after each rising strobe edge.
module capture_reg
  import wavepro_pkg::result_t;
(
  input  logic    strobe,
  input  logic    rst_n,
  input  result_t d,
  output result_t q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge strobe or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule
