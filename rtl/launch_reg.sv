// launch_reg: launch registers of the wave pipeline.
//
// On every rising edge of the launch clock the register samples the operand
// pair and its valid flag and releases them into the balanced wave logic. A
// new operation may be launched on every edge: the wave logic holds several
// operations in flight at once, each one wave period behind the previous, so
// the register has no enable and no back-pressure. An edge with in_valid low
// launches a bubble. Sampling on every edge follows the description (one
// launch per wave period, the launch clock also being the strobe clock); the
// valid flag and the asynchronous active-low reset are this design's
// choices. Reset clears the valid flag and the operands.
//
// Interface: clk (launch clock), rst_n, d (operands_t) in; q out.
// Timing: q changes one clock-to-q after each rising clk edge.
module launch_reg
  import wavepro_pkg::operands_t;
(
  input  logic      clk,
  input  logic      rst_n,
  input  operands_t d,
  output operands_t q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule
