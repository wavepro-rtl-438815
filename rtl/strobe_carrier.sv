// strobe_carrier: behavioural model of the self-timed strobe carrier.
//
// Instead of counting a fixed number of clock cycles before sampling, the
// launch clock itself is sent through a delay path that is balanced together
// with the wave logic, so that each clock edge reaches the capture registers
// when the wave it launched has settled. Because the carrier sees the same
// voltage, temperature and local variation as the logic, the sampling point
// tracks the data. This model is a transport delay of DELAY_PS on the clock,
// holding several edges in flight. The default, 3.0 ns, is this design's
// number: the shortest strobe delay that passes in the published sweep, just
// after the modelled logic settles at 2.95 ns. Not synthesizable: in silicon
// this is a chain of buffers and delay cells placed by the balancing flow.
//
// Interface: clk_in (launch clock) in; clk_out (strobe) out.
// Timing: clk_out(t) = clk_in(t - DELAY_PS); low until the first edge arrives.
module strobe_carrier
  import wavepro_pkg::CARRIER_PS;
#(
  parameter int DELAY_PS = CARRIER_PS
) (
  input  logic clk_in,
  output logic clk_out
);
  timeunit 1ps;
  timeprecision 1ps;

  initial clk_out = 1'b0;

  // Transport delay: every input edge gets its own delayed update, so edges
  // closer together than DELAY_PS are all kept.
  initial forever begin
    @(clk_in);
    fork
      automatic logic v = clk_in;
      begin
        #(DELAY_PS) clk_out = v;
      end
    join_none
  end
endmodule
