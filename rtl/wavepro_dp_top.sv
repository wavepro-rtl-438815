// wavepro_dp_top: clock-less wave-pipelined dot-product accelerator.
//
// Each rising edge of launch_clk launches one operation: a pair of 64-bit
// vectors of eight 8-bit integers. The launch registers feed a purely
// combinational dot-product circuit whose paths have all been balanced to
// nearly the same delay, so there are no pipeline registers inside: several
// operations travel through the logic at once as separate waves, and the
// throughput is set by the spread (skew) between the shortest and longest
// path rather than by the longest path. The capture registers are not
// clocked by a counted-out copy of the launch clock. The launch clock is sent
// along its own carrier path, balanced with the logic, so every edge
// arrives just as the wave it launched has settled. A configurable fine-tune
// delay and an optional inversion then set the exact sampling point.
//
// This structure (launch registers, balanced logic, self-timed strobe carrier,
// fine-tune delay and inversion, capture registers) and the 8 x 8-bit
// operands follow the design description. The valid flag carried with each
// wave, signed lanes, the 19-bit result, the reset and the delay-line form
// of the fine-tune delay are this design's choices. The wave logic and the
// strobe path are behavioural timing models (see wave_window,
// strobe_carrier, delay_cell); the registers, the dot product and the tap
// multiplexer are synthesizable. The valid flag travels through the balanced
// logic alongside the result.
//
// Interface:
//   launch_clk        launch clock, one operation per rising edge
//   rst_n             asynchronous active-low reset of both register banks
//   in_valid, a, b    operation sampled on each rising launch_clk edge
//   del_sel, del_inv  static strobe fine-tune settings (delay taps, invert)
//   strobe_clk        the capture clock (carrier plus fine-tune)
//   out_valid, dp_out result of one operation, updated on each rising
//                     strobe_clk edge, in launch order
// Timing: with the default models, operation k launched at rising launch
// edge t_k is at dp_out shortly after t_k + 3.0 ns + del_sel * 0.1 ns (plus
// half a launch period when del_inv is set). Correct results require that
// sampling instant to fall after the logic has settled (2.95 ns after the
// launch) and before the next wave disturbs it (2.35 ns after the next
// launch); at del_sel = 0 the launch period may be as short as 0.65 ns.
module wavepro_dp_top
  import wavepro_pkg::operands_t, wavepro_pkg::result_t, wavepro_pkg::VEC_W, wavepro_pkg::RESULT_W,
         wavepro_pkg::WAVE_DMIN_PS, wavepro_pkg::WAVE_DMAX_PS, wavepro_pkg::CARRIER_PS, wavepro_pkg::DEL_TAPS;
#(
  parameter int DMIN_PS      = WAVE_DMIN_PS,
  parameter int DMAX_PS      = WAVE_DMAX_PS,
  parameter int CARRIER_D_PS = CARRIER_PS,
  parameter int TAPS         = DEL_TAPS,
  parameter int SEL_W        = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                       launch_clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [VEC_W-1:0]           a,
  input  logic [VEC_W-1:0]           b,
  input  logic [SEL_W-1:0]           del_sel,
  input  logic                       del_inv,
  output logic                       strobe_clk,
  output logic                       out_valid,
  output logic signed [RESULT_W-1:0] dp_out
);
  timeunit 1ps;
  timeprecision 1ps;

  operands_t           in_ops, launched;
  logic [RESULT_W-1:0] dp;
  result_t             ideal, wave_out, captured;
  logic                carried;

  assign in_ops = '{valid: in_valid, a: a, b: b};

  launch_reg u_launch (
    .clk  (launch_clk),
    .rst_n(rst_n),
    .d    (in_ops),
    .q    (launched)
  );

  // The balanced combinational logic: its function ...
  dp_unit u_dp (
    .a (launched.a),
    .b (launched.b),
    .dp(dp)
  );

  assign ideal = '{valid: launched.valid, dp: dp};

  // ... and its timing (model only)
  wave_window #(
    .DMIN_PS(DMIN_PS),
    .DMAX_PS(DMAX_PS)
  ) u_wave (
    .ideal (ideal),
    .result(wave_out)
  );

  strobe_carrier #(
    .DELAY_PS(CARRIER_D_PS)
  ) u_carrier (
    .clk_in (launch_clk),
    .clk_out(carried)
  );

  strobe_fine_tune #(
    .TAPS (TAPS),
    .SEL_W(SEL_W)
  ) u_del (
    .strobe_in (carried),
    .sel       (del_sel),
    .inv       (del_inv),
    .strobe_out(strobe_clk)
  );

  capture_reg u_capture (
    .strobe(strobe_clk),
    .rst_n (rst_n),
    .d     (wave_out),
    .q     (captured)
  );

  assign out_valid = captured.valid;
  assign dp_out    = captured.dp;
endmodule
