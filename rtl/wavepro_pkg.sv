// wavepro_pkg: sizes and types shared by the wave-pipelined dot-product unit.
//
// The operands are a pair of 64-bit vectors, each holding eight 8-bit
// integers (these sizes follow the design description). The result width is
// this design's choice: the smallest signed width that holds the sum of eight
// 8x8 signed products without overflow, 2*ELEM_W + clog2(LANES) bits = 19.
//
// The timing constants are the nominal delays of the balanced wave logic and
// of the strobe path, in picoseconds. They describe the behavioural models
// only and have no effect on synthesis. They are fitted to the published pass
// region of the wave-period / strobe-delay sweep: results settle by 2.95 ns
// after a launch, the next wave starts to disturb the outputs 2.35 ns after
// its own launch, and the strobe carrier is balanced to 3.0 ns, the smallest
// strobe delay that passes in that sweep.
package wavepro_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  parameter int LANES    = 8;   // integers per operand vector
  parameter int ELEM_W   = 8;   // bits per integer
  parameter int VEC_W    = LANES * ELEM_W;             // 64
  parameter int RESULT_W = 2 * ELEM_W + $clog2(LANES); // 19

  // Behavioural timing (ps)
  parameter int WAVE_DMIN_PS   = 2350; // earliest output change after a launch
  parameter int WAVE_DMAX_PS   = 2950; // latest output change after a launch
  parameter int CARRIER_PS     = 3000; // balanced strobe carrier delay
  parameter int DEL_STEP_PS    = 100;  // one fine-tune delay cell
  parameter int DEL_TAPS       = 16;   // fine-tune settings 0 .. DEL_TAPS-1
  parameter int WAVE_PERIOD_PS = 670;  // nominal launch period (1.49 GHz)

  // One operand pair plus its valid flag, as it travels through the wave.
  typedef struct packed {
    logic             valid;
    logic [VEC_W-1:0] a;
    logic [VEC_W-1:0] b;
  } operands_t;

  // One captured result plus its valid flag.
  typedef struct packed {
    logic                       valid;
    logic signed [RESULT_W-1:0] dp;
  } result_t;
endpackage
