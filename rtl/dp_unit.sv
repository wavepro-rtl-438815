// dp_unit: combinational dot product of two integer vectors.
//
// dp = sum over i of a[i] * b[i], with a and b each packed as LANES lanes of
// ELEM_W bits, lane 0 in the least significant bits. This is the logic that the
// wave pipeline propagates: it holds no register and no clock. The function
// (eight 8-bit integers per 64-bit operand, one dot product per operation)
// follows the design description; the gate-level structure is left to
// synthesis, as the description balances whatever netlist synthesis produces.
// Treating the lanes as signed two's-complement integers (SIGNED = 1) and the
// lane order are this design's choices; SIGNED = 0 gives unsigned lanes.
//
// Interface: a, b in; dp out, RESULT_W bits, sign-extended when SIGNED.
// Timing: purely combinational.
module dp_unit
  import wavepro_pkg::LANES, wavepro_pkg::ELEM_W;
#(
  parameter int LANES_P  = LANES,
  parameter int ELEM_W_P = ELEM_W,
  parameter int RES_W_P  = 2 * ELEM_W_P + $clog2(LANES_P),
  parameter bit SIGNED   = 1'b1
) (
  input  logic [LANES_P*ELEM_W_P-1:0] a,
  input  logic [LANES_P*ELEM_W_P-1:0] b,
  output logic [RES_W_P-1:0]          dp
);
  timeunit 1ps;
  timeprecision 1ps;

  // Each lane's product, widened to the result width before summing.
  logic [RES_W_P-1:0] prod [LANES_P];

  always_comb begin
    for (int i = 0; i < LANES_P; i++) begin
      logic [ELEM_W_P-1:0] ai, bi;
      logic [RES_W_P-1:0]  ax, bx;
      ai = a[i*ELEM_W_P +: ELEM_W_P];
      bi = b[i*ELEM_W_P +: ELEM_W_P];
      // Extend each operand to the result width, then multiply modulo 2^RES_W_P;
      // the true product always fits, so the low bits are exact.
      ax = SIGNED ? RES_W_P'(signed'(ai)) : RES_W_P'(ai);
      bx = SIGNED ? RES_W_P'(signed'(bi)) : RES_W_P'(bi);
      prod[i] = ax * bx;
    end
  end

  always_comb begin
    dp = '0;
    for (int i = 0; i < LANES_P; i++) dp = dp + prod[i];
  end
endmodule
