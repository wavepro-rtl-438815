// tb_dp_unit: self-checking test of the combinational dot product.
//
// Applies corner vectors (all zeros, all -128, all +127, mixed extremes) and
// 3000 random operand pairs, and compares dp with a sum of signed lane
// products computed here in 32-bit integers. Also runs an unsigned instance
// against an unsigned reference.
module tb_dp_unit;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int LANES  = 8;
  localparam int ELEM_W = 8;
  localparam int RES_W  = 19;

  logic [LANES*ELEM_W-1:0] a, b;
  logic [RES_W-1:0]        dp_s, dp_u;

  int checks = 0, failures = 0;

  dp_unit #(.SIGNED(1'b1)) dut_s (.a(a), .b(b), .dp(dp_s));
  dp_unit #(.SIGNED(1'b0)) dut_u (.a(a), .b(b), .dp(dp_u));

  function automatic int ref_dp(logic [63:0] x, logic [63:0] y, bit sgn);
    int s = 0;
    for (int i = 0; i < 8; i++) begin
      int xi, yi;
      xi = sgn ? int'($signed(x[i*8 +: 8])) : int'(x[i*8 +: 8]);
      yi = sgn ? int'($signed(y[i*8 +: 8])) : int'(y[i*8 +: 8]);
      s += xi * yi;
    end
    return s;
  endfunction

  task automatic apply(logic [63:0] x, logic [63:0] y);
    int es, eu;
    a = x; b = y;
    #10;
    es = ref_dp(x, y, 1'b1);
    eu = ref_dp(x, y, 1'b0);
    checks += 2;
    if (int'($signed(dp_s)) != es) begin
      failures++;
      if (failures < 10) $display("signed mismatch a=%h b=%h got %0d exp %0d", x, y, $signed(dp_s), es);
    end
    if (int'(dp_u) != eu) begin
      failures++;
      if (failures < 10) $display("unsigned mismatch a=%h b=%h got %0d exp %0d", x, y, dp_u, eu);
    end
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0);
    apply({8{8'h80}}, {8{8'h80}});   // 8 * 16384 = 131072 signed
    apply({8{8'h7f}}, {8{8'h80}});
    apply({8{8'h7f}}, {8{8'h7f}});
    apply({8{8'hff}}, {8{8'hff}});
    apply(64'h0102030405060708, 64'h0807060504030201);
    for (int i = 0; i < 8; i++) apply(64'hff << (8 * i), 64'h80 << (8 * i));
    for (int n = 0; n < 3000; n++) apply({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
