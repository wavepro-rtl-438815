// tb_wavepro_dp_top: end-to-end test of the wave-pipelined dot-product unit.
//
// The top runs with all parameters at their defaults. A scoreboard records
// every launch (time, valid flag, dot product computed here from the
// operands) and expects exactly one capture for it, on the strobe edge that
// arrives carrier + del_sel * 100 ps (+ half a launch period when del_inv
// is set) after the launch, in launch order, with the right valid flag and
// result. This checks both the data and the latency of each operation, and
// that one result comes out per launch period.
//
// Phases:
//   A  0.67 ns launch period (1.49 GHz), del_sel 0: four to five waves in
//      flight, random bubbles, extreme operands included
//   B  1.3 ns period, del_sel 5: sampling moved later by the fine-tune delay
//   C  1.4 ns period, del_inv 1: sampling on the inverted strobe
// Between phases the launch clock stops, the pipeline drains and the strobe
// settings change; strobe edges made by the switch itself are ignored.
// Mechanisms counted (each must occur): overlapping waves, bubbles captured,
// captures through a non-zero delay tap, captures on the inverted strobe.
module tb_wavepro_dp_top;
  import wavepro_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic                       launch_clk, rst_n, in_valid;
  logic [VEC_W-1:0]           a, b;
  logic [3:0]                 del_sel;
  logic                       del_inv;
  logic                       strobe_clk, out_valid;
  logic signed [RESULT_W-1:0] dp_out;

  wavepro_dp_top dut (
    .launch_clk(launch_clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .del_sel(del_sel), .del_inv(del_inv),
    .strobe_clk(strobe_clk), .out_valid(out_valid), .dp_out(dp_out)
  );

  typedef struct {
    longint t_cap;   // expected capture time
    bit     valid;
    int     dp;
  } entry_t;

  entry_t sb[$];
  int checks = 0, failures = 0;
  int half_ps = WAVE_PERIOD_PS / 2;
  bit clk_run = 1'b0;
  bit ignore  = 1'b1;
  int n_overlap = 0, n_bubble = 0, n_tap = 0, n_inv = 0, n_valid = 0, max_flight = 0;

  initial begin : watchdog
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // launch clock, stopped low while clk_run is clear
  initial begin
    launch_clk = 1'b0;
    forever begin
      if (clk_run) begin
        #(half_ps) launch_clk = 1'b1;
        #(half_ps) launch_clk = 1'b0;
      end else #10;
    end
  end

  function automatic int ref_dp(logic [63:0] x, logic [63:0] y);
    int s = 0;
    for (int i = 0; i < 8; i++) s += int'($signed(x[i*8 +: 8])) * int'($signed(y[i*8 +: 8]));
    return s;
  endfunction

  function automatic longint strobe_delay();
    return longint'(CARRIER_PS + int'(del_sel) * DEL_STEP_PS + (del_inv ? half_ps : 0));
  endfunction

  // scoreboard: one entry per launch edge after reset
  always @(posedge launch_clk) if (rst_n) begin
    entry_t e;
    e.t_cap = $time + strobe_delay();
    e.valid = in_valid;
    e.dp    = ref_dp(a, b);
    if (sb.size() > 0) n_overlap++;
    sb.push_back(e);
    if (sb.size() > max_flight) max_flight = sb.size();
  end

  // monitor: every strobe edge is matched with the oldest launch
  always @(posedge strobe_clk) if (!ignore) begin
    longint now;
    now = $time;
    #1;
    if (sb.size() == 0 || now < sb[0].t_cap - 1) begin
      // edge of a launch made during reset: must carry no result
      checks++;
      if (out_valid) begin
        failures++;
        $display("unexpected valid capture at %0t", now);
      end
    end else begin
      entry_t e;
      e = sb.pop_front();
      checks++;
      if (now > e.t_cap + 1) begin
        failures++;
        if (failures < 10) $display("capture due at %0t missing (edge at %0t)", e.t_cap, now);
      end else if (out_valid !== e.valid || (e.valid && int'(dp_out) != e.dp)) begin
        failures++;
        if (failures < 10) $display("at %0t: got %b/%0d exp %b/%0d", now, out_valid, dp_out, e.valid, e.dp);
      end else begin
        if (!e.valid) n_bubble++;
        else n_valid++;
        if (del_sel != 0) n_tap++;
        if (del_inv) n_inv++;
      end
    end
  end

  task automatic stream(int n, int bubble_pct);
    for (int i = 0; i < n; i++) begin
      @(negedge launch_clk);
      in_valid = ($urandom % 100) >= bubble_pct;
      case ($urandom % 16)
        0: begin a = {8{8'h80}}; b = {8{8'h80}}; end
        1: begin a = {8{8'h7f}}; b = {8{8'h80}}; end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
    end
    @(negedge launch_clk);
    in_valid = 1'b0;
  endtask

  task automatic drain_and_set(int half, logic [3:0] sel, logic inv);
    clk_run = 1'b0;                 // stop launching, let the waves drain
    #10000;
    checks++;
    if (sb.size() != 0) begin
      failures++;
      $display("pipeline did not drain: %0d outstanding", sb.size());
      sb.delete();
    end
    ignore  = 1'b1;
    del_sel = sel;
    del_inv = inv;
    half_ps = half;
    #5000;
    ignore  = 1'b0;
    clk_run = 1'b1;
  endtask

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a = '0; b = '0;
    del_sel = '0;
    del_inv = 1'b0;
    #1000;
    ignore  = 1'b0;
    clk_run = 1'b1;
    repeat (10) @(negedge launch_clk);
    rst_n = 1'b1;

    // A: full rate
    stream(3000, 15);
    // B: later sampling through the fine-tune delay line
    drain_and_set(650, 4'd5, 1'b0);
    stream(500, 15);
    // C: inverted strobe
    drain_and_set(700, 4'd0, 1'b1);
    stream(500, 15);
    drain_and_set(WAVE_PERIOD_PS / 2, 4'd0, 1'b0);

    $display("valid results %0d, bubbles %0d, overlapping launches %0d (max %0d in flight), tap captures %0d, inverted captures %0d",
             n_valid, n_bubble, n_overlap, max_flight, n_tap, n_inv);
    checks++;
    if (n_overlap == 0 || max_flight < 4) begin failures++; $display("waves never overlapped"); end
    checks++;
    if (n_bubble == 0) begin failures++; $display("no bubble seen"); end
    checks++;
    if (n_tap == 0) begin failures++; $display("no capture through a delay tap"); end
    checks++;
    if (n_inv == 0) begin failures++; $display("no capture on the inverted strobe"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
