// tb_shmoo: wave-period / strobe-delay sweep of the wave-pipelined unit.
//
// Repeats the pass/fail sweep used to characterise the unit: the launch
// period runs from 0.4 ns to 1.9 ns and the strobe delay from 2.6 ns to
// 4.5 ns, both in 0.1 ns steps. To reach strobe delays below the balanced
// 3.0 ns, the carrier is shortened to 2.6 ns and the fine-tune line given 20
// taps; everything else is at its default. Each of the 320 points resets the
// unit, streams 40 random operations and counts wrong or missing results.
//
// The checked rule: a point passes exactly when the strobe arrives after the
// logic has settled and before the next wave disturbs it,
//   DMAX < S < DMIN + T   (2.95 ns < S < 2.35 ns + T with the default model).
// Each point counts as one check: the observed pass/fail must match the rule.
// The table printed at the end has the same layout as a shmoo plot: rows are
// strobe delays, high to low, and columns are launch periods.
module tb_shmoo;
  import wavepro_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int CARRIER = 2600;
  localparam int TAPS    = 20;
  localparam int N_OPS   = 40;

  logic                       launch_clk, rst_n, in_valid;
  logic [VEC_W-1:0]           a, b;
  logic [4:0]                 del_sel;
  logic                       del_inv;
  logic                       strobe_clk, out_valid;
  logic signed [RESULT_W-1:0] dp_out;

  wavepro_dp_top #(.CARRIER_D_PS(CARRIER), .TAPS(TAPS)) dut (
    .launch_clk(launch_clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .del_sel(del_sel), .del_inv(del_inv),
    .strobe_clk(strobe_clk), .out_valid(out_valid), .dp_out(dp_out)
  );

  typedef struct {
    longint t_cap;
    bit     valid;
    int     dp;
  } entry_t;

  entry_t sb[$];
  int checks = 0, failures = 0;
  int half_ps = 335;
  bit clk_run = 1'b0;
  bit ignore  = 1'b1;
  int errors;                         // wrong results at the current point
  string row[20];

  initial begin : watchdog
    #500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  always @(posedge launch_clk) if (rst_n) begin
    entry_t e;
    e.t_cap = $time + longint'(CARRIER + int'(del_sel) * DEL_STEP_PS);
    e.valid = in_valid;
    e.dp    = ref_dp(a, b);
    sb.push_back(e);
  end

  always @(posedge strobe_clk) if (!ignore) begin
    longint now;
    now = $time;
    #1;
    if (sb.size() == 0 || now < sb[0].t_cap - 1) begin
      if (out_valid) errors++;
    end else begin
      entry_t e;
      e = sb.pop_front();
      if (now > e.t_cap + 1) errors++;
      else if (out_valid !== e.valid || (e.valid && int'(dp_out) != e.dp)) errors++;
    end
  end

  task automatic run_point(int period, int sel);
    clk_run = 1'b0;
    #10000;                           // drain the previous point
    errors  = errors + sb.size();     // launches that never got a strobe
    sb.delete();
    ignore  = 1'b1;
    rst_n   = 1'b0;
    half_ps = period / 2;
    del_sel = 5'(sel);
    #2000;
    rst_n   = 1'b1;
    ignore  = 1'b0;
    errors  = 0;
    clk_run = 1'b1;
    for (int i = 0; i < N_OPS; i++) begin
      @(negedge launch_clk);
      in_valid = 1'b1;
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
    end
    @(negedge launch_clk);
    in_valid = 1'b0;
    clk_run  = 1'b0;
    #10000;
    errors = errors + sb.size();
    sb.delete();
  endtask

  initial begin
    int n_pass = 0;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a = '0; b = '0;
    del_sel = '0;
    del_inv = 1'b0;
    errors  = 0;
    for (int s = 0; s < TAPS; s++) row[s] = "";
    for (int t = 4; t <= 19; t++) begin
      for (int s = 0; s < TAPS; s++) begin
        int  period, strobe;
        bit  predicted, observed;
        period = t * 100;
        strobe = CARRIER + s * DEL_STEP_PS;
        run_point(period, s);
        observed  = (errors == 0);
        predicted = (strobe > WAVE_DMAX_PS) && (strobe < WAVE_DMIN_PS + period);
        checks++;
        if (observed != predicted) begin
          failures++;
          $display("T=%0d ps S=%0d ps: %s, expected %s (%0d errors)", period, strobe,
                   observed ? "pass" : "fail", predicted ? "pass" : "fail", errors);
        end
        if (observed) n_pass++;
        row[s] = {row[s], observed ? "  P " : "  . "};
      end
    end
    $display("strobe delay [ns] vs wave period [ns], P = pass");
    for (int s = TAPS - 1; s >= 0; s--)
      $display("%0d.%0d %s", (CARRIER + s * 100) / 1000, ((CARRIER + s * 100) % 1000) / 100, row[s]);
    $display("    0.4 0.5 0.6 0.7 0.8 0.9 1.0 1.1 1.2 1.3 1.4 1.5 1.6 1.7 1.8 1.9");
    $display("%0d passing points of %0d", n_pass, 16 * TAPS);
    checks++;
    if (n_pass == 0 || n_pass == 16 * TAPS) begin
      failures++;
      $display("sweep has no pass/fail boundary");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
