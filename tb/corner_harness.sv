// corner_harness: runs one wave-pipelined unit through a launch-period sweep.
//
// Test helper for tb_corners. It instantiates wavepro_dp_top with the given
// logic window (DMIN_PS, DMAX_PS) and carrier delay, fine-tune at 0, and for
// launch periods from P_FIRST to P_LAST in P_STEP steps streams N_OPS random
// operations, checking every captured result (value, valid flag, order,
// capture time). min_pass reports the shortest period with no error, or -1 if
// none passed; done rises when the sweep has finished.
module corner_harness
  import wavepro_pkg::*;
#(
  parameter int DMIN_PS      = WAVE_DMIN_PS,
  parameter int DMAX_PS      = WAVE_DMAX_PS,
  parameter int CARRIER_D_PS = CARRIER_PS,
  parameter int P_FIRST      = 500,
  parameter int P_LAST       = 1200,
  parameter int P_STEP       = 20,
  parameter int N_OPS        = 30
) (
  output int min_pass,
  output bit done
);
  timeunit 1ps;
  timeprecision 1ps;

  logic                       launch_clk, rst_n, in_valid;
  logic [VEC_W-1:0]           a, b;
  logic                       strobe_clk, out_valid;
  logic signed [RESULT_W-1:0] dp_out;

  wavepro_dp_top #(.DMIN_PS(DMIN_PS), .DMAX_PS(DMAX_PS), .CARRIER_D_PS(CARRIER_D_PS)) dut (
    .launch_clk(launch_clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .del_sel('0), .del_inv(1'b0),
    .strobe_clk(strobe_clk), .out_valid(out_valid), .dp_out(dp_out)
  );

  typedef struct {
    longint t_cap;
    bit     valid;
    int     dp;
  } entry_t;

  entry_t sb[$];
  int  half_ps = 500;
  bit  clk_run = 1'b0;
  int  errors  = 0;

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
    e.t_cap = $time + longint'(CARRIER_D_PS);
    e.valid = in_valid;
    e.dp    = ref_dp(a, b);
    sb.push_back(e);
  end

  always @(posedge strobe_clk) if (rst_n) begin
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

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a = '0; b = '0;
    min_pass = -1;
    done     = 1'b0;
    for (int p = P_FIRST; p <= P_LAST; p += P_STEP) begin
      clk_run = 1'b0;
      rst_n   = 1'b0;
      #10000;
      sb.delete();
      half_ps = p / 2;
      errors  = 0;
      rst_n   = 1'b1;
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
      #(CARRIER_D_PS + 5000);
      errors = errors + sb.size();
      if (errors == 0 && min_pass < 0) min_pass = p;
    end
    done = 1'b1;
  end
endmodule
