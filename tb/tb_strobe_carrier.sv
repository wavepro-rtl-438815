// tb_strobe_carrier: self-checking test of the strobe carrier model.
//
// Toggles the input as a 670 ps clock, so that several edges are in the
// 3.0 ns carrier at once, and checks that every output edge comes exactly
// 3000 ps after the matching input edge, with the same polarity.
module tb_strobe_carrier;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int DELAY = 3000;

  logic clk_in, clk_out;
  int checks = 0, failures = 0;
  longint t_in[$];
  logic   v_in[$];

  strobe_carrier dut (.clk_in(clk_in), .clk_out(clk_out));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The stimulus starts at 1000 ps; the settling of the initial value at
  // time 0 is not an edge.
  always @(clk_in) begin
    if ($time > 0) begin
      t_in.push_back($time);
      v_in.push_back(clk_in);
    end
  end

  always @(clk_out) if ($time > 0) begin
    longint t;
    logic   v;
    checks++;
    if (t_in.size() == 0) begin
      failures++;
      $display("output edge at %0t with no input edge", $time);
    end else begin
      t = t_in.pop_front();
      v = v_in.pop_front();
      if ($time - t != longint'(DELAY) || clk_out !== v) begin
        failures++;
        if (failures < 10) $display("edge at %0t: in edge at %0t, value %b exp %b", $time, t, clk_out, v);
      end
    end
  end

  initial begin
    clk_in = 1'b0;
    #1000;
    for (int n = 0; n < 300; n++) #335 clk_in = ~clk_in;
    // irregular edges too
    for (int n = 0; n < 100; n++) #(50 + ($urandom % 900)) clk_in = ~clk_in;
    #(DELAY + 1000);
    checks++;
    if (t_in.size() != 0) begin
      failures++;
      $display("%0d input edges never came out", t_in.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
