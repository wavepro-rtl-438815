// tb_wave_window: self-checking test of the wave-window timing model.
//
// Part 1 changes the zero-delay result one wave at a time and probes the
// output: the previous result must still be there just before DMIN_PS, the
// output must differ from both inside the window, and the new result must be
// there just after DMAX_PS. Part 2 starts a new wave every 670 ps, so four
// to five waves are in flight, and checks each result at its sampling
// instant 3.0 ns after its launch. Part 3 starts two waves 300 ps apart,
// closer than the 600 ps window, and checks that the first never shows its
// result while the second settles normally.
module tb_wave_window;
  import wavepro_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int DMIN = 2350;
  localparam int DMAX = 2950;
  localparam int T    = 670;

  result_t ideal, result;
  int checks = 0, failures = 0;

  wave_window dut (.ideal(ideal), .result(result));

  function automatic result_t rand_res();
    result_t r;
    r.valid = 1'b1;
    r.dp    = RESULT_W'($urandom);
    return r;
  endfunction

  task automatic expect_eq(result_t r, string what);
    checks++;
    if (result !== r) begin
      failures++;
      if (failures < 10) $display("%s at %0t: got %h exp %h", what, $time, result, r);
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
    result_t prev, cur, first;
    ideal = '0;
    #5000;
    prev = '0;
    // Part 1: isolated waves
    for (int n = 0; n < 200; n++) begin
      cur = rand_res();
      cur.valid = 1'($urandom);
      if (cur == prev) cur.dp = ~cur.dp;
      ideal = cur;
      #(DMIN - 5);
      expect_eq(prev, "before window");
      #10;
      checks++;
      if (result === cur || result === prev) begin
        failures++;
        if (failures < 10) $display("inside window at %0t: output not disturbed", $time);
      end
      #(DMAX - DMIN);
      expect_eq(cur, "after window");
      #1000;
      prev = cur;
    end
    // Part 2: back-to-back waves, one per wave period
    for (int n = 0; n < 400; n++) begin
      cur = rand_res();
      ideal = cur;
      fork
        begin
          automatic result_t mine = cur;
          #3000;
          expect_eq(mine, "pipelined");
        end
      join_none
      #T;
    end
    #5000;
    // Part 3: colliding waves
    for (int n = 0; n < 50; n++) begin
      first = rand_res();
      cur   = rand_res();
      ideal = first;
      #300;
      ideal = cur;
      #(DMAX - 300 + 10);
      checks++;
      if (result === first) begin
        failures++;
        if (failures < 10) $display("collided wave settled at %0t", $time);
      end
      #300;
      expect_eq(cur, "after collision");
      #2000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
