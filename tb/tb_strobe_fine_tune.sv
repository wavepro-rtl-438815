// tb_strobe_fine_tune: self-checking test of the strobe fine-tune delay.
//
// For every tap setting (0 .. 15) and both inversion settings, sends one
// rising and one falling edge through the block and checks the time and
// direction of each output edge: tap k delays by k * 100 ps, and inversion
// turns a rising input edge into a falling output edge and back.
module tb_strobe_fine_tune;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int TAPS = 16;
  localparam int STEP = 100;

  logic       strobe_in, inv, strobe_out;
  logic [3:0] sel;
  int checks = 0, failures = 0;
  longint t_out;
  logic   v_out;
  int     n_out;

  strobe_fine_tune dut (.strobe_in(strobe_in), .sel(sel), .inv(inv), .strobe_out(strobe_out));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(strobe_out) begin
    t_out = $time;
    v_out = strobe_out;
    n_out++;
  end

  task automatic edge_test(logic level, int k, logic iv);
    longint t0;
    n_out = 0;
    t0 = $time;
    strobe_in = level;
    #(TAPS * STEP + 500);
    checks++;
    if (n_out != 1 || t_out - t0 != longint'(k * STEP) || v_out !== (level ^ iv)) begin
      failures++;
      if (failures < 10) $display("sel=%0d inv=%b level=%b: %0d edges, delay %0d, value %b",
                                  k, iv, level, n_out, t_out - t0, v_out);
    end
  endtask

  initial begin
    strobe_in = 1'b0;
    sel = '0;
    inv = 1'b0;
    #5000;
    for (int iv = 0; iv < 2; iv++) begin
      for (int k = 0; k < TAPS; k++) begin
        sel = 4'(k);
        inv = 1'(iv);
        #(TAPS * STEP + 500);        // let the setting change settle
        edge_test(1'b1, k, 1'(iv));
        edge_test(1'b0, k, 1'(iv));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
