// tb_corners: the self-timed strobe across global delay corners.
//
// All logic delays of the unit are scaled by a corner factor k (0.90, 1.00,
// 1.05, 1.10, 1.13), as a slow or fast process, voltage or temperature
// corner would scale them. For each corner two units are swept over launch
// periods 0.5-1.2 ns (20 ps steps) with the fine-tune delay at 0:
//   tracking  the strobe carrier scales with the logic (k * 3.0 ns), as it
//             does when it is built from the same gates and balanced with it;
//   fixed     the strobe stays at the nominal 3.0 ns, as a strobe derived
//             from a fixed count of clock cycles would.
// A unit passes a period when every result is right. The checks compare the
// shortest passing period with the window rule k*Dmax < S < k*Dmin + T. The
// tracking unit must pass at every corner, needing only a period above the
// scaled skew k * 0.65 ns. The fixed strobe must fail at every period once
// k * 2.95 ns exceeds 3.0 ns.
module tb_corners;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int NK = 5;
  localparam int K_PERMILLE [NK] = '{900, 1000, 1050, 1100, 1130};
  localparam int DMIN = 2350, DMAX = 2950, CARRIER = 3000;
  localparam int P_FIRST = 500, P_LAST = 1200, P_STEP = 20;

  int checks = 0, failures = 0;
  int min_track [NK];
  int min_fixed [NK];
  bit done_track [NK];
  bit done_fixed [NK];

  for (genvar i = 0; i < NK; i++) begin : g_corner
    localparam int K = K_PERMILLE[i];
    corner_harness #(
      .DMIN_PS(DMIN * K / 1000), .DMAX_PS(DMAX * K / 1000), .CARRIER_D_PS(CARRIER * K / 1000),
      .P_FIRST(P_FIRST), .P_LAST(P_LAST), .P_STEP(P_STEP)
    ) u_track (.min_pass(min_track[i]), .done(done_track[i]));
    corner_harness #(
      .DMIN_PS(DMIN * K / 1000), .DMAX_PS(DMAX * K / 1000), .CARRIER_D_PS(CARRIER),
      .P_FIRST(P_FIRST), .P_LAST(P_LAST), .P_STEP(P_STEP)
    ) u_fixed (.min_pass(min_fixed[i]), .done(done_fixed[i]));
  end

  // shortest grid period that the window rule lets pass, -1 if none
  function automatic int predict(int dmin, int dmax, int s);
    if (s <= dmax) return -1;
    for (int p = P_FIRST; p <= P_LAST; p += P_STEP)
      if (s < dmin + p) return p;
    return -1;
  endfunction

  initial begin : watchdog
    #500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      #100_000;
      all_done = 1'b1;
      for (int i = 0; i < NK; i++) all_done &= done_track[i] & done_fixed[i];
    end while (!all_done);
    $display("corner  min period tracking strobe  min period fixed strobe  (ps, -1 = never)");
    for (int i = 0; i < NK; i++) begin
      int k, dmin, dmax, pt, pf;
      k    = K_PERMILLE[i];
      dmin = DMIN * k / 1000;
      dmax = DMAX * k / 1000;
      pt   = predict(dmin, dmax, CARRIER * k / 1000);
      pf   = predict(dmin, dmax, CARRIER);
      $display("%0d.%03d  %8d (expect %0d)   %8d (expect %0d)", k / 1000, k % 1000,
               min_track[i], pt, min_fixed[i], pf);
      checks += 3;
      if (min_track[i] != pt) failures++;
      if (min_fixed[i] != pf) failures++;
      if (min_track[i] < 0) begin
        failures++;
        $display("tracking strobe failed at corner %0d", k);
      end
    end
    checks++;
    if (min_fixed[NK-1] >= 0) begin
      failures++;
      $display("fixed strobe unexpectedly passed at the slowest corner");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
