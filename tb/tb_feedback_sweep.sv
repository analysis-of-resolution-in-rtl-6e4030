// Feedback-resolution sweep: how many fractional bits the feedback signals need.
//
// Eleven copies of the model run side by side from the same switch command and
// the same noisy input voltage (200 V with +/-3 V uniform noise, 100 kHz,
// 50 % duty cycle, resistive load of 533 ohm). In each copy every signal
// has 24 fractional bits more than its default format, except one input
// and its associated feedback signal:
//   lanes 0-5:  vg kept at Q9.3, voutFeedback Q11.Y, Y = 48, 8, 3, 0, -3, -5
//   lanes 6-10: ir kept at Q2.10, iLFeedback Q8.Y,   Y = 41, 10, 4, 0, -4
// A real-valued model with dt/L = 1e-5 and dt/C = 1e-4 and unquantised
// inputs gives the reference. The mean absolute error of each state is
// reported relative to 400 V and 0.75 A.
//
// Three runs: 200 ms from vout = 400 V, iL = 0; the first 2 ms of start-up
// from vout = 0, iL = 0; and 200 ms of start-up (reported, not checked). Checked: more feedback bits than
// the sizing criteria give (Y >= Y(input) and X+Y >= X+Y(input):
// voutFeedback Q11.3, iLFeedback Q8.10) no longer lower the error
// (within 1.2x of the floor at Q11.8 and Q8.10); at the knee of the curve
// (Q11.3, Q8.4) the error is within a decade of that floor; six bits
// coarser, the feedback dominates the error by more than 10x. Runs about
// a minute with verilator.
module tb_feedback_sweep;
  localparam int  STEPS1 = 20_000_000; // 200 ms
  localparam int  STEPS2 = 200_000;    // 2 ms
  localparam real R      = 400.0 * 400.0 / 300.0;
  localparam int  NL     = 11;
  localparam int  YV[6]  = '{48, 8, 3, 0, -3, -5};
  localparam int  YI[5]  = '{41, 10, 4, 0, -4};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, en = 0, q = 0, acc = 0;
  real vo0 = 0.0, vg_real = 200.0, il_ref = 0.0, vo_ref = 0.0;
  real err_il[NL], err_vo[NL], il_max[NL];
  real mae_il[NL], mae_vo[NL];

  always #5 clk = ~clk;

  for (genvar i = 0; i < 6; i++) begin : g_v
    sweep_lane #(
      .VG_Y(3), .IR_Y(34), .IL_Y(41), .VO_Y(48), .FBV_Y(YV[i]), .FBI_Y(41),
      .DTL_Y(49), .DTC_Y(46), .R(R)
    ) lane (
      .clk(clk), .rst_n(rst_n), .load(load), .en(en), .acc(acc), .q(q), .vo0(vo0),
      .vg_real(vg_real), .il_ref(il_ref), .vo_ref(vo_ref),
      .err_il(err_il[i]), .err_vo(err_vo[i]), .il_max(il_max[i])
    );
  end
  for (genvar i = 0; i < 5; i++) begin : g_i
    sweep_lane #(
      .VG_Y(27), .IR_Y(10), .IL_Y(41), .VO_Y(48), .FBV_Y(48), .FBI_Y(YI[i]),
      .DTL_Y(49), .DTC_Y(46), .R(R)
    ) lane (
      .clk(clk), .rst_n(rst_n), .load(load), .en(en), .acc(acc), .q(q), .vo0(vo0),
      .vg_real(vg_real), .il_ref(il_ref), .vo_ref(vo_ref),
      .err_il(err_il[6+i]), .err_vo(err_vo[6+i]), .il_max(il_max[6+i])
    );
  end

  initial begin
    repeat (2 * STEPS1 + STEPS2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int steps, input real v0);
    real il_g, vo_g, vl_g, ic_g;
    vo0 = v0;
    @(negedge clk);
    load = 1; en = 0; acc = 0;
    @(negedge clk);
    load = 0; en = 1;
    il_g = 0.0; vo_g = v0;
    for (int k = 0; k < steps; k++) begin
      q       = (k % 1000) < 500;
      vg_real = 200.0 + 6.0 * ($urandom % 1000) / 1000.0 - 3.0;
      il_ref  = il_g;
      vo_ref  = vo_g;
      acc     = 1;
      if (q) begin vl_g = vg_real; ic_g = -vo_g / R; end
      else if (il_g > 0.0) begin vl_g = vg_real - vo_g; ic_g = il_g - vo_g / R; end
      else begin vl_g = 0.0; ic_g = -vo_g / R; end
      if (!q && !(il_g > 0.0)) il_g = 0.0; else il_g = il_g + 1.0e-5 * vl_g;
      vo_g = vo_g + 1.0e-4 * ic_g;
      @(negedge clk);
    end
    acc = 0; en = 0;
    @(negedge clk);
    for (int i = 0; i < NL; i++) begin
      mae_il[i] = err_il[i] / real'(steps) / 0.75;
      mae_vo[i] = err_vo[i] / real'(steps) / 400.0;
    end
    $display("run from vout = %0.0f V, %0d steps; peak iL %0.2f A", v0, steps, il_max[0]);
    for (int i = 0; i < 6; i++)
      $display("  voutFeedback Q11.%0d (vg Q9.3): log10 rel. MAE vout %7.3f  iL %7.3f",
               YV[i], $log10(mae_vo[i]), $log10(mae_il[i]));
    for (int i = 0; i < 5; i++)
      $display("  iLFeedback   Q8.%0d (ir Q2.10): log10 rel. MAE vout %7.3f  iL %7.3f",
               YI[i], $log10(mae_vo[6+i]), $log10(mae_il[6+i]));
  endtask

  // err(a) within a factor f of err(b)
  task automatic near(input string what, input real a, input real b, input real f);
    checks++;
    if (a > b * f) begin
      failures++;
      $display("FAIL %s: %e is more than %0.1f x %e", what, a, f, b);
    end
  endtask

  task automatic worse(input string what, input real a, input real b, input real f);
    checks++;
    if (!(a > b * f)) begin
      failures++;
      $display("FAIL %s: %e is not %0.1f x above %e", what, a, f, b);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(STEPS1, 400.0);
    // above the criteria the extra feedback bits are wasted: same error
    near ("vout fb Q11.8 vs Q11.48, vout", mae_vo[1], mae_vo[0], 1.2);
    near ("vout fb Q11.8 vs Q11.48, iL",   mae_il[1], mae_il[0], 1.2);
    near ("iL fb Q8.10 vs Q8.41, vout",    mae_vo[7], mae_vo[6], 1.2);
    near ("iL fb Q8.10 vs Q8.41, iL",      mae_il[7], mae_il[6], 1.2);
    // at the criteria (the knee) the error is within a decade of the floor
    near ("vout fb Q11.3 vs Q11.48, vout", mae_vo[2], mae_vo[0], 10.0);
    near ("vout fb Q11.3 vs Q11.48, iL",   mae_il[2], mae_il[0], 10.0);
    near ("iL fb Q8.4 vs Q8.41, iL",       mae_il[8], mae_il[6], 10.0);
    // well below, the feedback dominates the error
    worse("vout fb Q11.-3 vs Q11.48, iL",  mae_il[4], mae_il[0], 10.0);
    worse("iL fb Q8.-4 vs Q8.41, iL",      mae_il[10], mae_il[6], 10.0);
    run(STEPS2, 0.0);
    checks++;
    if (il_max[0] < 100.0) begin
      failures++; $display("FAIL: start-up peak current %f A", il_max[0]);
    end
    near ("start-up, vout fb Q11.8 vs Q11.48, vout", mae_vo[1], mae_vo[0], 1.2);
    near ("start-up, iL fb Q8.10 vs Q8.41, iL",      mae_il[7], mae_il[6], 1.2);
    near ("start-up, vout fb Q11.3 vs Q11.48, vout", mae_vo[2], mae_vo[0], 10.0);
    near ("start-up, iL fb Q8.4 vs Q8.41, iL",       mae_il[8], mae_il[6], 10.0);
    worse("start-up, vout fb Q11.-3 vs Q11.48, iL",  mae_il[4], mae_il[0], 10.0);
    worse("start-up, iL fb Q8.-4 vs Q8.41, iL",      mae_il[10], mae_il[6], 10.0);
    // whole start-up run, reported only: after 2 ms the current spends most
    // of each period in discontinuous conduction, where iL is reset to zero
    run(STEPS1, 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
