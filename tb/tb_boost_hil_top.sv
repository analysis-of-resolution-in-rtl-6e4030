// End-to-end testbench of boost_hil_top at its default formats.
//
// The model is run in closed loop with a resistive load: every cycle the
// load current ir = vout_ext / R is formed from the 13-bit voltage output
// (R = 400^2 / 300 W = 533.3 ohm) and the input voltage is 200 V with
// uniform noise of +/-3 V, both quantised like ADC samples (Q2.10, Q9.3).
// The switch runs open loop at 100 kHz with a 50 % duty cycle (1000 steps
// of 10 ns per period). Two runs are made, from vout = 400 V, iL = 0 and
// from vout = 0, iL = 0 (start-up, which ends in discontinuous conduction),
// with a pause (en low) and a reload in between.
//
// Every cycle all outputs are compared with a bit-exact integer reference
// of the fixed-point equations. A real-valued model with the same constants
// and unquantised inputs runs alongside, and the relative mean absolute
// error of each state (against 400 V and 0.75 A) is reported and bounded.
// Each mechanism (closed switch, CCM, DCM, the forcing of a negative iL to
// zero, pause, reload) must occur at least once.
module tb_boost_hil_top;
  int checks = 0, failures = 0;
  longint n_on = 0, n_ccm = 0, n_dcm = 0, n_zeroed = 0, n_hold = 0, n_load = 0;

  localparam real R      = 400.0 * 400.0 / 300.0;
  localparam real DTL    = 336.0 / 2.0**25;
  localparam real DTC    = 419.0 / 2.0**22;
  localparam int  PERIOD = 1000;
  localparam int  TON    = 500;

  logic clk = 0, rst_n = 0, en = 0, load = 0, q = 0;
  logic signed [25:0] il_init = '0, il;
  logic signed [35:0] vout_init = '0, vout;
  logic signed [12:0] vg = '0, ir = '0, iin, vout_ext;
  logic signed [18:0] il_fb;
  logic signed [14:0] vout_fb;
  logic [1:0] mode;

  boost_hil_top dut (
    .clk(clk), .rst_n(rst_n), .en(en), .load(load), .il_init(il_init),
    .vout_init(vout_init), .q(q), .vg(vg), .ir(ir), .iin(iin),
    .vout_ext(vout_ext), .il(il), .vout(vout), .il_fb(il_fb),
    .vout_fb(vout_fb), .mode(mode)
  );

  always #5 clk = ~clk;

  // ---- bit-exact reference, states in LSBs ----
  longint il_r, vo_r;
  // ---- real-valued model ----
  real il_g, vo_g, err_il, err_vo;
  longint n_err;

  function automatic longint fl(input real v);   // floor to an integer
    return longint'($floor(v));
  endfunction

  function automatic longint wrap(input longint v, input int w);
    real m = 2.0 ** w;
    real h = 2.0 ** (w - 1);
    return longint'(real'(v) - m * $floor((real'(v) + h) / m));
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one model step in both references, for the inputs now applied
  task automatic ref_step(input real vg_real);
    longint fbv, fbi, vl, ic, vgc, irc;
    bit     on, ccm;
    vgc = vg; irc = ir;
    fbv = fl(real'(vo_r) / 2.0**21 + 0.5);
    fbi = fl(real'(il_r) / 2.0**7 + 0.5);
    on  = q;
    ccm = !q && il_r > 0;
    if (on) begin vl = vgc; ic = -irc; n_on++; end
    else if (ccm) begin vl = vgc - fbv; ic = fbi - irc; n_ccm++; end
    else begin vl = 0; ic = -irc; n_dcm++; if (il_r < 0) n_zeroed++; end
    check("mode", longint'(mode), on ? 0 : (ccm ? 1 : 2));
    if (!on && !ccm) il_r = 0;
    else il_r = wrap(il_r + fl(real'(vl) * 336.0 / 2.0**11 + 0.5), 26);
    vo_r = wrap(vo_r + fl(real'(ic) * 419.0 / 2.0**8 + 0.5), 36);
    // real-valued model
    begin
      real vl_g, ic_g, ir_g;
      ir_g = vo_g / R;
      if (q) begin vl_g = vg_real; ic_g = -ir_g; end
      else if (il_g > 0.0) begin vl_g = vg_real - vo_g; ic_g = il_g - ir_g; end
      else begin vl_g = 0.0; ic_g = -ir_g; end
      if (!q && !(il_g > 0.0)) il_g = 0.0; else il_g = il_g + DTL * vl_g;
      vo_g = vo_g + DTC * ic_g;
    end
  endtask

  task automatic run(input int steps, input real vo0, input int pause_at);
    real vg_real;
    il_r = 0;
    vo_r = fl(vo0 * 2.0**24);
    il_g = 0.0; vo_g = real'(vo_r) / 2.0**24;
    err_il = 0.0; err_vo = 0.0; n_err = 0;
    @(negedge clk);
    load = 1; il_init = '0; vout_init = 36'(vo_r); en = 0;
    n_load++;
    @(negedge clk);
    load = 0;
    check("load il", il, 0);
    check("load vout", vout, vo_r);
    for (int k = 0; k < steps; k++) begin
      // drive on the falling edge
      q  = (k % PERIOD) < TON;
      vg_real = 200.0 + 6.0 * ($urandom % 1000) / 1000.0 - 3.0;
      vg = 13'(fl(vg_real * 8.0 + 0.5));
      ir = 13'(fl(real'(vout_ext) / 2.0 / R * 1024.0 + 0.5));
      en = !(k >= pause_at && k < pause_at + 20);
      #1;
      if (en) ref_step(vg_real);
      else n_hold++;
      @(posedge clk);
      @(negedge clk);
      check("il", il, il_r);
      check("vout", vout, vo_r);
      check("il_fb", il_fb, fl(real'(il_r) / 2.0**7 + 0.5));
      check("vout_fb", vout_fb, fl(real'(vo_r) / 2.0**21 + 0.5));
      check("iin", iin, fl(real'(il_r) / 2.0**13 + 0.5));
      check("vout_ext", vout_ext, fl(real'(vo_r) / 2.0**23 + 0.5));
      if (en) begin
        err_il += ((il_g - real'(il) / 2.0**17) < 0 ? -(il_g - real'(il) / 2.0**17) : (il_g - real'(il) / 2.0**17));
        err_vo += ((vo_g - real'(vout) / 2.0**24) < 0 ? -(vo_g - real'(vout) / 2.0**24) : (vo_g - real'(vout) / 2.0**24));
        n_err++;
      end
    end
    err_il = err_il / real'(n_err) / 0.75;
    err_vo = err_vo / real'(n_err) / 400.0;
    $display("run from vout=%0.1f V: final vout=%0.3f V iL=%0.3f A, relative MAE vout=%e iL=%e",
             vo0, real'(vout) / 2.0**24, real'(il) / 2.0**17, err_vo, err_il);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    check("reset il", il, 0);
    check("reset vout", vout, 0);
    rst_n = 1;
    // feedback sizing rule: default formats and a case where the total
    // width (rule II) rather than the fractional width (rule I) decides
    check("fb rule vout", hil_pkg::fb_frac_bits(11, 9, 3), 3);
    check("fb rule iL", hil_pkg::fb_frac_bits(8, 2, 10), 10);
    check("fb rule II", hil_pkg::fb_frac_bits(8, 12, 0), 4);
    check("il_fb width", $bits(il_fb), 19);
    check("vout_fb width", $bits(vout_fb), 15);
    run(200_000, 400.0, 100_123);
    checks++;
    if (err_vo > 1e-4 || err_il > 1e-2) begin
      failures++; $display("FAIL: error against the real-valued model too large");
    end
    run(300_000, 0.0, 250_000);
    checks++;
    if (err_vo > 1e-4 || err_il > 1e-2) begin
      failures++; $display("FAIL: error against the real-valued model too large");
    end
    $display("mechanisms: on=%0d ccm=%0d dcm=%0d zeroed=%0d hold=%0d load=%0d",
             n_on, n_ccm, n_dcm, n_zeroed, n_hold, n_load);
    checks++;
    if (n_on == 0 || n_ccm == 0 || n_dcm == 0 || n_zeroed == 0 || n_hold == 0 || n_load < 2) begin
      failures++; $display("FAIL: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
