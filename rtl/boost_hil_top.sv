// boost_hil_top: real-time fixed-point model of a lossless boost converter.
//
// Every enabled clock cycle is one explicit-Euler time step of the converter
// (inductor L, output capacitor C, switch Q, diode, load current ir):
//   iL(k)   = iL(k-1)   + dt/L * vL(k-1)
//   vout(k) = vout(k-1) + dt/C * iC(k-1)
// with vL and iC chosen by the conduction mode:
//   Q = 1            : vL = vg,              iC = -ir
//   Q = 0, iL > 0    : vL = vg - vout_fb,    iC = il_fb - ir      (CCM)
//   Q = 0, iL <= 0   : vL = 0, iL(k) = 0,    iC = -ir             (DCM)
// The two state variables are stored with many fractional bits (iL Q8.17,
// vout Q11.24) so that the small per-step increments are not lost. Each
// state reaches the other half of the model only through a feedback signal
// that keeps its integer bits but only FBV_Y / FBI_Y fractional bits
// (voutFeedback Q11.FBV_Y, iLFeedback Q8.FBI_Y). The default widths of the
// feedback signals meet the sizing rule for feedback signals: at least as
// many fractional bits as the input they are combined with
// (FBV_Y >= VG_Y, FBI_Y >= IR_Y) and at least as many integer-plus-
// fractional bits (11+FBV_Y >= 9+3, 8+FBI_Y >= 2+10), which gives
// voutFeedback Q11.3 and iLFeedback Q8.10. The defaults are computed from
// the input and state formats (hil_pkg::fb_frac_bits), so they follow when
// an ADC width changes; they can also be set directly.
//
// Interface: vg (Q9.3) and ir (Q2.10) come from ADCs and the outputs
// iin (Q8.4) and vout_ext (Q11.1) go to DACs, all 13 bits wide. q is the
// switch command from the controller under test. load with il_init and
// vout_init sets the initial conditions; en low pauses the emulation. The
// states, feedback signals and the decoded mode are also brought out for
// observation.
//
// Timing: the whole step (requantize, subtract, select, multiply, add) is
// combinational between the two state registers, so a step takes one
// cycle; with dt = 10 ns the model runs at 100 MHz. Inputs sampled on a
// rising edge affect the states after that edge; the outputs follow the
// states combinationally.
//
// Taken from the published fixed-point design this follows: the datapath,
// the signal formats (states, inputs, outputs, the 10-bit constants dt/L
// Q-16.25 and dt/C Q-13.22), the switching equations and the sizing rule of
// the feedback signals. This design's choices: dt = 10 ns and the constant
// codes (round(dt/L * 2^25) = 336, round(dt/C * 2^22) = 419 for
// L = 1 mH, C = 100 uF), the output formats, the mode taken from the sign
// of the full-precision iL, rounding wherever bits are dropped, the
// enable/load controls and the reset to zero.
module boost_hil_top
  import hil_pkg::*;
#(
  parameter int VG_X  = 9,    // input voltage vg: Q9.3
  parameter int VG_Y  = 3,
  parameter int IR_X  = 2,    // load current ir: Q2.10
  parameter int IR_Y  = 10,
  parameter int IL_X  = 8,    // inductor current state iL: Q8.17
  parameter int IL_Y  = 17,
  parameter int VO_X  = 11,   // output voltage state vout: Q11.24
  parameter int VO_Y  = 24,
  // feedback fractional bits by the sizing rule: Q11.3 and Q8.10
  parameter int FBV_Y = fb_frac_bits(VO_X, VG_X, VG_Y),  // voutFeedback Q11.FBV_Y
  parameter int FBI_Y = fb_frac_bits(IL_X, IR_X, IR_Y),  // iLFeedback Q8.FBI_Y
  parameter int DTL_X = -16,  // dt/L: Q-16.25
  parameter int DTL_Y = 25,
  parameter longint DTL_CODE = 336,
  parameter int DTC_X = -13,  // dt/C: Q-13.22
  parameter int DTC_Y = 22,
  parameter longint DTC_CODE = 419,
  parameter int OUT_W = 13,   // DAC width of iin and vout_ext
  localparam int VGW  = 1 + VG_X + VG_Y,
  localparam int IRW  = 1 + IR_X + IR_Y,
  localparam int ILW  = 1 + IL_X + IL_Y,
  localparam int VOW  = 1 + VO_X + VO_Y,
  localparam int FBVW = 1 + VO_X + FBV_Y,
  localparam int FBIW = 1 + IL_X + FBI_Y
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   load,
  input  logic signed [ILW-1:0]  il_init,
  input  logic signed [VOW-1:0]  vout_init,
  input  logic                   q,
  input  logic signed [VGW-1:0]  vg,
  input  logic signed [IRW-1:0]  ir,
  output logic signed [OUT_W-1:0] iin,
  output logic signed [OUT_W-1:0] vout_ext,
  output logic signed [ILW-1:0]  il,
  output logic signed [VOW-1:0]  vout,
  output logic signed [FBIW-1:0] il_fb,
  output logic signed [FBVW-1:0] vout_fb,
  output logic [1:0]             mode
);

  // Formats of the intermediate signals, by the addition rule.
  localparam int VL_X = imax(VG_X, VO_X) + 1;
  localparam int VL_Y = imax(VG_Y, FBV_Y);
  localparam int IC_X = imax(IR_X, IL_X) + 1;
  localparam int IC_Y = imax(IR_Y, FBI_Y);

  conv_mode_e                cmode;
  logic signed [VL_X+VL_Y:0] vl;
  logic signed [IC_X+IC_Y:0] ic;

  assign cmode = decode_mode(q, il > 0);
  assign mode  = cmode;

  // Feedback signals: the states with fewer fractional bits.
  fx_requantize #(.X(VO_X), .YI(VO_Y), .YO(FBV_Y)) u_vout_fb (
    .din(vout), .dout(vout_fb)
  );
  fx_requantize #(.X(IL_X), .YI(IL_Y), .YO(FBI_Y)) u_il_fb (
    .din(il), .dout(il_fb)
  );

  // Inductor branch.
  vl_select #(.VG_X(VG_X), .VG_Y(VG_Y), .FB_X(VO_X), .FB_Y(FBV_Y)) u_vl (
    .vg(vg), .vout_fb(vout_fb), .mode(cmode), .vl(vl)
  );
  euler_integrator #(
    .IN_X(VL_X), .IN_Y(VL_Y), .K_X(DTL_X), .K_Y(DTL_Y), .K_CODE(DTL_CODE),
    .S_X(IL_X), .S_Y(IL_Y)
  ) u_il (
    .clk(clk), .rst_n(rst_n), .en(en), .load(load), .init(il_init),
    .clear(cmode == MODE_DCM), .din(vl), .state(il)
  );

  // Capacitor branch.
  ic_select #(.IR_X(IR_X), .IR_Y(IR_Y), .FB_X(IL_X), .FB_Y(FBI_Y)) u_ic (
    .ir(ir), .il_fb(il_fb), .mode(cmode), .ic(ic)
  );
  euler_integrator #(
    .IN_X(IC_X), .IN_Y(IC_Y), .K_X(DTC_X), .K_Y(DTC_Y), .K_CODE(DTC_CODE),
    .S_X(VO_X), .S_Y(VO_Y)
  ) u_vout (
    .clk(clk), .rst_n(rst_n), .en(en), .load(load), .init(vout_init),
    .clear(1'b0), .din(ic), .state(vout)
  );

  // DAC outputs: same integer bits as the states, the rest fractional.
  fx_requantize #(.X(IL_X), .YI(IL_Y), .YO(OUT_W - 1 - IL_X)) u_iin (
    .din(il), .dout(iin)
  );
  fx_requantize #(.X(VO_X), .YI(VO_Y), .YO(OUT_W - 1 - VO_X)) u_vout_ext (
    .din(vout), .dout(vout_ext)
  );

endmodule
