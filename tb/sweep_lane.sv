// sweep_lane: one boost_hil_top under test in the feedback-resolution sweep.
//
// Wraps a model instance with its own signal formats, closes its loop with a
// resistive load (ir = vout / R, quantised to the lane's ir format) and
// quantises the shared real-valued input voltage to the lane's vg format.
// On every rising edge with acc high it accumulates the absolute difference of both
// states from a real-valued reference model supplied by the testbench.
module sweep_lane #(
  parameter int VG_Y  = 3,
  parameter int IR_Y  = 10,
  parameter int IL_Y  = 17,
  parameter int VO_Y  = 24,
  parameter int FBV_Y = 3,
  parameter int FBI_Y = 10,
  parameter int DTL_Y = 25,
  parameter int DTC_Y = 22,
  parameter real R    = 533.33
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic en,
  input  logic acc,       // accumulate the error at this edge
  input  logic q,
  input  real  vo0,       // initial output voltage
  input  real  vg_real,   // input voltage before quantisation
  input  real  il_ref,    // reference states of the current step
  input  real  vo_ref,
  output real  err_il,    // accumulated |iL - iL_ref| (A)
  output real  err_vo,    // accumulated |vout - vout_ref| (V)
  output real  il_max     // largest iL seen (A)
);
  localparam int ILW = 1 + 8 + IL_Y;
  localparam int VOW = 1 + 11 + VO_Y;
  localparam int VGW = 1 + 9 + VG_Y;
  localparam int IRW = 1 + 2 + IR_Y;
  // dt = 10 ns, L = 1 mH, C = 100 uF
  localparam longint DTL_CODE = longint'(1.0e-5 * 2.0 ** DTL_Y);
  localparam longint DTC_CODE = longint'(1.0e-4 * 2.0 ** DTC_Y);

  logic signed [ILW-1:0] il, il_init;
  logic signed [VOW-1:0] vout, vout_init;
  logic signed [VGW-1:0] vg;
  logic signed [IRW-1:0] ir;
  logic signed [12:0]    iin, vout_ext;
  logic signed [8+FBI_Y:0]  il_fb;
  logic signed [11+FBV_Y:0] vout_fb;
  logic [1:0] mode;

  boost_hil_top #(
    .VG_Y(VG_Y), .IR_Y(IR_Y), .IL_Y(IL_Y), .VO_Y(VO_Y), .FBV_Y(FBV_Y), .FBI_Y(FBI_Y),
    .DTL_Y(DTL_Y), .DTL_CODE(DTL_CODE), .DTC_Y(DTC_Y), .DTC_CODE(DTC_CODE)
  ) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .load(load), .il_init(il_init),
    .vout_init(vout_init), .q(q), .vg(vg), .ir(ir), .iin(iin),
    .vout_ext(vout_ext), .il(il), .vout(vout), .il_fb(il_fb),
    .vout_fb(vout_fb), .mode(mode)
  );

  real il_r, vo_r;
  assign il_r      = real'(il) / 2.0 ** IL_Y;
  assign vo_r      = real'(vout) / 2.0 ** VO_Y;
  assign il_init   = '0;
  assign vout_init = VOW'(longint'($floor(vo0 * 2.0 ** VO_Y + 0.5)));
  assign vg        = VGW'(longint'($floor(vg_real * 2.0 ** VG_Y + 0.5)));
  assign ir        = IRW'(longint'($floor(vo_r / R * 2.0 ** IR_Y + 0.5)));

  // On each rising edge the states still hold step k, the value the
  // reference inputs describe; the model then advances to step k+1.
  always_ff @(posedge clk) begin
    if (load) begin
      err_il <= 0.0;
      err_vo <= 0.0;
      il_max <= 0.0;
    end else if (acc) begin
      err_il <= err_il + ((il_r > il_ref) ? il_r - il_ref : il_ref - il_r);
      err_vo <= err_vo + ((vo_r > vo_ref) ? vo_r - vo_ref : vo_ref - vo_r);
      if (il_r > il_max) il_max <= il_r;
    end
  end
endmodule
