// vl_select: inductor voltage of the boost converter for one time step.
//
// Computes vL from the input voltage vg and the output-voltage feedback:
//   closed switch (MODE_ON)  : vL = vg
//   open switch, CCM         : vL = vg - voutFeedback
//   open switch, DCM         : vL = 0
// The subtractor and the three-way selection follow the converter equations
// and the reference design's datapath. The result is lossless: by the addition rule the
// output format is Q(max(VG_X,FB_X)+1).max(VG_Y,FB_Y), Q12.3 with the
// default Q9.3 input and Q11.3 feedback. Both operands are aligned to the
// finer of the two fractional resolutions before subtracting.
// Combinational, no latency.
module vl_select
  import hil_pkg::*;
#(
  parameter int VG_X = 9,   // vg integer bits
  parameter int VG_Y = 3,   // vg fractional bits
  parameter int FB_X = 11,  // voutFeedback integer bits
  parameter int FB_Y = 3,   // voutFeedback fractional bits (may be negative)
  localparam int OX  = imax(VG_X, FB_X) + 1,
  localparam int OY  = imax(VG_Y, FB_Y)
) (
  input  logic signed [VG_X+VG_Y:0] vg,
  input  logic signed [FB_X+FB_Y:0] vout_fb,
  input  conv_mode_e                mode,
  output logic signed [OX+OY:0]     vl
);

  logic signed [OX+OY:0] vg_ext, fb_ext, vg_al, fb_al, diff;

  assign vg_ext = (OX+OY+1)'(vg);  // sign extension to the output width
  assign fb_ext = (OX+OY+1)'(vout_fb);
  assign vg_al  = vg_ext <<< (OY - VG_Y);
  assign fb_al  = fb_ext <<< (OY - FB_Y);
  assign diff   = vg_al - fb_al;

  always_comb begin
    unique case (mode)
      MODE_ON:  vl = vg_al;
      MODE_CCM: vl = diff;
      default:  vl = '0;
    endcase
  end

endmodule
