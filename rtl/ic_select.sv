// ic_select: capacitor current of the boost converter for one time step.
//
// Computes iC from the inductor-current feedback and the load current ir:
//   open switch, CCM (diode conducting) : iC = iLFeedback - ir
//   closed switch, or DCM               : iC = -ir
// The subtractor, the negation of ir and the two-way selection follow the
// converter equations and the reference design's datapath. By the addition rule the
// output format is Q(max(IR_X,FB_X)+1).max(IR_Y,FB_Y), Q9.10 with the
// default Q2.10 input and Q8.10 feedback; it also holds -ir without
// overflow. Combinational, no latency.
module ic_select
  import hil_pkg::*;
#(
  parameter int IR_X = 2,   // ir integer bits
  parameter int IR_Y = 10,  // ir fractional bits
  parameter int FB_X = 8,   // iLFeedback integer bits
  parameter int FB_Y = 10,  // iLFeedback fractional bits (may be negative)
  localparam int OX  = imax(IR_X, FB_X) + 1,
  localparam int OY  = imax(IR_Y, FB_Y)
) (
  input  logic signed [IR_X+IR_Y:0] ir,
  input  logic signed [FB_X+FB_Y:0] il_fb,
  input  conv_mode_e                mode,
  output logic signed [OX+OY:0]     ic
);

  logic signed [OX+OY:0] ir_ext, fb_ext, ir_al, fb_al;

  assign ir_ext = (OX+OY+1)'(ir);
  assign fb_ext = (OX+OY+1)'(il_fb);
  assign ir_al  = ir_ext <<< (OY - IR_Y);
  assign fb_al  = fb_ext <<< (OY - FB_Y);

  always_comb begin
    if (mode == MODE_CCM) ic = fb_al - ir_al;
    else                  ic = -ir_al;
  end

endmodule
