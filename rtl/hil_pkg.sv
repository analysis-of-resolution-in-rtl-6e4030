// Shared types and helpers of the boost-converter hardware-in-the-loop model.
//
// Fixed-point signals are written QX.Y: one sign bit, X integer bits and Y
// fractional bits, two's complement, total width 1+X+Y. X or Y may be
// negative (a constant such as dt/L is Q-16.25: 10 bits whose LSB weighs
// 2^-25). The width rules of the model follow the usual lossless rules:
//   QX1.Y1 +/- QX2.Y2 -> Q(max(X1,X2)+1).max(Y1,Y2)
//   QX1.Y1  *  QX2.Y2 -> Q(X1+X2+1).(Y1+Y2)
// fb_frac_bits gives the fractional bits a feedback signal needs: at least
// as many as the input it is added to, and at least as many integer plus
// fractional bits as that input, so that the input and not the feedback
// sets the error of the loop.
// The conduction mode is decoded from the switch command Q and the sign of
// the inductor current (closed switch, open switch with iL > 0, open switch
// with iL <= 0), which selects the converter equations for one time step.
package hil_pkg;

  typedef enum logic [1:0] {
    MODE_ON  = 2'd0,  // switch closed: vL = vg, iC = -ir
    MODE_CCM = 2'd1,  // switch open, diode conducting: vL = vg - vout, iC = iL - ir
    MODE_DCM = 2'd2   // switch open, iL = 0: vL = 0, iC = -ir, iL held at 0
  } conv_mode_e;

  function automatic int imax(input int a, input int b);
    return (a > b) ? a : b;
  endfunction

  // Fractional bits of a feedback signal with x_fb integer bits that is
  // combined with an input in Q(x_in).(y_in): Y >= y_in and
  // x_fb + Y >= x_in + y_in.
  function automatic int fb_frac_bits(input int x_fb, input int x_in, input int y_in);
    return imax(y_in, x_in + y_in - x_fb);
  endfunction

  function automatic conv_mode_e decode_mode(input logic q, input logic il_pos);
    if (q)           return MODE_ON;
    else if (il_pos) return MODE_CCM;
    else             return MODE_DCM;
  endfunction

endpackage
