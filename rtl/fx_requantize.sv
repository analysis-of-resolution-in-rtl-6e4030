// fx_requantize: change the number of fractional bits of a fixed-point signal.
//
// Converts a signed QX.YI value to QX.YO, keeping the X integer bits. When
// YO < YI the low YI-YO bits are dropped: with ROUND set, half an output LSB
// is added first (round to nearest, ties up) and a result beyond the largest
// output value saturates there; with ROUND clear the bits are simply cut
// (truncation towards minus infinity). When YO > YI zeros are appended. YO
// may be negative down to 1-X, which drops integer bits as well (the output
// LSB then weighs 2^-YO). Purely combinational, no latency.
//
// Rounding is the default because truncation shifts every value down by
// half an output LSB on average; in the closed loop of the model that bias
// becomes a steady offset of the states, far larger than the zero-mean
// noise of a rounded signal of the same width.
//
// In the model this is how a state variable becomes its feedback signal
// (vout Q11.24 -> voutFeedback Q11.Y, iL Q8.17 -> iLFeedback Q8.Y) and how
// the 13-bit outputs iin and voutExt are taken from the states. That the
// feedback keeps the integer bits of its state variable and loses only
// fractional bits follows the reference design; the rounding is this design's choice.
module fx_requantize #(
  parameter int X  = 11,  // integer bits, input and output
  parameter int YI = 24,  // fractional bits of the input
  parameter int YO = 3,   // fractional bits of the output
  parameter bit ROUND = 1'b1  // 1: round to nearest, 0: truncate
) (
  input  logic signed [X+YI:0] din,
  output logic signed [X+YO:0] dout
);

  initial begin
    assert (X + YO >= 1) else $fatal(1, "fx_requantize: X+YO must be >= 1");
  end

  generate
    if (YO == YI) begin : g_same
      assign dout = din;
    end else if (YO < YI) begin : g_drop
      // one guard bit above the input so that adding half an LSB cannot wrap
      logic signed [X+YI+1:0] ext, biased, shifted;
      logic                   ovf;
      assign ext     = (X+YI+2)'(din);
      assign biased  = ROUND ? ext + ((X+YI+2)'(1) <<< (YI - YO - 1)) : ext;
      assign shifted = biased >>> (YI - YO);
      // only rounding the largest values up can leave the output range
      assign ovf     = shifted[X+YO+1] != shifted[X+YO];
      assign dout    = ovf ? {1'b0, {(X+YO){1'b1}}} : shifted[X+YO:0];
    end else begin : g_pad
      logic signed [X+YO:0] widened;
      assign widened = din;                 // sign extension
      assign dout    = widened <<< (YO - YI);
    end
  endgenerate

endmodule
