// Self-checking testbench of fx_requantize.
// Four instances cover rounding off fractional bits (Q11.24 -> Q11.3, the
// voutFeedback case), rounding below the binary point (Q8.17 -> Q8.-4),
// appending bits (Q8.4 -> Q8.10) and plain truncation (Q11.24 -> Q11.3,
// ROUND = 0). Random inputs and the extreme values are checked against the
// real-valued input scaled to the output resolution: floor(v + 1/2) clipped
// to the largest output value, or floor(v) when truncating.
module tb_fx_requantize;
  int checks = 0, failures = 0;

  logic signed [35:0] a_in;  logic signed [14:0] a_out;
  logic signed [25:0] b_in;  logic signed [4:0]  b_out;
  logic signed [12:0] c_in;  logic signed [18:0] c_out;
  logic signed [14:0] d_out;
  int n_sat = 0;

  fx_requantize #(.X(11), .YI(24), .YO(3))  dut_a (.din(a_in), .dout(a_out));
  fx_requantize #(.X(8),  .YI(17), .YO(-4)) dut_b (.din(b_in), .dout(b_out));
  fx_requantize #(.X(8),  .YI(4),  .YO(10)) dut_c (.din(c_in), .dout(c_out));
  fx_requantize #(.X(11), .YI(24), .YO(3), .ROUND(1'b0)) dut_d (.din(a_in), .dout(d_out));

  // rounded value of v in units of 2^-yo, clipped to a (1+x+yo)-bit word
  function automatic real rnd(input real v, input int x, input int yo);
    real r   = $floor(v * 2.0**yo + 0.5);
    real top = 2.0**(x + yo) - 1.0;
    return (r > top) ? top : r;
  endfunction

  task automatic check(input string what, input real got, input real exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a_in = {$urandom, $urandom};
      b_in = $urandom;
      c_in = $urandom;
      if (i == 0) begin a_in = '1; b_in = '1; c_in = '1; end   // -1 LSB
      if (i == 1) begin a_in = {1'b0, {35{1'b1}}}; b_in = {1'b0, {25{1'b1}}}; end
      #1;
      // value of the output, in real units, against floor(value / LSB_out) * LSB_out
      check("a", real'(a_out), rnd(real'(a_in) * 2.0**(-24), 11, 3));
      check("b", real'(b_out), rnd(real'(b_in) * 2.0**(-17), 8, -4));
      check("c", real'(c_out) * 2.0**(-10), real'(c_in) * 2.0**(-4));
      check("d", real'(d_out), $floor(real'(a_in) * 2.0**(-24) * 2.0**3));
      if (a_out == 15'sh3FFF) n_sat++;
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL: saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
