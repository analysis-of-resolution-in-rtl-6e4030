// Self-checking testbench of ic_select.
// The default instance (ir Q2.10, iLFeedback Q8.10 -> iC Q9.10), one with a
// coarse feedback (Q8.-3) and one with a fine feedback (Q8.14) are driven
// with random operands in all three conduction modes, including the most
// negative ir. The expected iC is computed in real arithmetic.
module tb_ic_select
  import hil_pkg::*;
;
  int checks = 0, failures = 0;

  logic signed [12:0] ir;
  logic signed [18:0] fb_a;  logic signed [19:0] ic_a;
  logic signed [5:0]  fb_b;  logic signed [19:0] ic_b;
  logic signed [22:0] fb_c;  logic signed [23:0] ic_c;
  conv_mode_e mode;

  ic_select dut_a (.ir(ir), .il_fb(fb_a), .mode(mode), .ic(ic_a));
  ic_select #(.FB_Y(-3)) dut_b (.ir(ir), .il_fb(fb_b), .mode(mode), .ic(ic_b));
  ic_select #(.FB_Y(14)) dut_c (.ir(ir), .il_fb(fb_c), .mode(mode), .ic(ic_c));

  function automatic real expected(input conv_mode_e m, input real r, input real f);
    return (m == MODE_CCM) ? f - r : -r;
  endfunction

  task automatic check(input string what, input real got, input real exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s mode %0d: got %f expected %f", what, mode, got, exp);
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
    for (int i = 0; i < 3000; i++) begin
      ir   = $urandom;
      fb_a = $urandom;
      fb_b = $urandom;
      fb_c = $urandom;
      mode = conv_mode_e'(i % 3);
      if (i < 3) begin ir = 13'sh1000; fb_a = 19'sh40000; fb_b = 6'sh20; fb_c = 23'sh400000; end
      #1;
      check("a", real'(ic_a) / 1024.0,  expected(mode, real'(ir) / 1024.0, real'(fb_a) / 1024.0));
      check("b", real'(ic_b) / 1024.0,  expected(mode, real'(ir) / 1024.0, real'(fb_b) * 8.0));
      check("c", real'(ic_c) / 16384.0, expected(mode, real'(ir) / 1024.0, real'(fb_c) / 16384.0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
