// Self-checking testbench of vl_select.
// The default instance (vg Q9.3, voutFeedback Q11.3 -> vL Q12.3) and one with
// a coarse feedback (Q11.-2) and one with a fine feedback (Q11.8) are driven
// with random operands in all three conduction modes. The expected vL is
// computed in real arithmetic from the operand values.
module tb_vl_select
  import hil_pkg::*;
;
  int checks = 0, failures = 0;
  int n_mode[3] = '{0, 0, 0};

  logic signed [12:0] vg;
  logic signed [14:0] fb_a;  logic signed [15:0] vl_a;
  logic signed [9:0]  fb_b;  logic signed [15:0] vl_b;
  logic signed [19:0] fb_c;  logic signed [20:0] vl_c;
  conv_mode_e mode;

  vl_select dut_a (.vg(vg), .vout_fb(fb_a), .mode(mode), .vl(vl_a));
  vl_select #(.FB_Y(-2)) dut_b (.vg(vg), .vout_fb(fb_b), .mode(mode), .vl(vl_b));
  vl_select #(.FB_Y(8))  dut_c (.vg(vg), .vout_fb(fb_c), .mode(mode), .vl(vl_c));

  function automatic real expected(input conv_mode_e m, input real v, input real f);
    case (m)
      MODE_ON:  return v;
      MODE_CCM: return v - f;
      default:  return 0.0;
    endcase
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
      vg   = $urandom;
      fb_a = $urandom;
      fb_b = $urandom;
      fb_c = $urandom;
      mode = conv_mode_e'(i % 3);
      if (i == 3) begin vg = 13'sh0FFF; fb_a = 15'sh4000; fb_b = 10'sh200; fb_c = 20'sh80000; end
      n_mode[i % 3]++;
      #1;
      check("a", real'(vl_a) / 8.0,   expected(mode, real'(vg) / 8.0, real'(fb_a) / 8.0));
      check("b", real'(vl_b) / 8.0,   expected(mode, real'(vg) / 8.0, real'(fb_b) * 4.0));
      check("c", real'(vl_c) / 256.0, expected(mode, real'(vg) / 8.0, real'(fb_c) / 256.0));
    end
    $display("mode counts: on=%0d ccm=%0d dcm=%0d", n_mode[0], n_mode[1], n_mode[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
