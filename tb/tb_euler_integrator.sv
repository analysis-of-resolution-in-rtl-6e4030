// Self-checking testbench of euler_integrator.
// Two instances, configured as the inductor-current state (vL Q12.3 times
// dt/L = 336 * 2^-25 into Q8.17) and as the output-voltage state (iC Q9.10
// times dt/C = 419 * 2^-22 into Q11.24), get random increments and random
// load / clear / enable controls. After every clock edge the state is
// compared with a reference that adds din * K rounded to the state
// resolution (half up) and wraps at the state width, so every step is checked to take
// exactly one cycle. Loads near the top of the range force wrap-around.
module tb_euler_integrator;
  int checks = 0, failures = 0;
  int n_load = 0, n_clear = 0, n_hold = 0, n_step = 0, n_wrap = 0;

  logic clk = 0, rst_n = 0, en = 0, load = 0, clear = 0;
  logic signed [25:0] init_l;  logic signed [15:0] din_l;  logic signed [25:0] st_l;
  logic signed [35:0] init_v;  logic signed [19:0] din_v;  logic signed [35:0] st_v;

  euler_integrator dut_l (
    .clk(clk), .rst_n(rst_n), .en(en), .load(load), .init(init_l), .clear(clear),
    .din(din_l), .state(st_l)
  );
  euler_integrator #(
    .IN_X(9), .IN_Y(10), .K_X(-13), .K_Y(22), .K_CODE(419), .S_X(11), .S_Y(24)
  ) dut_v (
    .clk(clk), .rst_n(rst_n), .en(en), .load(load), .init(init_v), .clear(clear),
    .din(din_v), .state(st_v)
  );

  always #5 clk = ~clk;

  // reference: wrap a real-valued integer count of LSBs to a signed width
  function automatic longint wrap(input real v, input int w);
    real m = 2.0 ** w;
    real h = 2.0 ** (w - 1);
    real r = v - m * $floor((v + h) / m);
    return longint'(r);
  endfunction

  longint ref_l, ref_v;
  real nl, nv;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init_l = '0; init_v = '0; din_l = '0; din_v = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check("reset l", st_l, 0);
    check("reset v", st_v, 0);
    rst_n = 1;
    ref_l = 0; ref_v = 0;
    for (int i = 0; i < 20000; i++) begin
      // drive on the falling edge
      din_l  = $urandom;
      din_v  = $urandom;
      en     = ($urandom % 8) != 0;
      clear  = ($urandom % 16) == 0;
      load   = ($urandom % 64) == 0;
      if (($urandom % 2) == 0) begin
        init_l = 26'sh1FF_FFFF - 26'($urandom % 4096);
        init_v = 36'sh7_FFFF_FFFF - 36'($urandom % 65536);
      end else begin
        init_l = $urandom;
        init_v = {$urandom, $urandom};
      end
      // reference next state
      if (load) begin
        ref_l = init_l; ref_v = init_v; n_load++;
      end else if (en && clear) begin
        ref_l = 0; ref_v = 0; n_clear++;
      end else if (en) begin
        nl = real'(ref_l) + $floor(real'(din_l) * 336.0 / 2.0**11 + 0.5);
        nv = real'(ref_v) + $floor(real'(din_v) * 419.0 / 2.0**8 + 0.5);
        if (nl >= 2.0**25 || nl < -(2.0**25)) n_wrap++;
        ref_l = wrap(nl, 26);
        ref_v = wrap(nv, 36);
        n_step++;
      end else n_hold++;
      @(posedge clk);
      @(negedge clk);
      check("iL state", st_l, ref_l);
      check("vout state", st_v, ref_v);
    end
    $display("load=%0d clear=%0d step=%0d hold=%0d wrap=%0d", n_load, n_clear, n_step, n_hold, n_wrap);
    checks++;
    if (n_load == 0 || n_clear == 0 || n_hold == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL: a control case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
