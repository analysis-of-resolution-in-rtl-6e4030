// euler_integrator: one state variable of the converter model (explicit Euler).
//
// On every enabled clock edge the state x advances by one time step:
//   x(k) = x(k-1) + K * din(k-1)
// where K is the constant dt/L or dt/C and din is vL or iC. The product is
// formed at full width by the multiplication rule, Q(IN_X+K_X+1).(IN_Y+K_Y),
// then rounded to the S_Y fractional bits of the state (half an LSB added,
// then the low bits dropped) and added to the state. Rounding matters here:
// plain truncation would lose half a state LSB on average in every step, a
// bias of about 0.2 % of the inductor-current slope at the default formats,
// which accumulates over the thousands of steps of a switching period. The sum is kept
// at the state width QS_X.S_Y: the state does not grow with every step, as
// the reference design limits each state variable to a fixed width (Q8.17 for iL,
// Q11.24 for vout), and a sum beyond that range wraps; the extra integer bit
// of each state format is there to keep that from happening.
//
// Controls, all synchronous to clk, in priority order:
//   load  : x <= init (initial condition of a simulation)
//   clear : when en is also high, x <= 0 (the inductor current in
//           discontinuous conduction, where the model forces iL(k) = 0)
//   en    : x <= x + K*din; with en low the state holds (emulation paused)
// rst_n is an asynchronous active-low reset to 0. The state output is the
// register itself, so the new value is visible one cycle after din; one
// model time step takes one clock cycle.
//
// Follows the reference design: the multiply-add-register structure, the constants'
// formats and the state formats. Own choices: the enable, load and reset
// controls, rounding of the product, wrap-around on overflow.
module euler_integrator #(
  parameter int IN_X   = 12,   // din integer bits (vL: Q12.3)
  parameter int IN_Y   = 3,    // din fractional bits
  parameter int K_X    = -16,  // constant integer bits (dt/L: Q-16.25)
  parameter int K_Y    = 25,   // constant fractional bits
  parameter longint K_CODE = 336,  // constant as an integer, K = K_CODE * 2^-K_Y
  parameter int S_X    = 8,    // state integer bits (iL: Q8.17)
  parameter int S_Y    = 17,   // state fractional bits
  localparam int KW    = 1 + K_X + K_Y,
  localparam int SW    = 1 + S_X + S_Y
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     load,
  input  logic signed [SW-1:0]     init,
  input  logic                     clear,
  input  logic signed [IN_X+IN_Y:0] din,
  output logic signed [SW-1:0]     state
);

  localparam int PX = IN_X + K_X + 1;              // product integer bits
  localparam int PY = IN_Y + K_Y;                  // product fractional bits
  localparam int PW = (1 + IN_X + IN_Y) + KW;      // product width
  localparam int AX = (S_X > PX ? S_X : PX) + 1;   // sum integer bits
  localparam int AW = 1 + AX + S_Y;                // sum width

  localparam logic signed [KW-1:0] K = KW'(K_CODE);

  initial begin
    assert (KW >= 2) else $fatal(1, "euler_integrator: constant needs at least 2 bits");
    assert (K_CODE < (64'sd1 <<< (KW - 1)) && K_CODE >= -(64'sd1 <<< (KW - 1)))
      else $fatal(1, "euler_integrator: K_CODE does not fit Q%0d.%0d", K_X, K_Y);
  end

  logic signed [PW-1:0] prod;
  logic signed [AW-1:0] inc, sum;

  assign prod = din * K;

  generate
    if (PY >= S_Y) begin : g_drop
      logic signed [PW-1:0] prod_rnd, prod_sh;
      if (PY > S_Y) begin : g_rnd
        assign prod_rnd = prod + (PW'(1) <<< (PY - S_Y - 1));
      end else begin : g_exact
        assign prod_rnd = prod;
      end
      assign prod_sh = prod_rnd >>> (PY - S_Y);
      assign inc     = AW'(prod_sh);
    end else begin : g_pad
      logic signed [AW-1:0] prod_ext;
      assign prod_ext = prod;
      assign inc      = prod_ext <<< (S_Y - PY);
    end
  endgenerate

  assign sum = AW'(state) + inc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          state <= '0;
    else if (load)       state <= init;
    else if (en) begin
      if (clear)         state <= '0;
      else               state <= sum[SW-1:0];
    end
  end

endmodule
