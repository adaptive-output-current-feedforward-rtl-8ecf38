// gain_adapt: gradient adaptation law for the feedforward gain theta.
//
// Continuous law: d(theta)/dt = -g * h * v_e. The filter delivers -h, so
// in discrete time, once per sample:
//   acc[n+1] = acc[n] + hn[n] * v_e[n],    theta = acc / 2^G_SHIFT
// which is the multiplier and the integrator g/(z-1) of the adaptive loop,
// with g = 2^-G_SHIFT in units of theta LSBs per (hn LSB * v_e LSB).
// theta is signed fixed point with THETA_FRAC fractional bits (the 16-bit
// default holds 0 .. 8 with 12 fractional bits). The accumulator keeps
// G_SHIFT extra bits below theta so that small corrections add up.
//
// Because adaptation can be stopped, theta is also the register that keeps
// the tuned gain: with `adapt` low it holds its value. `load` writes
// `load_val` into theta (fixed-gain operation, or a new starting point) and
// takes priority over adaptation. The accumulator saturates so that theta
// stays within [THETA_MIN, THETA_MAX]. The update takes one clock: theta
// changes on the clock edge after the `valid` strobe.
//
// The law follows the published method. The power-of-two gain g, the
// fixed-point formats, the clamp limits and the reset value are this
// design's own choices. The reset value 3723/4096 = 0.909 is the nominal
// feedforward gain of the 4-phase, 300 nH-per-phase, 12 V power train when
// i_ff has an LSB of 71 mA/us and the duty word an LSB of 1/2048.
module gain_adapt #(
  parameter int unsigned HW        = 12,
  parameter int unsigned EW        = 10,
  parameter int unsigned THETA_W   = 16,
  parameter int unsigned G_SHIFT   = 6,
  parameter int          THETA_MIN = 0,
  parameter int          THETA_MAX = 32767,
  parameter int          THETA_INIT = 3723
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      valid,
  input  logic                      adapt,    // 1: run the gradient law
  input  logic                      load,     // write load_val into theta
  input  logic signed [THETA_W-1:0] load_val,
  input  logic signed [HW-1:0]      hn,       // filter output, equal to -h
  input  logic signed [EW-1:0]      ve,       // voltage error
  output logic signed [THETA_W-1:0] theta
);
  localparam int unsigned AW = THETA_W + G_SHIFT + 2;
  localparam logic signed [AW-1:0] ACC_MIN = AW'(THETA_MIN) <<< G_SHIFT;
  localparam logic signed [AW-1:0] ACC_MAX = (AW'(THETA_MAX) <<< G_SHIFT)
                                           + AW'((1 << G_SHIFT) - 1);

  logic signed [AW-1:0]    acc, acc_sum;
  logic signed [HW+EW-1:0] prod;

  always_comb begin
    prod    = hn * ve;
    acc_sum = acc + AW'(prod);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= AW'(THETA_INIT) <<< G_SHIFT;
    end else if (load) begin
      acc <= AW'(load_val) <<< G_SHIFT;
    end else if (valid && adapt) begin
      if (acc_sum > ACC_MAX)      acc <= ACC_MAX;
      else if (acc_sum < ACC_MIN) acc <= ACC_MIN;
      else                        acc <= acc_sum;
    end
  end

  assign theta = acc[G_SHIFT +: THETA_W];

  initial begin
    assert (HW + EW <= AW) else $error("gain_adapt: accumulator too narrow");
    assert (THETA_MIN <= THETA_INIT && THETA_INIT <= THETA_MAX)
      else $error("gain_adapt: THETA_INIT out of range");
  end
endmodule
