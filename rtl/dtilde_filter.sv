// dtilde_filter: the adaptation filter D~(z), second order with one zero.
//
//   D~(z) = alpha * (z + a0) / (z^2 + b1*z + b0)
//
// It stands for the closed loop Gvd/(1 + Gvd*K) of the power train and the
// feedback controller. Fed with i_ff, its output is the signal -h that the
// gradient law correlates with the voltage error. The coefficients are sums
// and differences of powers of two, so the filter needs only adders and
// shifts:
//   b1    = -27/16 = -(1 + 1/2 + 1/8 + 1/16)
//   b0    =  49/64 =   1 - 1/4 + 1/64
//   alpha =   1/32,   a0 = 1 (zero at z = -1, as the bilinear transform gives)
// These give poles at radius 0.875 and angle 0.27 rad, about 4.3e5 rad/s at
// 1.49 MHz with damping near 0.5, and a DC gain of 0.8. The filter's form and
// the shift-and-add idea follow the published method; the coefficient values
// are this design's own choice (the method leaves them to be fitted).
//
// Difference equation, evaluated once per `valid` strobe (input x[n]):
//   y[n+1] = 27/16*y[n] - 49/64*y[n-1] + 1/32*(x[n] + x[n-1])
// The state keeps FRAC fractional bits. h_out is y[n], the value before the
// update, truncated to an integer and saturated to HW bits. Because the
// filter is strictly proper, h_out for sample n depends only on inputs up to
// n-1, so it is ready in the cycle the sample arrives.
module dtilde_filter #(
  parameter int unsigned XW   = 10,  // input width (i_ff)
  parameter int unsigned HW   = 12,  // output width (-h)
  parameter int unsigned FRAC = 8,   // fractional bits of the state
  parameter int unsigned SW   = 24   // state width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid,
  input  logic signed [XW-1:0] x_in,
  output logic signed [HW-1:0] h_out
);
  localparam int unsigned ALPHA_SH = 5;

  logic signed [SW-1:0] y0, y1;        // y[n], y[n-1]
  logic signed [XW-1:0] x1;            // x[n-1]
  logic signed [SW-1:0] y_next, xsum;

  always_comb begin
    xsum   = (SW'(x_in) + SW'(x1)) <<< (FRAC - ALPHA_SH);
    y_next = y0 + (y0 >>> 1) + (y0 >>> 3) + (y0 >>> 4)
           - y1 + (y1 >>> 2) - (y1 >>> 6)
           + xsum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y0 <= '0;
      y1 <= '0;
      x1 <= '0;
    end else if (valid) begin
      y0 <= y_next;
      y1 <= y0;
      x1 <= x_in;
    end
  end

  // Integer part of y[n], saturated to HW bits.
  localparam logic signed [SW-1:0] HMAX = SW'((1 << (HW - 1)) - 1);
  localparam logic signed [SW-1:0] HMIN = -SW'(1 << (HW - 1));
  logic signed [SW-1:0] y_int;
  always_comb begin
    y_int = y0 >>> FRAC;
    if (y_int > HMAX)      h_out = HMAX[HW-1:0];
    else if (y_int < HMIN) h_out = HMIN[HW-1:0];
    else                   h_out = y_int[HW-1:0];
  end

  initial assert (FRAC >= ALPHA_SH) else $error("dtilde_filter: FRAC too small");
endmodule
