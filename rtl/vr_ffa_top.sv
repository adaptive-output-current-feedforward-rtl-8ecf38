// vr_ffa_top: digital part of a four-phase VRM controller with adaptive
// output-current feedforward.
//
// Signal flow, once per sample (4 samples per switching period, 1.49 MHz):
//   sample_ctrl  - from the DPWM counter, strobes both external ADCs
//                  (adc_sample), registers their words 20 clocks later
//                  (capture) and publishes the new duty 8 clocks after that;
//   adc_capture  - two input registers: voltage error v_e and i_ff, the
//                  digitised derivative of the output current;
//   pid_ctrl     - feedback path, v_e to duty command u_fb;
//   adaptive_ff  - feedforward path, d_ff = theta * i_ff, with theta tuned
//                  by the gradient law from v_e and the filtered i_ff;
//   duty_sum     - duty = clamp(u_fb + d_ff), registered on `update`;
//   dpwm         - four interleaved PWM outputs from the duty word, using
//                  the external delay line through dl_launch / dl_taps.
// The ADCs, the analog differentiator that makes i_ff, the delay line and
// the power train are outside this module; their signals are ports.
//
// ff_mode selects feedback only, fixed-gain feedforward or adaptive
// feedforward; theta_load writes a gain. theta, the duty word and the
// per-sample saturation flag are brought out for observation.
// Latency: duty changes 29 clocks (SAMPLE_DELAY + COMP_DELAY + 1) after
// adc_sample; each phase uses it from its next period start.
// The partition follows the published FPGA block diagram (two converters,
// PID, adaptive feedforward, summing node, DPWM with external delay line).
// The port list, the mode input and the observation outputs are this
// design's own.
module vr_ffa_top
  import ffa_pkg::*;
#(
  parameter int unsigned CNT_W        = 8,
  parameter int unsigned N_PH         = 4,
  parameter int unsigned SAMPLE_DELAY = 20,
  parameter int unsigned COMP_DELAY   = 8,
  parameter int unsigned G_SHIFT      = 6,
  parameter int          THETA_INIT   = 3723
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // converters
  output logic                      adc_sample,
  input  logic [ADC_W-1:0]          adc_ve,     // offset binary
  input  logic [ADC_W-1:0]          adc_iff,    // offset binary
  // external delay line
  output logic                      dl_launch,
  input  logic [2:0]                dl_taps,
  // drivers
  output logic [N_PH-1:0]           pwm,
  // mode and gain
  input  ff_mode_e                  ff_mode,
  input  logic                      theta_load,
  input  logic signed [THETA_W-1:0] theta_load_val,
  output logic signed [THETA_W-1:0] theta,
  // observation
  output logic [DUTY_W-1:0]         duty,
  output logic                      duty_sat,
  output logic                      duty_update
);
  localparam int unsigned FINE_W   = 2;
  localparam int unsigned DITHER_W = DUTY_W - CNT_W - FINE_W;
  localparam int unsigned UW       = DUTY_W + 1;

  logic [CNT_W-1:0] cnt;
  logic             capture, update;

  sample_ctrl #(
    .CNT_W(CNT_W), .N_SAMP(N_PH),
    .SAMPLE_DELAY(SAMPLE_DELAY), .COMP_DELAY(COMP_DELAY)
  ) u_sample (
    .clk(clk), .rst_n(rst_n), .cnt(cnt),
    .adc_sample(adc_sample), .capture(capture), .update(update)
  );

  logic signed [ADC_W-1:0] ve, i_ff;
  logic                    ve_valid, iff_valid;

  adc_capture #(.W(ADC_W)) u_adc_ve (
    .clk(clk), .rst_n(rst_n), .capture(capture), .adc_data(adc_ve),
    .value(ve), .valid(ve_valid)
  );

  adc_capture #(.W(ADC_W)) u_adc_iff (
    .clk(clk), .rst_n(rst_n), .capture(capture), .adc_data(adc_iff),
    .value(i_ff), .valid(iff_valid)
  );

  logic signed [UW-1:0] u_fb;
  logic                 u_valid;

  pid_ctrl #(.EW(ADC_W), .UW(UW)) u_pid (
    .clk(clk), .rst_n(rst_n), .valid(ve_valid), .e(ve),
    .u(u_fb), .u_valid(u_valid)
  );

  logic signed [UW-1:0]  d_ff;
  logic                  d_valid;
  logic signed [H_W-1:0] hn;

  adaptive_ff #(.DW(UW), .G_SHIFT(G_SHIFT), .THETA_INIT(THETA_INIT)) u_ff (
    .clk(clk), .rst_n(rst_n), .valid(iff_valid), .ff_mode(ff_mode),
    .i_ff(i_ff), .ve(ve),
    .theta_load(theta_load), .theta_load_val(theta_load_val),
    .theta(theta), .hn(hn), .d_ff(d_ff), .d_valid(d_valid)
  );

  duty_sum #(.IW(UW), .DUTY_W(DUTY_W)) u_sum (
    .clk(clk), .rst_n(rst_n), .valid(update), .u_fb(u_fb), .d_ff(d_ff),
    .duty(duty), .sat(duty_sat)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) duty_update <= 1'b0;
    else        duty_update <= update;
  end

  dpwm #(
    .N_PH(N_PH), .CNT_W(CNT_W), .FINE_W(FINE_W), .DITHER_W(DITHER_W)
  ) u_dpwm (
    .clk(clk), .rst_n(rst_n), .duty(duty), .dl_taps(dl_taps),
    .dl_launch(dl_launch), .cnt(cnt), .pwm(pwm)
  );

  // Both results of a sample must be ready before the duty is published.
  a_results_ready: assert property (@(posedge clk) disable iff (!rst_n)
    ve_valid |-> ##[1:COMP_DELAY-1] (u_valid && d_valid));
endmodule
