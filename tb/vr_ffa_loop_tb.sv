// vr_ffa_loop_tb: closed-loop load-step test of the controller with an
// averaged model of the four-phase power train.
//
// Power train model (floating point, one Euler step per controller clock,
// dt = 1 / 95.2 MHz), with the four phases lumped into one inductor L/4:
//   L = 300 nH per phase (times an error factor), C = 1.2 mF, ESR = 1.2 mOhm,
//   Vin = 12 V, Vref = 1.2 V, load line R_LL = 1.5 mOhm,
//   di_L/dt = (Vin * duty/2048 - v_o) / (L/4),  dv_C/dt = (i_L - i_o) / C,
//   v_o = v_C + ESR * (i_L - i_o).
// The controller sees
//   v_e  = Vref - R_LL * i_o - v_o, quantised to 2 mV,
//   i_ff = di_o/dt through a first-order pole of R_LL * C = 1.8 us (the
//          analog differentiator), quantised to 71 mA/us.
// Both are sampled on adc_sample and held. The delay line is modelled as in
// the other tests. The load is a current sink stepping between 5 A and
// 35 A with a 1 us ramp, every 100 us.
//
// Two inductance cases, 25 % above and 25 % below nominal, so the reset gain
// is wrong in both. Each case has four runs, as in the published
// experiments: six load-step pairs each with feedback only, with a fixed gain
// at 60 % of the ideal value and with a fixed gain at 160 % of it; then 48
// pairs with the gain adapted, starting from 60 % (inductance high) or
// 160 % (inductance low) of the ideal value.
// For each run the largest excursion of v_o from its load-line value after
// an up-step is recorded (mean of the last four steps). Checked: the loop
// settles onto the load line between steps; the adapted gain gives a
// smaller excursion than feedback only and than both detuned fixed gains;
// the adapted gain ends within 10 % of the ideal gain of the modelled
// inductance, (L/4) * 71 mA/us / 12 V * 2048 in Q4.12.
module vr_ffa_loop_tb;
  import ffa_pkg::*;
  localparam int  TCLK   = 8;
  localparam real DT     = 1.0 / 95.2e6;
  real            leq    = 300e-9 / 4.0 * 1.25;
  localparam real CAP    = 1.2e-3, ESR = 1.2e-3, VIN = 12.0, VREF = 1.2;
  localparam real RLL    = 1.5e-3, TAU = RLL * 1.2e-3;
  localparam int  STEP_CLK = 9520;          // 100 us
  localparam int  RAMP_CLK = 95;            // 1 us
  // ideal gain for the modelled inductance, Q4.12
  int             theta_ideal;

  logic clk = 0, rst_n = 0;
  logic adc_sample, dl_launch, theta_load = 0, duty_sat, duty_update;
  logic [ADC_W-1:0] adc_ve = 10'd512, adc_iff = 10'd512;
  logic [2:0] dl_taps = '0;
  logic [3:0] pwm;
  ff_mode_e ff_mode = FF_OFF;
  logic signed [THETA_W-1:0] theta_load_val = '0, theta;
  logic [DUTY_W-1:0] duty;

  vr_ffa_top dut (.*);

  int checks = 0, failures = 0;

  function automatic real abs_r(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  always #(TCLK / 2) clk = ~clk;

  for (genvar j = 0; j < 3; j++) begin : g_tap
    always @(dl_launch) dl_taps[j] <= #(2 * (j + 1)) dl_launch;
  end

  // ------------------------------------------------------ power train
  real i_l = 5.0, v_c = VREF - RLL * 5.0, i_o = 5.0, i_o_prev = 5.0;
  real v_o, v_e, iff_a = 0.0;
  int  t_clk = 0;
  bit  load_hi = 0;
  real peak_dev = 0.0;        // largest |v_o - load line| after the step

  function automatic int quant(input real v, input real lsb);
    int q;
    q = int'(v / lsb);
    if (q > 511) q = 511;
    if (q < -512) q = -512;
    return q;
  endfunction

  always @(posedge clk) if (rst_n) begin
    real target, di;
    t_clk++;
    // load current: ramp towards 35 A or 5 A
    target = load_hi ? 35.0 : 5.0;
    if (i_o < target) i_o = (i_o + 30.0 / RAMP_CLK > target) ? target : i_o + 30.0 / RAMP_CLK;
    if (i_o > target) i_o = (i_o - 30.0 / RAMP_CLK < target) ? target : i_o - 30.0 / RAMP_CLK;
    di = (i_o - i_o_prev) / DT;           // A/s
    i_o_prev = i_o;
    iff_a = iff_a + DT / TAU * (di * 1e-6 - iff_a);   // A/us through the pole
    v_o = v_c + ESR * (i_l - i_o);
    i_l = i_l + DT * (VIN * real'(duty) / 2048.0 - v_o) / leq;
    v_c = v_c + DT * (i_l - i_o) / CAP;
    v_o = v_c + ESR * (i_l - i_o);
    v_e = VREF - RLL * i_o - v_o;
    if (load_hi && (t_clk % STEP_CLK) < STEP_CLK / 2 && abs_r(v_e) > peak_dev) peak_dev = abs_r(v_e);
    if (adc_sample) begin
      adc_ve  <= ADC_W'(quant(v_e, 2e-3) + 512);
      adc_iff <= ADC_W'(quant(iff_a, 71e-3) + 512);
    end
  end

  // ---------------------------------------------------------- sequence
  task automatic load(input int v);
    @(negedge clk);
    theta_load = 1; theta_load_val = THETA_W'(v);
    @(negedge clk);
    theta_load = 0;
  endtask

  // n up/down load-step pairs; returns the mean peak deviation of the last 4
  task automatic run(input int n, output real dev);
    real sum = 0.0;
    for (int k = 0; k < n; k++) begin
      peak_dev = 0.0;
      load_hi = 1;
      repeat (STEP_CLK) @(posedge clk);
      if (k >= n - 4) sum += peak_dev;
      if (ff_mode == FF_ADAPT && k % 8 == 7) $display("step %0d: theta %0d", k + 1, theta);
      load_hi = 0;
      repeat (STEP_CLK) @(posedge clk);
      // settled on the load line before the next step
      checks++;
      if (abs_r(v_e) > 6e-3) begin
        failures++; $display("FAIL not settled: v_e = %f mV", v_e * 1e3);
      end
    end
    dev = sum / 4.0;
  endtask

  // One inductance case: feedback only, two detuned fixed gains, then
  // adaptation from the gain on the far side of the ideal one.
  task automatic scenario(input real le, input int adapt_start_pct);
    real dev_off, dev_small, dev_large, dev_adapt;
    leq = 300e-9 / 4.0 * le;
    theta_ideal = int'(leq * 71e-3 / 1e-6 / VIN * 2048.0 * 4096.0);
    ff_mode = FF_OFF;
    run(6, dev_off);
    load(theta_ideal * 6 / 10);
    ff_mode = FF_FIXED;
    run(6, dev_small);
    load(theta_ideal * 16 / 10);
    run(6, dev_large);
    load(theta_ideal * adapt_start_pct / 100);
    ff_mode = FF_ADAPT;
    run(48, dev_adapt);
    $display("L = %0.2f x nominal: ideal theta %0d, adapted from %0d %% to %0d",
             le, theta_ideal, adapt_start_pct, theta);
    $display("  peak |v_e| after a 30 A step: feedback only %0.1f mV, small gain %0.1f mV, large gain %0.1f mV, adaptive %0.1f mV",
             dev_off * 1e3, dev_small * 1e3, dev_large * 1e3, dev_adapt * 1e3);
    checks++;
    if (!(dev_adapt < dev_off)) begin failures++; $display("FAIL adaptive not better than feedback only"); end
    checks++;
    if (!(dev_adapt <= dev_small && dev_adapt <= dev_large)) begin
      failures++; $display("FAIL adaptive not better than detuned fixed gains");
    end
    checks++;
    if (abs_r(real'(theta) - real'(theta_ideal)) > 0.1 * theta_ideal) begin
      failures++; $display("FAIL adapted gain too far from the ideal one");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // start-up: let the integrator find the operating point
    repeat (40000) @(posedge clk);
    checks++;
    if (abs_r(v_e) > 6e-3) begin failures++; $display("FAIL start-up v_e = %f mV", v_e * 1e3); end
    scenario(1.25, 60);
    scenario(0.75, 160);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(4000000) * TCLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
