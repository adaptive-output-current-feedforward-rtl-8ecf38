// vr_ffa_top_tb: end-to-end test of the controller at its default sizes.
//
// The testbench plays the parts around the FPGA logic:
//   * two ADCs: on each adc_sample strobe it computes a new v_e and i_ff and
//     presents them as offset-binary words until the next strobe;
//   * the analog differentiator: i_ff is a train of decaying pulses, one per
//     load step (every 100 samples, alternately up and down), plus noise;
//   * the power train, through the error model of the method: the
//     voltage error is the filtered current times the gain error,
//     v_e = bias - hn_model * (theta - THETA_TRUE) / 4096, with hn_model a
//     floating-point copy of the adaptation filter and a slowly alternating
//     bias that exercises the feedback path;
//   * the external delay line: tap j is dl_launch delayed by (j+1)/4 clock.
// Checked:
//   * every duty word equals clamp(PID(v_e) + floor(theta * i_ff / 4096))
//     computed by reference models (d_ff = 0 in feedback-only mode), and is
//     published 29 clocks after adc_sample, four times per period;
//   * every PWM pulse of every phase lasts the duty word latched at that
//     phase's period start, in quarter clocks, plus the dither step;
//   * theta is held in fixed mode and converges to THETA_TRUE in adaptive
//     mode from +29 % and -30 % starting errors.
// Each mechanism (three modes, gain load, adaptation, duty clamp, dither,
// four-phase interleave) is counted and must occur at least once.
module vr_ffa_top_tb;
  import ffa_pkg::*;
  localparam int TCLK = 8;
  localparam int THETA_TRUE = 3723;
  localparam int KP = 256, KI = 16, KD = 2560;

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

  // ---------------------------------------------------------------- models
  real y0 = 0.0, y1 = 0.0, x1 = 0.0, yn, pulse = 0.0;
  longint pid_acc = 0;
  int e1 = 0, e2 = 0, n_samp = 0, bias = 0;
  int exp_duty[$];
  int exp_sat[$];
  longint t_sample[$];
  localparam longint PID_MAX = (longint'(2047) << 8) + 255;

  // counters of mechanisms
  int n_off = 0, n_fixed = 0, n_adapt = 0, n_load = 0, n_theta_moved = 0;
  int n_sat = 0, n_dither = 0, n_pulses[4] = '{0, 0, 0, 0}, n_updates = 0;

  always @(posedge clk) if (rst_n && adc_sample) begin
    int x, e, th, dff, s;
    // i_ff: load-step pulse train
    if (n_samp % 100 == 0) pulse = (n_samp % 200 == 0) ? 300.0 : -300.0;
    if (n_samp % 1500 == 0) bias = (n_samp % 3000 == 0) ? 2 : -2;
    x = int'(pulse) + int'($urandom % 5) - 2;
    pulse = pulse * 0.7;
    th = int'(theta);
    e = bias + int'(-y0 * real'(th - THETA_TRUE) / 4096.0);
    if (e > 511) e = 511;
    if (e < -512) e = -512;
    n_samp++;
    // present the words as offset binary until the next sample
    adc_ve  <= ADC_W'(e + 512);
    adc_iff <= ADC_W'(x + 512);
    // reference PID (positional terms)
    pid_acc = pid_acc + longint'(KP) * (e - e1) + longint'(KI) * e
                      + longint'(KD) * (e - 2 * e1 + e2);
    if (pid_acc > PID_MAX) pid_acc = PID_MAX;
    if (pid_acc < 0) pid_acc = 0;
    e2 = e1; e1 = e;
    // reference feedforward and summing node
    dff = (ff_mode == FF_OFF) ? 0 : int'((longint'(th) * x) >>> 12);
    if (dff > 2047) dff = 2047;
    if (dff < -2048) dff = -2048;
    s = int'(pid_acc >>> 8) + dff;
    exp_sat.push_back((s < 0 || s > 2047) ? 1 : 0);
    exp_duty.push_back((s < 0) ? 0 : (s > 2047) ? 2047 : s);
    t_sample.push_back(longint'($time));
    case (ff_mode)
      FF_OFF:   n_off++;
      FF_FIXED: n_fixed++;
      default:  n_adapt++;
    endcase
    // floating-point adaptation filter
    yn = 1.6875 * y0 - 0.765625 * y1 + 0.03125 * (real'(x) + x1);
    y1 = y0; y0 = yn; x1 = real'(x);
  end

  // ------------------------------------------------------ duty word check
  always @(posedge clk) if (rst_n && duty_update) begin
    int d, sat_e;
    longint t0;
    n_updates++;
    checks++;
    if (exp_duty.size() == 0) begin
      failures++; $display("FAIL duty update without a sample");
    end else begin
      d = exp_duty.pop_front();
      sat_e = exp_sat.pop_front();
      t0 = t_sample.pop_front();
      if (int'(duty) != d || int'(duty_sat) != sat_e) begin
        failures++;
        if (failures < 20)
          $display("FAIL sample %0d: duty=%0d exp=%0d sat=%0b", n_updates, duty, d, duty_sat);
      end
      // latency: adc_sample seen at t0, duty visible 29 clocks later
      checks++;
      if (longint'($time) - t0 != 29 * TCLK) begin
        failures++; $display("FAIL latency %0d", (longint'($time) - t0) / TCLK);
      end
      n_sat += sat_e;
    end
  end

  // ------------------------------------------------------- PWM pulse check
  // The DPWM counter is cleared by reset and counts every clock; tcnt
  // follows it so that the duty word each phase latches is known.
  int latched[4], width[4];
  logic [3:0] pwm_prev = '0;
  logic [7:0] tcnt;
  always @(posedge clk) tcnt <= rst_n ? tcnt + 8'd1 : 8'd0;
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < 4; p++)
      if (tcnt == 8'(p * 64 - 1)) latched[p] = int'(duty);
  end
  initial begin
    // outputs are only watched once reset has cleared the random power-up state
    @(posedge rst_n);
    #1;
    forever begin
      for (int p = 0; p < 4; p++) begin
        if (pwm[p] && !pwm_prev[p]) width[p] = 0;
        if (pwm[p]) width[p]++;
        if (!pwm[p] && pwm_prev[p]) begin
          int base;
          base = latched[p] >> 1;
          n_pulses[p]++;
          checks++;
          if (!(width[p] == base || (latched[p][0] && base != 1023 && width[p] == base + 1))) begin
            failures++;
            if (failures < 20)
              $display("FAIL phase %0d pulse %0d quarter clocks, duty %0d", p, width[p], latched[p]);
          end
          if (latched[p][0] && width[p] == base + 1) n_dither++;
        end
      end
      pwm_prev = pwm;
      #2;
    end
  end

  // ---------------------------------------------------------- sequence
  task automatic samples(input int n);
    repeat (n) @(posedge clk iff adc_sample);
  endtask

  task automatic load(input int v);
    @(posedge clk iff duty_update);
    @(negedge clk);
    theta_load = 1; theta_load_val = THETA_W'(v);
    @(negedge clk);
    theta_load = 0;
    n_load++;
    checks++;
    if (int'(theta) != v) begin failures++; $display("FAIL load %0d", theta); end
  endtask

  task automatic adapt_from(input int start);
    int th0;
    load(start);
    ff_mode = FF_ADAPT;
    th0 = int'(theta);
    samples(8000);
    if (int'(theta) != th0) n_theta_moved++;
    checks++;
    if (abs_r(real'(theta) - real'(THETA_TRUE)) > 100.0) begin
      failures++;
      $display("FAIL start %0d: theta=%0d target=%0d", start, theta, THETA_TRUE);
    end else
      $display("adaptive mode from theta=%0d: converged to %0d (target %0d)",
               start, theta, THETA_TRUE);
  endtask

  initial begin
    int th;
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (theta != 16'sd3723) begin failures++; $display("FAIL reset theta"); end
    ff_mode = FF_OFF;
    samples(500);
    load(4800);
    ff_mode = FF_FIXED;
    samples(500);
    checks++;
    if (theta != 16'sd4800) begin failures++; $display("FAIL theta moved in fixed mode"); end
    adapt_from(4800);
    ff_mode = FF_FIXED;
    th = int'(theta);
    samples(300);
    checks++;
    if (int'(theta) != th) begin failures++; $display("FAIL stored theta not held"); end
    adapt_from(2606);
    ff_mode = FF_OFF;
    samples(300);
    repeat (300) @(posedge clk);
    $display("mechanisms: off=%0d fixed=%0d adapt=%0d samples, loads=%0d, adapt runs=%0d, duty clamps=%0d, dithered pulses=%0d, pulses per phase=%0d/%0d/%0d/%0d, duty updates=%0d",
             n_off, n_fixed, n_adapt, n_load, n_theta_moved, n_sat, n_dither,
             n_pulses[0], n_pulses[1], n_pulses[2], n_pulses[3], n_updates);
    checks++;
    if (n_off == 0 || n_fixed == 0 || n_adapt == 0 || n_load == 0 || n_theta_moved == 0 ||
        n_sat == 0 || n_dither == 0 || n_pulses[0] == 0 || n_pulses[1] == 0 ||
        n_pulses[2] == 0 || n_pulses[3] == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    checks++;
    // four samples (and duty updates) per 256-clock switching period
    if (n_updates < n_samp - 1 || n_updates > n_samp) begin
      failures++; $display("FAIL %0d updates for %0d samples", n_updates, n_samp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(30000) * 64 * TCLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
