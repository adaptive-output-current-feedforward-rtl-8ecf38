// dpwm_tb: checks the four-phase hybrid DPWM with a model of the delay line.
//
// The clock period is 8 time units, so one delay-line step (a quarter
// clock) is 2 units. The delay line is modelled by transport delays: tap j
// is dl_launch delayed by 2*(j+1) units. The outputs are sampled in the
// middle of every quarter clock, so a pulse of w fine steps is seen as w
// high samples.
// For each duty word D held constant, after the pipeline has settled, the
// high samples of each phase over two whole periods must add up to D
// (fine steps of two periods, including the one dithered period), except
// for the all-ones word where the dither step cannot be added (2046).
// Rising edges of phase p must lag phase 0 by p quarter periods, and for
// odd D the two periods of a pair must differ by one fine step.
module dpwm_tb;
  localparam int N_PH = 4, DW = 11;
  localparam int TCLK = 8, PERIOD = 256 * TCLK;
  logic clk = 0, rst_n = 0;
  logic [DW-1:0] duty = '0;
  logic [2:0] dl_taps = '0;
  logic dl_launch;
  logic [7:0] cnt;
  logic [N_PH-1:0] pwm;
  int checks = 0, failures = 0;

  dpwm dut (.*);

  always #(TCLK / 2) clk = ~clk;

  // external delay line model
  for (genvar j = 0; j < 3; j++) begin : g_tap
    always @(dl_launch) dl_taps[j] <= #(2 * (j + 1)) dl_launch;
  end

  // output sampling in the middle of each fine step
  bit measuring = 0;
  int high[N_PH], rise_t[N_PH], width[N_PH], last_w[N_PH], prev_w[N_PH];
  int n_dither = 0, n_phase_ok = 0;
  logic [N_PH-1:0] pwm_prev = '0;
  initial begin
    #1;
    forever begin
      for (int p = 0; p < N_PH; p++) begin
        if (measuring && pwm[p]) high[p]++;
        if (pwm[p] && !pwm_prev[p]) begin
          rise_t[p] = int'($time);
          width[p] = 0;
        end
        if (pwm[p]) width[p]++;
        if (!pwm[p] && pwm_prev[p]) begin
          prev_w[p] = last_w[p];
          last_w[p] = width[p];
        end
      end
      pwm_prev = pwm;
      #2;
    end
  end

  task automatic try_duty(input int d);
    int expd;
    @(negedge clk);
    duty = DW'(d);
    repeat (3 * 256) @(posedge clk);
    foreach (high[p]) high[p] = 0;
    measuring = 1;
    repeat (2 * 256) @(posedge clk);
    measuring = 0;
    expd = (d == 2047) ? 2046 : d;
    for (int p = 0; p < N_PH; p++) begin
      checks++;
      if (high[p] != expd) begin
        failures++;
        $display("FAIL duty=%0d phase %0d: %0d fine steps high in 2 periods", d, p, high[p]);
      end
    end
    if (d > 0 && d < 2046) begin
      for (int p = 1; p < N_PH; p++) begin
        checks++;
        if (((rise_t[p] - rise_t[0]) % PERIOD + PERIOD) % PERIOD != p * PERIOD / N_PH) begin
          failures++;
          $display("FAIL phase %0d offset %0d", p, rise_t[p] - rise_t[0]);
        end else n_phase_ok++;
      end
    end
    if (d % 2 == 1 && d < 2040 && d > 4) begin
      checks++;
      if (last_w[0] - prev_w[0] != 1 && prev_w[0] - last_w[0] != 1) begin
        failures++;
        $display("FAIL duty=%0d no dither: widths %0d %0d", d, prev_w[0], last_w[0]);
      end else n_dither++;
    end
  endtask

  initial begin
    int list[] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 100, 101, 511, 512, 513,
                   1023, 1024, 1500, 1999, 2000, 2045, 2046, 2047, 77};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (list[i]) try_duty(list[i]);
    for (int i = 0; i < 16; i++) try_duty(int'($urandom % 2048));
    checks++;
    if (n_dither == 0 || n_phase_ok == 0) begin
      failures++; $display("FAIL dither or interleave never observed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(60 * 6 * PERIOD);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
