// adaptive_ff_tb: checks the adaptive feedforward path in a simulated loop.
//
// i_ff is made of load-step events (one every 100 samples): each step gives a decaying pulse, as the
// derivative of the output current through a first-order pole would, plus
// a little noise. The voltage error follows the error model of the method:
// it is the filtered current times the gain error,
//   v_e = -hn_model * (theta - theta_true) / 4096,
// where hn_model is the testbench's own floating-point copy of the filter.
// Checked, sample by sample:
//   * d_ff = floor(theta * i_ff / 4096) one clock after valid, or 0 in FF_OFF;
//   * hn stays within 2 LSB of the floating-point filter;
//   * theta does not move in FF_OFF and FF_FIXED;
//   * theta_load writes the gain;
//   * in FF_ADAPT theta converges to theta_true from a +30 % and a -30 %
//     starting error (the two cases of the published simulation).
module adaptive_ff_tb;
  import ffa_pkg::*;
  localparam int XW = 10, HW = 12, TW = 16, DW = 12;
  localparam int THETA_TRUE = 3723;
  logic clk = 0, rst_n = 0, valid = 0, theta_load = 0;
  ff_mode_e ff_mode = FF_OFF;
  logic signed [XW-1:0] i_ff = '0, ve = '0;
  logic signed [TW-1:0] theta_load_val = '0, theta;
  logic signed [HW-1:0] hn;
  logic signed [DW-1:0] d_ff;
  logic d_valid;
  int checks = 0, failures = 0;

  function automatic real abs_r(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  real y0 = 0.0, y1 = 0.0, x1 = 0.0, yn, pulse = 0.0;
  int n = 0;

  adaptive_ff dut (.*);

  always #5 clk = ~clk;

  function automatic int floor_div4096(input longint v);
    return int'(v >>> 12);
  endfunction

  task automatic sample();
    int x, e, th_before, exp_d;
    // load step every 150 samples, alternating direction
    if (n % 100 == 0) pulse = (n % 200 == 0) ? 300.0 : -300.0;
    x = int'(pulse) + int'($urandom % 5) - 2;
    pulse = pulse * 0.7;
    n++;
    e = int'(-y0 * real'(int'(theta) - THETA_TRUE) / 4096.0);
    if (e > 511) e = 511;
    if (e < -512) e = -512;
    @(negedge clk);
    i_ff = XW'(x); ve = XW'(e); valid = 1;
    th_before = int'(theta);
    checks++;
    if (abs_r(real'(hn) - y0) > 2.0) begin
      failures++; $display("FAIL hn=%0d ref=%f", hn, y0);
    end
    @(negedge clk);
    valid = 0;
    exp_d = (ff_mode == FF_OFF) ? 0 : floor_div4096(longint'(th_before) * x);
    if (exp_d > 2047) exp_d = 2047;
    if (exp_d < -2048) exp_d = -2048;
    checks++;
    if (int'(d_ff) != exp_d || !d_valid) begin
      failures++; $display("FAIL d_ff=%0d exp=%0d theta=%0d x=%0d", d_ff, exp_d, th_before, x);
    end
    if (ff_mode != FF_ADAPT) begin
      checks++;
      if (int'(theta) != th_before) begin failures++; $display("FAIL theta moved"); end
    end
    yn = 1.6875 * y0 - 0.765625 * y1 + 0.03125 * (real'(x) + x1);
    y1 = y0; y0 = yn; x1 = real'(x);
    repeat (2) @(negedge clk);
  endtask

  task automatic do_load(input int v);
    @(negedge clk);
    theta_load = 1; theta_load_val = TW'(v);
    @(negedge clk);
    theta_load = 0;
    checks++;
    if (int'(theta) != v) begin failures++; $display("FAIL load %0d", theta); end
  endtask

  task automatic run_adapt(input int start);
    do_load(start);
    ff_mode = FF_ADAPT;
    for (int i = 0; i < 8000; i++) sample();
    checks++;
    if (abs_r(real'(theta) - real'(THETA_TRUE)) > 80) begin
      failures++;
      $display("FAIL start %0d: theta=%0d target=%0d", start, theta, THETA_TRUE);
    end else
      $display("start %0d: theta converged to %0d (target %0d)", start, theta, THETA_TRUE);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    ff_mode = FF_OFF;
    for (int i = 0; i < 300; i++) sample();
    do_load(4800);
    ff_mode = FF_FIXED;
    for (int i = 0; i < 300; i++) sample();
    run_adapt(THETA_TRUE * 13 / 10);
    run_adapt(THETA_TRUE * 7 / 10);
    // stored gain stays once adaptation is stopped
    ff_mode = FF_FIXED;
    for (int i = 0; i < 300; i++) sample();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
