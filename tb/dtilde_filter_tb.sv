// dtilde_filter_tb: checks the adaptation filter against a real-valued model.
//
// The reference evaluates y[n+1] = 1.6875 y[n] - 0.765625 y[n-1]
// + 0.03125 (x[n] + x[n-1]) in floating point. The block's integer output
// must stay within 2 LSB of it (it truncates the state every sample). The
// stimulus is a sequence of steps, pulses and random values like those of a
// current-derivative signal. A long constant input checks the DC gain of 0.8
// and a single pulse checks that the output is delayed by one sample.
module dtilde_filter_tb;
  localparam int XW = 10, HW = 12;
  logic clk = 0, rst_n = 0, valid = 0;
  logic signed [XW-1:0] x_in = '0;
  logic signed [HW-1:0] h_out;
  int checks = 0, failures = 0;

  function automatic real abs_r(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  real y0 = 0.0, y1 = 0.0, x1 = 0.0, yn;

  dtilde_filter dut (.*);

  always #5 clk = ~clk;

  task automatic step(input int x);
    @(negedge clk);
    x_in = XW'(x);
    valid = 1;
    // block output for this sample equals model y[n] before the update
    checks++;
    if (abs_r(real'(h_out) - y0) > 2.0) begin
      failures++;
      $display("FAIL x=%0d h=%0d ref=%f", x, h_out, y0);
    end
    yn = 1.6875 * y0 - 0.765625 * y1 + 0.03125 * (real'(x) + x1);
    y1 = y0; y0 = yn; x1 = real'(x);
    @(negedge clk);
    valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // impulse: first output sample after it must still be zero
    step(400);
    checks++;
    if (h_out == 0) begin failures++; $display("FAIL no response to pulse"); end
    for (int i = 0; i < 60; i++) step(0);
    // step: DC gain 0.8
    for (int i = 0; i < 200; i++) step(100);
    checks++;
    if (h_out < 78 || h_out > 81) begin
      failures++; $display("FAIL DC gain: h=%0d for x=100", h_out);
    end
    for (int i = 0; i < 200; i++) step(-300);
    checks++;
    if (h_out < -242 || h_out > -238) begin
      failures++; $display("FAIL DC gain: h=%0d for x=-300", h_out);
    end
    // random pulses and noise
    for (int i = 0; i < 2000; i++) begin
      int v;
      v = ($urandom % 16 == 0) ? int'($urandom % 1001) - 500 : int'($urandom % 41) - 20;
      step(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
