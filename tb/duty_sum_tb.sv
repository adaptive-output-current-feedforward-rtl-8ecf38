// duty_sum_tb: checks the duty summing node.
//
// Random feedback and feedforward commands, including values beyond both
// ends of the DPWM range, are summed; duty must be the clamped sum, the
// sat flag must mark exactly the clamped samples, and the register must
// hold while valid is low.
module duty_sum_tb;
  localparam int IW = 12, DW = 11;
  logic clk = 0, rst_n = 0, valid = 0;
  logic signed [IW-1:0] u_fb = '0, d_ff = '0;
  logic [DW-1:0] duty;
  logic sat;
  int checks = 0, failures = 0;
  int exp_duty = 0, exp_sat = 0, n_sat = 0;

  duty_sum #(.IW(IW), .DUTY_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      int a, b, s;
      @(negedge clk);
      a = int'($urandom % 4096) - 2048;
      b = int'($urandom % 1024) - 512;
      u_fb = IW'(a); d_ff = IW'(b);
      valid = ($urandom % 4 != 0);
      if (valid) begin
        s = a + b;
        exp_sat  = (s < 0 || s > 2047);
        exp_duty = (s < 0) ? 0 : (s > 2047) ? 2047 : s;
        n_sat += exp_sat;
      end
      @(negedge clk);
      valid = 0;
      checks++;
      if (int'(duty) != exp_duty || int'(sat) != exp_sat) begin
        failures++;
        $display("FAIL %0d + %0d: duty=%0d sat=%0b", a, b, duty, sat);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no saturation"); end
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
