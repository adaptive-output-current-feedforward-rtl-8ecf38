// sample_ctrl_tb: checks the sampling strobes of sample_ctrl.
//
// A counter like the DPWM's drives the block for several periods. The
// testbench checks that each strobe comes exactly once per quarter period,
// at the expected counter positions, that capture follows adc_sample by
// SAMPLE_DELAY clocks and update follows capture by COMP_DELAY clocks, and
// that there are four samples per 256-clock period.
module sample_ctrl_tb;
  localparam int unsigned CNT_W = 8;
  localparam int unsigned SD = 20, CD = 8;
  logic clk = 0, rst_n = 0;
  logic [CNT_W-1:0] cnt;
  logic adc_sample, capture, update;
  int checks = 0, failures = 0;
  int cyc = 0, t_sample = -1, t_capture = -1;
  int n_sample = 0, n_capture = 0, n_update = 0;

  sample_ctrl dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt <= '0; else cnt <= cnt + 1'b1;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (adc_sample) begin
      n_sample++;
      checks++;
      // registered strobe: counter has moved one past the sampling position
      if (cnt[5:0] != 6'd1) begin
        failures++; $display("FAIL adc_sample at cnt=%0d", cnt);
      end
      if (t_sample >= 0) begin
        checks++;
        if (cyc - t_sample != 64) begin
          failures++; $display("FAIL sample spacing %0d", cyc - t_sample);
        end
      end
      t_sample = cyc;
    end
    if (capture) begin
      n_capture++;
      checks++;
      if (t_sample < 0 || cyc - t_sample != SD) begin
        failures++; $display("FAIL capture delay %0d", cyc - t_sample);
      end
      t_capture = cyc;
    end
    if (update) begin
      n_update++;
      checks++;
      if (t_capture < 0 || cyc - t_capture != CD) begin
        failures++; $display("FAIL update delay %0d", cyc - t_capture);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (256 * 5) @(posedge clk);
    // 5 periods of 256 clocks: 4 samples per period
    checks++;
    if (n_sample != 20 || n_capture != 20 || n_update != 20) begin
      failures++;
      $display("FAIL counts %0d %0d %0d", n_sample, n_capture, n_update);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
