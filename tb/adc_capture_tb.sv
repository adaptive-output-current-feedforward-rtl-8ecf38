// adc_capture_tb: checks the ADC input register.
//
// Random converter words are presented; on capture strobes the signed
// output must equal the offset-binary word minus mid-scale, one clock later,
// with a one-clock valid pulse. Between strobes the value must hold.
module adc_capture_tb;
  localparam int W = 10;
  logic clk = 0, rst_n = 0, capture = 0, valid;
  logic [W-1:0] adc_data = '0;
  logic signed [W-1:0] value;
  int checks = 0, failures = 0;
  int expected = 0;

  adc_capture #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      adc_data = W'($urandom);
      capture  = ($urandom % 3 == 0);
      if (i == 0) adc_data = 10'd0;
      if (i == 1) adc_data = 10'd1023;
      if (i == 2) adc_data = 10'd512;
      if (i < 3) capture = 1;
      if (capture) expected = int'(adc_data) - 512;
      @(negedge clk);
      checks++;
      if (valid !== capture || int'(value) != expected) begin
        failures++;
        $display("FAIL i=%0d data=%0d value=%0d exp=%0d valid=%0b", i,
                 adc_data, value, expected, valid);
      end
      capture = 0;
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
