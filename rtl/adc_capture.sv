// adc_capture: input register for one external parallel-output ADC.
//
// On the capture strobe the W-bit word from the converter is registered and
// converted from offset binary (mid-scale = zero) to two's complement by
// inverting its top bit. `valid` pulses for one clock with the new value.
// Both converters of the controller (error voltage v_e and current
// derivative i_ff) use this block. The offset-binary output format and the
// one-cycle latency are choices of this design.
module adc_capture #(
  parameter int unsigned W = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                capture,
  input  logic [W-1:0]        adc_data,  // offset binary from the ADC
  output logic signed [W-1:0] value,
  output logic                valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      value <= '0;
      valid <= 1'b0;
    end else begin
      valid <= capture;
      if (capture) value <= {~adc_data[W-1], adc_data[W-2:0]};
    end
  end
endmodule
