// duty_sum: summing node of the feedback and feedforward duty commands.
//
// duty = clamp(u_fb + d_ff, 0, 2^DUTY_W - 1), registered on `valid`.
// The feedback command and the feedforward command are added as in the
// control loop; the result is limited to the range the DPWM can produce.
// `sat` flags a sample whose sum had to be clamped. The clamp and the
// register are this design's choices.
module duty_sum #(
  parameter int unsigned IW     = 12,
  parameter int unsigned DUTY_W = 11
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid,
  input  logic signed [IW-1:0]    u_fb,
  input  logic signed [IW-1:0]    d_ff,
  output logic [DUTY_W-1:0]       duty,
  output logic                    sat
);
  localparam logic signed [IW:0] DMAX = (IW+1)'((1 << DUTY_W) - 1);
  logic signed [IW:0] sum;
  assign sum = (IW+1)'(u_fb) + (IW+1)'(d_ff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      duty <= '0;
      sat  <= 1'b0;
    end else if (valid) begin
      if (sum < 0) begin
        duty <= '0;
        sat  <= 1'b1;
      end else if (sum > DMAX) begin
        duty <= DMAX[DUTY_W-1:0];
        sat  <= 1'b1;
      end else begin
        duty <= sum[DUTY_W-1:0];
        sat  <= 1'b0;
      end
    end
  end

  initial assert (IW > DUTY_W) else $error("duty_sum: IW must exceed DUTY_W");
endmodule
