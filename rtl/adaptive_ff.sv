// adaptive_ff: output-current feedforward with an adapted gain.
//
// The digitised feedforward signal i_ff (the analog derivative of the output
// current) is scaled by the gain theta to give the feedforward duty command
//   d_ff = theta * i_ff.
// In parallel i_ff drives the filter D~(z) (dtilde_filter), whose output -h
// is multiplied by the voltage error v_e and integrated to give theta
// (gain_adapt). The gradient law drives theta to the value at which the
// feedforward cancels the load transient, whatever the actual inductance.
//
// Modes (ff_mode):
//   FF_OFF   - d_ff = 0, theta held (feedback only)
//   FF_FIXED - d_ff = theta * i_ff with theta held (fixed-gain feedforward)
//   FF_ADAPT - d_ff = theta * i_ff and theta adapted every sample
// The filter runs in every mode so that its state is current when
// adaptation is switched on. `theta_load` writes theta_load_val into the
// gain register.
//
// Timing: one sample per `valid` strobe. d_ff and d_valid follow one clock
// later. d_ff uses the theta in force when the sample arrived; a gain
// update from that sample applies from the next sample on.
// The structure is the published one. Word widths and the saturation of
// d_ff to DW bits are this design's choices.
module adaptive_ff
  import ffa_pkg::*;
#(
  parameter int unsigned XW         = ADC_W,
  parameter int unsigned HW         = H_W,
  parameter int unsigned TW         = THETA_W,
  parameter int unsigned TFRAC      = THETA_FRAC,
  parameter int unsigned DW         = DUTY_W + 1,
  parameter int unsigned G_SHIFT    = 6,
  parameter int          THETA_INIT = 3723
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid,
  input  ff_mode_e             ff_mode,
  input  logic signed [XW-1:0] i_ff,
  input  logic signed [XW-1:0] ve,
  input  logic                 theta_load,
  input  logic signed [TW-1:0] theta_load_val,
  output logic signed [TW-1:0] theta,
  output logic signed [HW-1:0] hn,       // -h, for observation
  output logic signed [DW-1:0] d_ff,
  output logic                 d_valid
);
  dtilde_filter #(.XW(XW), .HW(HW)) u_filter (
    .clk   (clk),
    .rst_n (rst_n),
    .valid (valid),
    .x_in  (i_ff),
    .h_out (hn)
  );

  gain_adapt #(
    .HW(HW), .EW(XW), .THETA_W(TW), .G_SHIFT(G_SHIFT), .THETA_INIT(THETA_INIT)
  ) u_adapt (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid    (valid),
    .adapt    (ff_mode == FF_ADAPT),
    .load     (theta_load),
    .load_val (theta_load_val),
    .hn       (hn),
    .ve       (ve),
    .theta    (theta)
  );

  // Output multiplier theta * i_ff, scaled back to duty LSBs and saturated.
  localparam int unsigned PW = TW + XW;
  localparam logic signed [PW-1:0] DMAX = PW'((1 << (DW - 1)) - 1);
  localparam logic signed [PW-1:0] DMIN = -PW'(1 << (DW - 1));
  logic signed [PW-1:0] prod, scaled;
  logic signed [DW-1:0] d_sat;

  always_comb begin
    prod   = theta * i_ff;
    scaled = prod >>> TFRAC;
    if (scaled > DMAX)      d_sat = DMAX[DW-1:0];
    else if (scaled < DMIN) d_sat = DMIN[DW-1:0];
    else                    d_sat = scaled[DW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_ff    <= '0;
      d_valid <= 1'b0;
    end else begin
      d_valid <= valid;
      if (valid) d_ff <= (ff_mode == FF_OFF) ? '0 : d_sat;
    end
  end
endmodule
