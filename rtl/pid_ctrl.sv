// pid_ctrl: discrete PID feedback controller, v_e in, duty command out.
//
// Velocity (incremental) form, evaluated once per `valid` strobe:
//   acc[n] = acc[n-1] + K0*e[n] + K1*e[n-1] + K2*e[n-2]
//   K0 = KP + KI + KD,  K1 = -(KP + 2*KD),  K2 = KD
// The gains are signed integers with CFRAC fractional bits (Q.8 by default);
// u is acc with the fractional bits dropped. The accumulator is clamped so
// that u stays within [U_MIN, U_MAX]; the clamp is also the anti-windup.
// The integral term holds the steady-state duty, so u is the full duty
// command of the feedback path. u and u_valid follow `valid` by one clock.
//
// Only the controller type is given for the prototype; the velocity form,
// the gains, the formats and the clamp are choices of this design. The
// default gains (KP = 1, KI = 1/16, KD = 10 duty counts per 2 mV error
// count) put the crossover near 50 kHz for a 4 x 300 nH, 1.2 mF, 12 V power
// train sampled at 1.49 MHz; retune them for another power stage.
module pid_ctrl #(
  parameter int unsigned EW    = 10,
  parameter int unsigned UW    = 12,
  parameter int unsigned CFRAC = 8,
  parameter int          KP    = 256,
  parameter int          KI    = 16,
  parameter int          KD    = 2560,
  parameter int          U_MIN = 0,
  parameter int          U_MAX = 2047,
  parameter int          U_INIT = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid,
  input  logic signed [EW-1:0] e,
  output logic signed [UW-1:0] u,
  output logic                 u_valid
);
  localparam int K0 = KP + KI + KD;
  localparam int K1 = -(KP + 2 * KD);
  localparam int K2 = KD;
  localparam int unsigned AW = UW + CFRAC + 4;
  localparam logic signed [AW-1:0] ACC_MIN = AW'(U_MIN) <<< CFRAC;
  localparam logic signed [AW-1:0] ACC_MAX = (AW'(U_MAX) <<< CFRAC)
                                           + AW'((1 << CFRAC) - 1);

  logic signed [EW-1:0] e1, e2;
  logic signed [AW-1:0] acc, delta, acc_sum;

  always_comb begin
    delta   = AW'(K0) * AW'(e) + AW'(K1) * AW'(e1) + AW'(K2) * AW'(e2);
    acc_sum = acc + delta;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= AW'(U_INIT) <<< CFRAC;
      e1      <= '0;
      e2      <= '0;
      u_valid <= 1'b0;
    end else begin
      u_valid <= valid;
      if (valid) begin
        e1 <= e;
        e2 <= e1;
        if (acc_sum > ACC_MAX)      acc <= ACC_MAX;
        else if (acc_sum < ACC_MIN) acc <= ACC_MIN;
        else                        acc <= acc_sum;
      end
    end
  end

  assign u = acc[CFRAC +: UW];
endmodule
