// dpwm: four-phase interleaved hybrid digital PWM (counter + delay line +
// dither).
//
// The DUTY_W-bit duty word is split, from the top, into CNT_W counter bits
// c, FINE_W delay-line bits f and DITHER_W dither bits. One switching period
// is 2^CNT_W clocks (256 clocks of 95.2 MHz = 372 kHz). Phase p starts its
// period when the shared counter equals p * 2^CNT_W / N_PH, so the phases are
// evenly interleaved. Each phase output goes high at its period start and
// low c*T + f*T/2^FINE_W later (T = clock period):
//   * the counter marks the clock cycle in which the edge falls: in that
//     cycle the phase raises `launch`, and the external delay line
//     receives dl_launch, the OR of all phases' launch signals;
//   * the delay line returns DL_TAPS = 2^FINE_W - 1 taps; tap j is dl_launch
//     delayed by (j+1)*T/2^FINE_W. The output is gated off by tap f-1 (or at
//     once for f = 0), which places the edge at a fraction of a clock;
//   * the dither bits add one fine step in a fraction of the periods
//     (dither value out of 2^DITHER_W), so the average duty resolves the
//     full DUTY_W bits.
// With the defaults (8 + 2 + 1 bits) one fine step is T/4 = 2.6 ns and the
// average step is 1.3 ns, 1/2048 of the period.
//
// Each phase takes the `duty` input at its own period start, so a duty
// update reaches every phase within one period. Duty 0 gives a low output;
// the all-ones word gives (2^DUTY_W - 1)/2^DUTY_W of the period.
// The output is the AND of a register and a combinational tap gate: the
// falling edge is asynchronous by design, that is how the delay line adds
// resolution. When two phases place their edges in successive clocks, or a
// phase ends near full duty and the next period starts near zero, the
// tail of the earlier tap pulse can move the later edge to the start of
// its clock cycle. The counter/delay-line/dither structure, the 4 phases and
// the 11-bit resolution follow the prototype; the split of the bits, the
// tap arrangement and the clock rate are choices of this design.
module dpwm #(
  parameter int unsigned N_PH      = 4,
  parameter int unsigned CNT_W     = 8,
  parameter int unsigned FINE_W    = 2,
  parameter int unsigned DITHER_W  = 1,
  parameter int unsigned DUTY_W    = CNT_W + FINE_W + DITHER_W,
  parameter int unsigned DL_TAPS   = (1 << FINE_W) - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DUTY_W-1:0] duty,
  input  logic [DL_TAPS-1:0] dl_taps,   // from the external delay line
  output logic              dl_launch,  // to the external delay line
  output logic [CNT_W-1:0]  cnt,        // period counter, for sample timing
  output logic [N_PH-1:0]   pwm         // gate commands to the drivers
);
  localparam int unsigned PW   = CNT_W + FINE_W;     // edge position width
  localparam int unsigned STEP = (1 << CNT_W) / N_PH;

  logic [CNT_W-1:0] cnt_next;
  assign cnt_next = cnt + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt_next;
  end

  logic [N_PH-1:0] pwm_q, launch_q, fine_hit;

  for (genvar p = 0; p < N_PH; p++) begin : g_ph
    localparam logic [CNT_W-1:0] OFFSET = CNT_W'(p * STEP);

    logic [CNT_W-1:0]    lc_next;      // local count after this edge
    logic                start;
    logic [PW-1:0]       pos_q;        // edge position of the current period
    logic [PW-1:0]       pos_new;
    logic [DITHER_W-1:0] frame_q;      // period index for the dither pattern
    logic                dith_add;
    logic [PW-1:0]       pos_use;

    assign lc_next = cnt_next - OFFSET;
    assign start   = (lc_next == '0);

    // Dither: add one fine step in `dither value` periods out of 2^DITHER_W.
    always_comb begin
      dith_add = (duty[DITHER_W-1:0] > frame_q);
      pos_new  = duty[DUTY_W-1:DITHER_W];
      if (dith_add && (pos_new != '1)) pos_new = pos_new + 1'b1;
      pos_use  = start ? pos_new : pos_q;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pos_q       <= '0;
        frame_q     <= '0;
        pwm_q[p]    <= 1'b0;
        launch_q[p] <= 1'b0;
      end else begin
        if (start) begin
          pos_q   <= pos_new;
          frame_q <= frame_q + 1'b1;
        end
        launch_q[p] <= (lc_next == pos_use[PW-1:FINE_W]);
        if (start)            pwm_q[p] <= 1'b1;
        else if (launch_q[p]) pwm_q[p] <= 1'b0;
      end
    end

    // Fine edge: fine step 0 ends the pulse at the launch clock edge, fine
    // step f > 0 waits for delay-line tap f-1.
    logic [FINE_W-1:0] f;
    assign f = pos_q[FINE_W-1:0];
    always_comb begin
      if (f == '0) fine_hit[p] = 1'b1;
      else         fine_hit[p] = dl_taps[f - 1'b1];
    end
  end

  assign dl_launch = |launch_q;
  assign pwm       = pwm_q & ~(launch_q & fine_hit);

  initial assert (DUTY_W == CNT_W + FINE_W + DITHER_W)
    else $error("dpwm: DUTY_W must equal CNT_W + FINE_W + DITHER_W");
endmodule
