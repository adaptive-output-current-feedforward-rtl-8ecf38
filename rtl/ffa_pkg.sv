// ffa_pkg: constants and types shared by the adaptive-feedforward VRM
// controller.
//
// The widths follow the converter hardware: both converters are 10-bit
// parts and the DPWM takes an 11-bit duty word. The clock is chosen so that
// one switching period at 372 kHz is exactly 256 clocks (95.2 MHz). Then the
// 210 ns sampling delay is 20 clocks and the 84 ns computation delay is
// 8 clocks. The feedforward mode enum covers the three ways the loop is run:
// feedback only, feedforward with a held (fixed) gain, and feedforward whose
// gain is adapted.
package ffa_pkg;

  // Converter word width (v_e and i_ff).
  localparam int unsigned ADC_W  = 10;
  // DPWM duty word: 8 counter bits, 2 delay-line bits, 1 dither bit.
  localparam int unsigned DUTY_W = 11;
  // Gain theta: signed fixed point with THETA_FRAC fractional bits.
  localparam int unsigned THETA_W    = 16;
  localparam int unsigned THETA_FRAC = 12;
  // Filter output -h: signed integer in i_ff LSBs.
  localparam int unsigned H_W = 12;

  typedef enum logic [1:0] {
    FF_OFF   = 2'd0,  // feedback only, d_ff forced to zero, theta held
    FF_FIXED = 2'd1,  // feedforward with the stored theta, theta held
    FF_ADAPT = 2'd2   // feedforward with theta adapted every sample
  } ff_mode_e;

endpackage
