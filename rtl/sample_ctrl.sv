// sample_ctrl: sampling and update timing of the digital controller.
//
// The converter is sampled N_SAMP times per switching period (four times,
// once per phase of the four-phase power train), so the loop runs at
// 4 x 372 kHz = 1.49 MHz. The module watches the free-running DPWM counter
// and issues three single-cycle strobes per sample:
//   adc_sample - tells both external ADCs to take a sample, when the counter
//                is SAMPLE_OFFSET counts into a quarter period;
//   capture    - SAMPLE_DELAY clocks later, when the converted words are
//                valid and are registered (210 ns = 20 clocks at 95.2 MHz);
//   update     - COMP_DELAY clocks after capture, when the controller result
//                is complete and the new duty command is published
//                (84 ns = 8 clocks).
// The sample rate and the two delays are the published figures of the
// prototype; the sampling instant within the quarter period (SAMPLE_OFFSET)
// is a choice of this design. SAMPLE_DELAY + COMP_DELAY must be shorter than
// a quarter period so that strobes of successive samples do not overlap.
module sample_ctrl #(
  parameter int unsigned CNT_W         = 8,
  parameter int unsigned N_SAMP        = 4,
  parameter int unsigned SAMPLE_OFFSET = 0,
  parameter int unsigned SAMPLE_DELAY  = 20,
  parameter int unsigned COMP_DELAY    = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] cnt,        // DPWM period counter
  output logic             adc_sample,
  output logic             capture,
  output logic             update
);
  localparam int unsigned SLOT   = (1 << CNT_W) / N_SAMP;
  localparam int unsigned SLOT_W = $clog2(SLOT);
  localparam logic [SLOT_W-1:0] T_SAMPLE  = SLOT_W'(SAMPLE_OFFSET);
  localparam logic [SLOT_W-1:0] T_CAPTURE = SLOT_W'(SAMPLE_OFFSET + SAMPLE_DELAY);
  localparam logic [SLOT_W-1:0] T_UPDATE  = SLOT_W'(SAMPLE_OFFSET + SAMPLE_DELAY + COMP_DELAY);

  // Position inside the current quarter period.
  logic [SLOT_W-1:0] pos;
  assign pos = cnt[SLOT_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_sample <= 1'b0;
      capture    <= 1'b0;
      update     <= 1'b0;
    end else begin
      adc_sample <= (pos == T_SAMPLE);
      capture    <= (pos == T_CAPTURE);
      update     <= (pos == T_UPDATE);
    end
  end

  initial begin
    assert ((1 << CNT_W) % N_SAMP == 0)
      else $error("sample_ctrl: N_SAMP must divide the period");
    assert (SAMPLE_OFFSET + SAMPLE_DELAY + COMP_DELAY < SLOT)
      else $error("sample_ctrl: delays exceed one sample slot");
  end
endmodule
