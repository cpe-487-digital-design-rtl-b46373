// siren_pkg: types and constants shared by the siren design.
//
// The siren produces a triangle-wave tone whose pitch sweeps up and down
// between two limits, and streams it to an external 16-bit stereo I2S DAC.
// All timing is derived from one 50 MHz clock by a binary counter; the
// constants below are the counter windows that produce the DAC load
// strobes and the siren's default pitch limits and sweep speed.
//
// Pitch is expressed in units of f_audio / 2^16 (about 0.745 Hz at the
// 48.828 kHz sampling rate). Samples are 16-bit two's complement.
package siren_pkg;

  // Widths of the data types used between the blocks.
  localparam int unsigned PITCH_W  = 14;   // pitch and pitch limits
  localparam int unsigned SPEED_W  = 8;    // wail speed, pitch units per wail clock
  localparam int unsigned SAMPLE_W = 16;   // audio sample / DAC word
  localparam int unsigned PHASE_W  = 16;   // tone phase accumulator

  typedef logic        [PITCH_W-1:0]  pitch_t;
  typedef logic        [SPEED_W-1:0]  speed_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic        [PHASE_W-1:0]  phase_t;

  // Default siren settings: 344 * 0.745 Hz ~ 256 Hz, 687 * 0.745 Hz ~ 512 Hz.
  localparam pitch_t LO_TONE_DEFAULT    = pitch_t'(344);
  localparam pitch_t HI_TONE_DEFAULT    = pitch_t'(687);
  localparam speed_t WAIL_SPEED_DEFAULT = speed_t'(8);

  // Second (right-channel) siren of the optional stereo extension:
  // 516 * 0.745 Hz ~ 384 Hz to 1031 * 0.745 Hz ~ 768 Hz, 12 units per step.
  localparam pitch_t R_LO_TONE_DEFAULT    = pitch_t'(516);
  localparam pitch_t R_HI_TONE_DEFAULT    = pitch_t'(1031);
  localparam speed_t R_WAIL_SPEED_DEFAULT = speed_t'(12);

  // Timing counter: 20 bits at 50 MHz. Bit positions of the derived clocks.
  localparam int unsigned TCOUNT_W_DEFAULT = 20;
  localparam int unsigned MCLK_BIT  = 1;   // 12.5 MHz (inverted)
  localparam int unsigned SCLK_BIT  = 4;   // 1.5625 MHz
  localparam int unsigned LRCK_BIT  = 9;   // 48.828 kHz
  localparam int unsigned FRAME_W   = 10;  // one LRCK period = 1024 counts

  // Load-strobe windows within one LRCK period, [start, end).
  // Each window covers exactly one falling edge of SCLK: the one half an
  // SCLK period after the first rising edge that follows an LRCK change.
  localparam logic [FRAME_W-1:0] LOAD_L_START = 10'h00F;
  localparam logic [FRAME_W-1:0] LOAD_L_END   = 10'h02E;
  localparam logic [FRAME_W-1:0] LOAD_R_START = 10'h20F;
  localparam logic [FRAME_W-1:0] LOAD_R_END   = 10'h22E;

  // Triangle amplitude: peak value of the tone output.
  localparam int TRI_PEAK = (1 << (PHASE_W - 2)) - 1;   // 16383

endpackage
