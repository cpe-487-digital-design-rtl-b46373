// siren: wailing-siren generator driving a 16-bit stereo I2S DAC.
//
// A triangle-wave tone is swept between a low and a high pitch and the
// resulting 16-bit samples are sent, the same on both channels, to an
// external I2S DAC (a CS4344 on a PmodI2S module) as a serial stream.
//
// Structure:
//   siren_timing  50 MHz counter producing MCLK, SCLK, LRCK (which is also
//                 the 48.828 kHz audio sampling clock), the 47.68 Hz wail
//                 clock and the left/right load strobes.
//   wail          pitch sweeper with its tone oscillator; runs on the wail
//                 and audio clocks and produces one sample per LRCK period.
//   dac_if        16-bit shift register on the falling SCLK edge; loads a
//                 channel's sample one SCLK period after LRCK changes and
//                 shifts it out MSB first.
//
// Timing: one LRCK period is 1024 system clocks and 32 SCLK periods. The
// audio sample changes on the rising LRCK edge (count 0x200); the left
// word is loaded at count 0x020 of the next period and the right word at
// 0x220, both long after the sample settled. The same sample therefore
// reaches the right channel first, then the left channel of the next
// frame.
//
// Optional extensions, all off by default (the default is the plain
// siren with fixed limits and speed and a triangle tone):
//   SQUARE_ON_BTN   the tone becomes a square wave while btn0 is pressed;
//   SPEED_FROM_SW   the eight switches sw set the wail speed instead of
//                   WAIL_SPEED;
//   RIGHT_WAIL      a second wail with its own limits and speed
//                   (R_LO_TONE, R_HI_TONE, R_WAIL_SPEED) drives the right
//                   channel. Its speed is always R_WAIL_SPEED.
// btn0 and sw pass through two-flop synchronisers on the system clock.
// When an extension is off its input is not used.
//
// Ports: clk_50MHz system clock, rst asynchronous active-high reset,
// btn0 and sw for the extensions, and the four DAC signals. Pitches are
// in units of about 0.745 Hz and speeds in pitch units per wail clock;
// the defaults are the lab's values (344 ~ 256 Hz, 687 ~ 512 Hz, 8, a
// 20-bit timing counter).
//
// The structure, clocks and defaults follow the lab design; the
// extensions are the lab's suggested modifications. The reset port, the
// synchronisers and the right channel's default limits and speed are this
// design's choices. The derived clocks come from register bits, as in the
// lab design.
module siren
  import siren_pkg::*;
#(
  parameter pitch_t      LO_TONE       = LO_TONE_DEFAULT,
  parameter pitch_t      HI_TONE       = HI_TONE_DEFAULT,
  parameter speed_t      WAIL_SPEED    = WAIL_SPEED_DEFAULT,
  parameter int unsigned TCOUNT_W      = TCOUNT_W_DEFAULT,
  parameter bit          SQUARE_ON_BTN = 1'b0,
  parameter bit          SPEED_FROM_SW = 1'b0,
  parameter bit          RIGHT_WAIL    = 1'b0,
  parameter pitch_t      R_LO_TONE     = R_LO_TONE_DEFAULT,
  parameter pitch_t      R_HI_TONE     = R_HI_TONE_DEFAULT,
  parameter speed_t      R_WAIL_SPEED  = R_WAIL_SPEED_DEFAULT
) (
  input  logic         clk_50MHz,   // system clock (50 MHz)
  input  logic         rst,         // asynchronous reset, active high
  input  logic         btn0,        // square-wave button (SQUARE_ON_BTN)
  input  logic [7:0]   sw,          // wail speed switches (SPEED_FROM_SW)
  output logic         dac_MCLK,    // DAC master clock (12.5 MHz)
  output logic         dac_LRCK,    // DAC left/right clock (48.828 kHz)
  output logic         dac_SCLK,    // DAC serial clock (1.5625 MHz)
  output logic         dac_SDIN     // DAC serial data
);

  logic    sclk, audio_clk, slo_clk;
  logic    dac_load_L, dac_load_R;
  sample_t data_L, data_R;

  siren_timing #(.TCOUNT_W(TCOUNT_W)) tim (
    .clk    (clk_50MHz),
    .rst    (rst),
    .mclk   (dac_MCLK),
    .sclk   (sclk),
    .lrck   (audio_clk),
    .wclk   (slo_clk),
    .load_l (dac_load_L),
    .load_r (dac_load_R)
  );

  // Synchronisers for the board inputs.
  logic [1:0] btn_sync;
  speed_t     sw_meta, sw_sync;

  always_ff @(posedge clk_50MHz or posedge rst) begin
    if (rst) begin
      btn_sync <= '0;
      sw_meta  <= '0;
      sw_sync  <= '0;
    end else begin
      btn_sync <= {btn_sync[0], btn0};
      sw_meta  <= sw;
      sw_sync  <= sw_meta;
    end
  end

  logic   square;
  speed_t speed_L;
  assign square  = SQUARE_ON_BTN ? btn_sync[1] : 1'b0;
  assign speed_L = SPEED_FROM_SW ? sw_sync : WAIL_SPEED;

  wail w1 (
    .lo_pitch   (LO_TONE),
    .hi_pitch   (HI_TONE),
    .wspeed     (speed_L),
    .wclk       (slo_clk),
    .audio_clk  (audio_clk),
    .rst        (rst),
    .square     (square),
    .audio_data (data_L)
  );

  if (RIGHT_WAIL) begin : g_right_wail
    wail w2 (
      .lo_pitch   (R_LO_TONE),
      .hi_pitch   (R_HI_TONE),
      .wspeed     (R_WAIL_SPEED),
      .wclk       (slo_clk),
      .audio_clk  (audio_clk),
      .rst        (rst),
      .square     (square),
      .audio_data (data_R)
    );
  end else begin : g_mono
    assign data_R = data_L;   // same sample on both channels
  end

  dac_if dac (
    .SCLK    (sclk),
    .rst     (rst),
    .L_start (dac_load_L),
    .R_start (dac_load_R),
    .L_data  (data_L),
    .R_data  (data_R),
    .SDATA   (dac_SDIN)
  );

  assign dac_LRCK = audio_clk;
  assign dac_SCLK = sclk;

endmodule
