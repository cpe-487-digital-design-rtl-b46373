// wail: pitch sweeper that turns a tone into a wailing siren.
//
// On every rising edge of the slow wail clock the current pitch moves by
// `wspeed` in the current direction. Before moving, the direction is
// re-evaluated: at or above hi_pitch it turns down, at or below lo_pitch
// it turns up, and in between it keeps its previous value. The pitch
// therefore runs back and forth between the two limits, overshooting each
// by less than one step. The pitch drives an internal tone instance whose
// samples, clocked by the audio clock, are the block's output.
//
// Interface: wclk is the wail clock (about 47.7 Hz), audio_clk the audio
// sampling clock; rst is an asynchronous active-high reset; square is
// passed to the tone and selects a square instead of a triangle wave.
// After reset the pitch is 0 and the direction is down; the first wail
// clock sees pitch <= lo_pitch and turns it up, so the sweep starts from
// silence and climbs into range. Pitch arithmetic wraps at 14 bits, as in the lab
// design; with lo_pitch >= wspeed and hi_pitch + wspeed < 16384 it never
// wraps.
//
// The update rule and widths follow the lab design; the reset and its
// values are this design's choice.
module wail
  import siren_pkg::*;
(
  input  pitch_t  lo_pitch,   // lowest pitch
  input  pitch_t  hi_pitch,   // highest pitch
  input  speed_t  wspeed,     // pitch change per wail clock
  input  logic    wclk,       // wail clock
  input  logic    audio_clk,  // audio sampling clock
  input  logic    rst,        // asynchronous reset, active high
  input  logic    square,     // square (1) or triangle (0) tone
  output sample_t audio_data  // wailing tone samples
);

  typedef enum logic {DOWN = 1'b0, UP = 1'b1} dir_e;

  pitch_t curr_pitch;
  dir_e   updn;
  dir_e   dir_next;

  // Direction for this step, decided from the pitch before it moves.
  always_comb begin
    if (curr_pitch >= hi_pitch)      dir_next = DOWN;
    else if (curr_pitch <= lo_pitch) dir_next = UP;
    else                             dir_next = updn;
  end

  always_ff @(posedge wclk or posedge rst) begin
    if (rst) begin
      updn       <= DOWN;
      curr_pitch <= '0;
    end else begin
      updn <= dir_next;
      if (dir_next == UP) curr_pitch <= curr_pitch + pitch_t'(wspeed);
      else                curr_pitch <= curr_pitch - pitch_t'(wspeed);
    end
  end

  tone tgen (
    .clk   (audio_clk),
    .rst   (rst),
    .pitch (curr_pitch),
    .square(square),
    .data  (audio_data)
  );

endmodule
