// tone: triangle-wave oscillator.
//
// A 16-bit phase accumulator adds `pitch` on every rising edge of the
// audio sampling clock, so the phase wraps pitch * f_clk / 65536 times per
// second (pitch = 1 gives about 0.745 Hz at 48.828 kHz, pitch = 1000
// about 745 Hz). The two top phase bits select a quadrant and the lower
// 14 bits an index within it; the quadrants map to a rising, falling,
// falling-negative and rising-negative ramp, giving a signed triangle that
// spans -16383 .. +16383:
//   quadrant 0:  index            quadrant 1:  16383 - index
//   quadrant 2: -index            quadrant 3:  index - 16383
//
// With `square` high the output is instead a square wave of the same
// frequency and peak: +16383 for the first half of the phase range
// (quadrants 0 and 1) and -16383 for the second half, so the two shapes
// stay in phase when the input switches.
//
// Interface: clk is the audio sampling clock, rst an asynchronous
// active-high reset that clears the phase, pitch the phase increment,
// square selects the waveform and data is the current sample. data is a
// combinational function of the phase register and `square`, so it
// changes right after each rising clock edge (or when `square` changes)
// and is otherwise stable for the whole sampling period.
//
// The accumulator, the quadrant mapping and the widths follow the lab
// design, and the square-wave option is one of the lab's suggested
// extensions; its amplitude and phase are this design's choice, as is the
// reset (the original relies on the FPGA's power-up state).
module tone
  import siren_pkg::*;
(
  input  logic    clk,     // audio sampling clock (48.828 kHz)
  input  logic    rst,     // asynchronous reset, active high
  input  pitch_t  pitch,   // phase increment per sample
  input  logic    square,  // 1: square wave, 0: triangle wave
  output sample_t data     // signed triangle sample
);

  phase_t count;           // current phase of the waveform

  always_ff @(posedge clk or posedge rst) begin
    if (rst) count <= '0;
    else     count <= count + phase_t'(pitch);
  end

  logic [1:0]       quad;
  logic [PHASE_W-3:0] index;
  assign quad  = count[PHASE_W-1 -: 2];
  assign index = count[PHASE_W-3:0];

  sample_t idx_s;
  assign idx_s = sample_t'({2'b00, index});

  always_comb begin
    if (square) data = quad[1] ? -sample_t'(TRI_PEAK) : sample_t'(TRI_PEAK);
    else unique case (quad)
      2'd0:    data = idx_s;
      2'd1:    data = sample_t'(TRI_PEAK) - idx_s;
      2'd2:    data = -idx_s;
      default: data = idx_s - sample_t'(TRI_PEAK);
    endcase
  end

endmodule
