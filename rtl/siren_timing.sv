// siren_timing: clock and strobe generator for the siren.
//
// A binary counter runs on the 50 MHz system clock; its bits are the
// design's clocks:
//   mclk  = ~tcount[1]   12.5 MHz   DAC master clock (256 x LRCK)
//   sclk  =  tcount[4]   1.5625 MHz DAC serial clock (32 x LRCK)
//   lrck  =  tcount[9]   48.828 kHz sampling clock, low = left channel
//   wclk  =  tcount[MSB] 47.68 Hz   wail clock (with the default 20 bits)
// Two registered strobes mark where the DAC shift register must load:
// load_l is high while tcount[9:0] was in [0x00F, 0x02E) on the previous
// clock, load_r likewise for [0x20F, 0x22E). Because the strobes are
// registered they are high for counts 0x010..0x02E (0x210..0x22E), a
// window that contains exactly one falling edge of sclk (count 0x020,
// resp. 0x220) and no other, so the shift register loads once per
// channel, one SCLK period after LRCK changes.
//
// Interface: clk is the 50 MHz system clock, rst an asynchronous
// active-high reset that clears the counter and the strobes. All outputs
// change right after a rising clk edge.
//
// The counter, its taps and the strobe windows follow the lab design. The
// counter width is a parameter (the lab uses 20 bits); narrowing it only
// speeds up the wail clock. The reset is this design's addition; the lab
// relies on the counter's power-up value of zero.
module siren_timing
  import siren_pkg::*;
#(
  parameter int unsigned TCOUNT_W = TCOUNT_W_DEFAULT
) (
  input  logic clk,      // 50 MHz system clock
  input  logic rst,      // asynchronous reset, active high
  output logic mclk,     // DAC master clock
  output logic sclk,     // DAC serial clock
  output logic lrck,     // left/right clock = audio sampling clock
  output logic wclk,     // wail clock
  output logic load_l,   // load left sample into the DAC shift register
  output logic load_r    // load right sample into the DAC shift register
);

  logic [TCOUNT_W-1:0] tcount;
  logic [FRAME_W-1:0]  phase;

  assign phase = tcount[FRAME_W-1:0];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      tcount <= '0;
      load_l <= 1'b0;
      load_r <= 1'b0;
    end else begin
      tcount <= tcount + 1'b1;
      load_l <= (phase >= LOAD_L_START) && (phase < LOAD_L_END);
      load_r <= (phase >= LOAD_R_START) && (phase < LOAD_R_END);
    end
  end

  assign mclk = ~tcount[MCLK_BIT];
  assign sclk = tcount[SCLK_BIT];
  assign lrck = tcount[LRCK_BIT];
  assign wclk = tcount[TCOUNT_W-1];

  initial begin
    assert (TCOUNT_W > FRAME_W)
      else $error("siren_timing: TCOUNT_W must exceed the %0d-bit frame counter", FRAME_W);
  end

  // The two channels' load windows are disjoint.
  assert property (@(posedge clk) !(load_l && load_r))
    else $error("siren_timing: left and right load strobes overlap");

endmodule
