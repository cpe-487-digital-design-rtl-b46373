// dac_if: parallel-to-serial converter for an I2S stereo DAC.
//
// A 16-bit shift register is updated on every falling edge of SCLK. When
// L_start is high it loads the left sample, else when R_start is high it
// loads the right sample, else it shifts one place left with a 0 coming
// in. SDATA is the register's MSB, so each word leaves MSB first, one bit
// per SCLK period, and every bit changes on a falling edge and is stable
// at the rising edge on which the DAC samples it.
//
// Interface: the load strobes must be high across exactly one falling
// SCLK edge per word; the surrounding timing generator places that edge
// half an SCLK period after the first rising edge that follows an LRCK
// change, which puts the MSB on the second rising edge, as I2S requires.
// rst (asynchronous, active high) clears the register so SDATA is 0
// until the first load.
//
// The register, its edge and the load priority (left over right) follow
// the lab design; the reset is this design's addition.
module dac_if
  import siren_pkg::*;
(
  input  logic    SCLK,     // serial clock (1.5625 MHz)
  input  logic    rst,      // asynchronous reset, active high
  input  logic    L_start,  // load left sample
  input  logic    R_start,  // load right sample
  input  sample_t L_data,   // left sample
  input  sample_t R_data,   // right sample
  output logic    SDATA     // serial data to the DAC
);

  logic [SAMPLE_W-1:0] sreg;

  always_ff @(negedge SCLK or posedge rst) begin
    if (rst)          sreg <= '0;
    else if (L_start) sreg <= L_data;
    else if (R_start) sreg <= R_data;
    else              sreg <= {sreg[SAMPLE_W-2:0], 1'b0};
  end

  assign SDATA = sreg[SAMPLE_W-1];

endmodule
