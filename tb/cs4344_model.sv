// cs4344_model: behavioural receiver for the I2S input of a CS4344 DAC.
//
// Not synthesizable logic; it stands in for the external DAC in
// testbenches. On every rising SCLK edge it samples SDIN. An LRCK change
// seen on a rising edge marks the start of a new channel slot; the bit
// taken on that same edge is the LSB of the word of the channel that just
// ended (I2S delays data by one SCLK, so a word's MSB arrives on the
// second rising edge after LRCK changes and its LSB on the first edge of
// the next slot). A word is delivered only when exactly 16 bits were
// received for it; the partial slot after reset is dropped.
//
// Outputs: rx_word and rx_left (1 = left channel, LRCK low) hold the most
// recent word, and rx_count increments once per delivered word. MCLK is
// accepted for completeness of the pin list; the analog side and the
// delta-sigma modulator are not modelled.
module cs4344_model (
  input  logic        mclk,
  input  logic        lrck,
  input  logic        sclk,
  input  logic        sdin,
  output logic [15:0] rx_word,
  output logic        rx_left,
  output int          rx_count
);

  logic [15:0] shreg = '0;
  int          nbits = -1;         // bits of the current word; -1: not in sync
  logic        last_lrck = 1'b0;

  initial begin
    rx_word  = '0;
    rx_left  = 1'b0;
    rx_count = 0;
  end

  always @(posedge sclk) begin
    if (lrck != last_lrck) begin
      if (nbits == 15) begin
        rx_word  <= {shreg[14:0], sdin};
        rx_left  <= (last_lrck == 1'b0);
        rx_count <= rx_count + 1;
      end
      nbits = 0;
    end else if (nbits >= 0 && nbits < 15) begin
      shreg = {shreg[14:0], sdin};
      nbits++;
    end else if (nbits >= 15) begin
      nbits = -1;                   // too many bits in one slot: resync
    end
    last_lrck = lrck;
  end

  // MCLK is not used by this model of the serial port.
  logic unused_mclk;
  assign unused_mclk = mclk;

endmodule
