// siren_scoreboard: reference model and checker for the whole siren.
//
// Watches the siren's four DAC pins. It keeps its own count of system
// clocks since reset and from it predicts the timing counter, checking
// MCLK, SCLK and LRCK every cycle. From the same count it replays the
// wail (pitch sweep on the rising edge of the counter's MSB) and the tone
// phase (advance on the rising edge of bit 9), and records the sample
// the DAC interface must load at counts 0x020 (left) and 0x220 (right)
// of each frame. A cs4344_model instance deserialises the I2S stream and
// every received word is compared with the recorded sample of its channel.
//
// The optional extensions of the siren are modelled when enabled by the
// matching parameters: a square wave while btn0 is pressed, the wail speed
// taken from sw, and a second, independent sweep on the right channel.
// btn0 and sw are seen through the same two-clock delay as the siren's
// synchronisers.
//
// All checking happens on the falling edge of clk, when the design has
// settled; the testbench must release rst, and change btn0 and sw, just
// after a falling edge. Counters of the mechanisms exercised (sweep turns
// at the upper and lower limits per channel, left and right words, the
// four quadrants, square-wave samples, counter wraps) are outputs.
module siren_scoreboard #(
  parameter int unsigned TCOUNT_W      = 20,
  parameter int unsigned LO_TONE       = 344,
  parameter int unsigned HI_TONE       = 687,
  parameter int unsigned WAIL_SPEED    = 8,
  parameter bit          SQUARE_ON_BTN = 1'b0,
  parameter bit          SPEED_FROM_SW = 1'b0,
  parameter bit          RIGHT_WAIL    = 1'b0,
  parameter int unsigned R_LO_TONE     = 516,
  parameter int unsigned R_HI_TONE     = 1031,
  parameter int unsigned R_WAIL_SPEED  = 12
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       btn0,
  input  logic [7:0] sw,
  input  logic       dac_MCLK,
  input  logic       dac_LRCK,
  input  logic       dac_SCLK,
  input  logic       dac_SDIN,
  output int         checks,
  output int         failures,
  output int         turns_at_hi [2],   // per sweep: [0] left, [1] right
  output int         turns_at_lo [2],
  output int         left_words,
  output int         right_words,
  output int         quad_seen [4],
  output int         square_samples,
  output int         counter_wraps,
  output int         pitch_now [2]
);

  localparam int NSWEEP = RIGHT_WAIL ? 2 : 1;

  function automatic int tri_ref(int unsigned ph);
    if (ph < 16384)      return int'(ph);
    else if (ph < 32768) return 32767 - int'(ph);
    else if (ph < 49152) return 32768 - int'(ph);
    else                 return int'(ph) - 65535;
  endfunction

  function automatic int sample_ref(int unsigned ph, bit sq);
    if (sq) return (ph >= 32768) ? -16383 : 16383;
    return tri_ref(ph);
  endfunction

  logic [15:0] rx_word;
  logic        rx_left;
  int          rx_count;

  cs4344_model dac (
    .mclk(dac_MCLK), .lrck(dac_LRCK), .sclk(dac_SCLK), .sdin(dac_SDIN),
    .rx_word(rx_word), .rx_left(rx_left), .rx_count(rx_count)
  );

  localparam longint unsigned MOD = 64'd1 << TCOUNT_W;

  longint unsigned n;          // predicted timing counter
  longint unsigned cyc;        // clocks since reset
  int unsigned     pitch [2];
  bit              up [2];
  int unsigned     phase [2];
  bit              btn_s1, btn_s2;
  logic [7:0]      sw_s1, sw_s2;
  int              exp_left[$];
  int              exp_right[$];
  int              seen_rx;

  initial begin
    checks = 0; failures = 0; left_words = 0; right_words = 0;
    square_samples = 0; counter_wraps = 0;
    turns_at_hi = '{0, 0}; turns_at_lo = '{0, 0}; pitch_now = '{0, 0};
    quad_seen = '{0, 0, 0, 0};
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL at clock %0d: %s", cyc, msg);
  endtask

  function automatic int unsigned lo_of(int s);
    return s == 0 ? LO_TONE : R_LO_TONE;
  endfunction
  function automatic int unsigned hi_of(int s);
    return s == 0 ? HI_TONE : R_HI_TONE;
  endfunction

  always @(negedge clk) begin
    if (rst) begin
      n = 0; cyc = 0;
      pitch = '{0, 0}; up = '{1'b0, 1'b0}; phase = '{0, 0};
      btn_s1 = 1'b0; btn_s2 = 1'b0; sw_s1 = '0; sw_s2 = '0;
      exp_left.delete(); exp_right.delete();
      seen_rx = rx_count;
    end else begin
      longint unsigned n_prev;
      bit              sq;
      int unsigned     ph_r;
      n_prev = n;
      n = (n + 1) % MOD;
      cyc++;
      if (n == 0) counter_wraps++;
      // Two-flop synchronisers, as seen after this clock edge.
      btn_s2 = btn_s1; btn_s1 = btn0;
      sw_s2  = sw_s1;  sw_s1  = sw;
      sq = SQUARE_ON_BTN && btn_s2;

      // Clock pins.
      checks++;
      if (dac_MCLK !== ~n[1] || dac_SCLK !== n[4] || dac_LRCK !== n[9])
        fail($sformatf("clock pins MCLK=%b SCLK=%b LRCK=%b for count %0d",
                       dac_MCLK, dac_SCLK, dac_LRCK, n));

      // Wail clock: rising edge of the counter's MSB.
      if (!n_prev[TCOUNT_W-1] && n[TCOUNT_W-1]) begin
        for (int s = 0; s < NSWEEP; s++) begin
          bit          was_up;
          int unsigned spd;
          was_up = up[s];
          spd = (s == 1) ? R_WAIL_SPEED : (SPEED_FROM_SW ? int'(sw_s2) : WAIL_SPEED);
          if (pitch[s] >= hi_of(s))      up[s] = 1'b0;
          else if (pitch[s] <= lo_of(s)) up[s] = 1'b1;
          if (was_up && !up[s]) turns_at_hi[s]++;
          if (!was_up && up[s] && cyc > MOD) turns_at_lo[s]++;
          pitch[s] = up[s] ? (pitch[s] + spd) % 16384 : (pitch[s] + 16384 - spd) % 16384;
          pitch_now[s] = int'(pitch[s]);
        end
      end

      // Audio clock: rising edge of bit 9.
      if (!n_prev[9] && n[9])
        for (int s = 0; s < NSWEEP; s++) phase[s] = (phase[s] + pitch[s]) % 65536;

      // Load points of the DAC shift register.
      ph_r = phase[NSWEEP-1];
      if (n[9:0] == 10'h020 && cyc > 1024) begin
        exp_left.push_back(sample_ref(phase[0], sq));
        quad_seen[phase[0] >> 14]++;
        if (sq) square_samples++;
      end
      if (n[9:0] == 10'h220) begin
        exp_right.push_back(sample_ref(ph_r, sq));
        quad_seen[ph_r >> 14]++;
        if (sq) square_samples++;
      end

      // Words received by the DAC.
      if (rx_count != seen_rx) begin
        int expv;
        seen_rx = rx_count;
        checks++;
        if (rx_left) begin
          left_words++;
          if (exp_left.size() == 0) fail("left word with no expected sample");
          else begin
            expv = exp_left.pop_front();
            if (int'($signed(rx_word)) != expv)
              fail($sformatf("left word %0d expected %0d", $signed(rx_word), expv));
          end
        end else begin
          right_words++;
          if (exp_right.size() == 0) fail("right word with no expected sample");
          else begin
            expv = exp_right.pop_front();
            if (int'($signed(rx_word)) != expv)
              fail($sformatf("right word %0d expected %0d", $signed(rx_word), expv));
          end
        end
      end
    end
  end

endmodule
