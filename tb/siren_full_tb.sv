// siren_full_tb: end-to-end testbench of the siren at its default parameters: the 20-bit
// timing counter (47.68 Hz wail clock), limits 344 and 687, speed 8.
//
// The siren's DAC pins feed siren_scoreboard, which predicts the clock
// pins every cycle, deserialises the I2S stream with a CS4344 receiver
// model and compares every received word with an independently replayed
// sweep and waveform. The run lasts until every sweep has turned at its
// upper limit and, coming back down, at its lower limit at least
// 1 time(s). The testbench then checks that every mechanism occurred:
// turns at both limits, left and right words, all four quadrants of the
// triangle and wraps of the timing counter. A watchdog ends the
// run as a failure if that takes too long.
module siren_full_tb;

  localparam int unsigned TW   = 20;
  localparam int          NEED = 1;
  localparam int          NSWEEP = 1;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       btn0 = 1'b0;
  logic [7:0] sw = '0;
  logic       dac_MCLK, dac_LRCK, dac_SCLK, dac_SDIN;

  int checks, failures, left_words, right_words, square_samples;
  int turns_at_hi [2];
  int turns_at_lo [2];
  int quad_seen [4];
  int pitch_now [2];
  int counter_wraps;

  siren dut (
    .clk_50MHz(clk), .rst(rst), .btn0(btn0), .sw(sw),
    .dac_MCLK(dac_MCLK), .dac_LRCK(dac_LRCK), .dac_SCLK(dac_SCLK), .dac_SDIN(dac_SDIN)
  );

  siren_scoreboard #(.TCOUNT_W(TW)) sb (
    .clk(clk), .rst(rst), .btn0(btn0), .sw(sw),
    .dac_MCLK(dac_MCLK), .dac_LRCK(dac_LRCK), .dac_SCLK(dac_SCLK), .dac_SDIN(dac_SDIN),
    .checks(checks), .failures(failures), .turns_at_hi(turns_at_hi),
    .turns_at_lo(turns_at_lo), .left_words(left_words), .right_words(right_words),
    .quad_seen(quad_seen), .square_samples(square_samples),
    .counter_wraps(counter_wraps), .pitch_now(pitch_now)
  );

  always #10 clk = ~clk;   // 50 MHz

  int extra_checks = 0;
  int extra_failures = 0;

  task automatic require(bit cond, string what);
    extra_checks++;
    if (!cond) begin
      extra_failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic report();
    $display("turns at upper limit=%0d/%0d, at lower limit=%0d/%0d, left words=%0d, right words=%0d",
             turns_at_hi[0], turns_at_hi[1], turns_at_lo[0], turns_at_lo[1], left_words, right_words);
    $display("quadrant samples=%0d/%0d/%0d/%0d, square samples=%0d, counter wraps=%0d, final pitch=%0d/%0d",
             quad_seen[0], quad_seen[1], quad_seen[2], quad_seen[3], square_samples,
             counter_wraps, pitch_now[0], pitch_now[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures);
  endtask

  function automatic bit all_turned();
    for (int s = 0; s < NSWEEP; s++)
      if (turns_at_hi[s] < NEED || turns_at_lo[s] < NEED) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    // Reset with an edge the asynchronous reset sees, released just
    // after a falling clock edge.
    #3 rst = 1'b0;
    #2 rst = 1'b1;
    @(negedge clk);
    @(negedge clk);
    #1 rst = 1'b0;
    while (!all_turned()) @(negedge clk);
    @(negedge clk);
    for (int s = 0; s < NSWEEP; s++) begin
      require(turns_at_hi[s] >= NEED, $sformatf("sweep %0d turned at its upper limit", s));
      require(turns_at_lo[s] >= NEED, $sformatf("sweep %0d turned at its lower limit", s));
    end
    require(left_words > 0, "left words received");
    require(right_words > 0, "right words received");
    require(left_words - right_words <= 1 && right_words - left_words <= 1,
            "left and right words alternate");
    for (int q = 0; q < 4; q++)
      require(quad_seen[q] > 0, $sformatf("triangle quadrant %0d sent", q));
    require(counter_wraps > 0, "timing counter wrapped");
    report();
    $finish;
  end

  // Watchdog: the expected run is about (86 + 43 * (2 * NEED - 1)) wail
  // periods at the default sweep; allow 300 wail periods.
  initial begin
    #(64'd20 * (64'd1 << TW) * 64'd300);
    extra_failures++;
    $display("FAIL watchdog expired");
    report();
    $finish;
  end

endmodule
