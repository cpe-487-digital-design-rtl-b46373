// siren_timing_tb: self-checking testbench for the clock/strobe generator.
//
// Runs the generator at its default 20-bit width for one full counter
// period plus a few frames, so every derived clock, including the
// 47.68 Hz wail clock, toggles and the counter wraps. The testbench
// counts system clocks since reset itself and checks, after every edge:
//   MCLK = not bit 1, SCLK = bit 4, LRCK = bit 9, wail clock = bit 19,
//   load_l / load_r = registered window tests on the previous count.
// It also checks the rates the design rests on: MCLK, SCLK and LRCK
// periods of 4, 32 and 1024 system clocks (256 and 32 MCLK/SCLK periods
// per LRCK period), strobe pulses 31 clocks long, and exactly one
// falling SCLK edge inside every strobe pulse.
module siren_timing_tb;
  import siren_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic mclk, sclk, lrck, wclk, load_l, load_r;

  int checks = 0;
  int failures = 0;

  siren_timing dut (
    .clk(clk), .rst(rst), .mclk(mclk), .sclk(sclk), .lrck(lrck),
    .wclk(wclk), .load_l(load_l), .load_r(load_r)
  );

  always #10 clk = ~clk;

  task automatic check(logic got, logic exp, string what, int unsigned n);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at count %0d: got %b expected %b", what, n, got, exp);
    end
  endtask

  task automatic check_int(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  localparam int unsigned CYCLES = (1 << 20) + 3 * 1024;

  initial begin
    int unsigned n = 0;         // counter value the DUT should hold
    int          cyc = 0;       // clocks since reset, never wraps
    int unsigned prev_phase;
    logic exp_l = 1'b0, exp_r = 1'b0;
    logic prev_mclk, prev_sclk, prev_lrck, prev_wclk, prev_l, prev_r;
    int   mclk_rises = 0, sclk_rises = 0, lrck_rises = 0, wclk_rises = 0;
    int   pulse_len = 0, sclk_falls_in_pulse = 0, pulses = 0;
    int   last_mclk_rise = -1, last_sclk_rise = -1, last_lrck_rise = -1;

    #15 rst = 1'b0;
    #1;
    check(mclk, 1'b1, "mclk after reset", 0);
    check(load_l | load_r, 1'b0, "strobes after reset", 0);
    {prev_mclk, prev_sclk, prev_lrck, prev_wclk, prev_l, prev_r} =
      {mclk, sclk, lrck, wclk, load_l, load_r};
    repeat (CYCLES) begin
      @(posedge clk);
      prev_phase = n % 1024;
      exp_l = (prev_phase >= 'h00F) && (prev_phase < 'h02E);
      exp_r = (prev_phase >= 'h20F) && (prev_phase < 'h22E);
      n = (n + 1) % (1 << 20);
      cyc++;
      #1;
      check(mclk, ~n[1], "mclk", n);
      check(sclk,  n[4], "sclk", n);
      check(lrck,  n[9], "lrck", n);
      check(wclk,  n[19], "wclk", n);
      check(load_l, exp_l, "load_l", n);
      check(load_r, exp_r, "load_r", n);
      // Periods of the derived clocks, measured on their rising edges.
      if (mclk && !prev_mclk) begin
        if (last_mclk_rise >= 0) check_int(cyc - last_mclk_rise, 4, "MCLK period");
        last_mclk_rise = cyc;
        mclk_rises++;
      end
      if (sclk && !prev_sclk) begin
        if (last_sclk_rise >= 0 && cyc > 32) check_int(cyc - last_sclk_rise, 32, "SCLK period");
        last_sclk_rise = cyc;
        sclk_rises++;
      end
      if (lrck && !prev_lrck) begin
        if (last_lrck_rise >= 0 && cyc > 1024) check_int(cyc - last_lrck_rise, 1024, "LRCK period");
        last_lrck_rise = cyc;
        lrck_rises++;
      end
      if (wclk && !prev_wclk) wclk_rises++;
      // Strobe pulses: length and SCLK falling edges inside them.
      if (load_l || load_r) begin
        pulse_len++;
        if (!sclk && prev_sclk) sclk_falls_in_pulse++;
      end else if (prev_l || prev_r) begin
        check_int(pulse_len, 31, "load strobe length");
        check_int(sclk_falls_in_pulse, 1, "SCLK falling edges per load strobe");
        pulses++;
        pulse_len = 0;
        sclk_falls_in_pulse = 0;
      end
      {prev_mclk, prev_sclk, prev_lrck, prev_wclk, prev_l, prev_r} =
        {mclk, sclk, lrck, wclk, load_l, load_r};
    end
    // Rates over the whole run: 256 MCLK and 32 SCLK periods per LRCK period.
    check_int(mclk_rises / lrck_rises, 256, "MCLK periods per LRCK period");
    check_int(sclk_rises / lrck_rises, 32, "SCLK periods per LRCK period");
    check_int(wclk_rises, 1, "wail clock rising edges in one counter period");
    check_int(pulses, 2 * lrck_rises, "load strobes (one per channel per frame)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20 * 64'd1200000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
