// wail_tb: self-checking testbench for the pitch sweeper and its tone.
//
// The testbench drives the wail clock and the audio clock itself (never
// on the same instant) and keeps a reference of the pitch and the tone
// phase: on each wail clock the direction turns down at or above
// hi_pitch, up at or below lo_pitch, and the pitch moves by wspeed
// (modulo 2^14); on each audio clock the phase advances by the pitch
// (modulo 2^16). After every audio clock the DUT's sample is compared
// with the triangle of the reference phase. Several limit/speed settings
// are run, among them the lab's defaults, and the number of up-to-down
// and down-to-up turns is counted; each must occur. One run uses the
// square-wave option of the tone, checked against a square of the same
// phase (+16383 for the first half of the range, -16383 for the second).
module wail_tb;
  import siren_pkg::*;

  logic    wclk = 1'b0;
  logic    audio_clk = 1'b0;
  logic    rst = 1'b1;
  pitch_t  lo_pitch = pitch_t'(100);
  pitch_t  hi_pitch = pitch_t'(200);
  speed_t  wspeed = speed_t'(7);
  logic    square = 1'b0;
  sample_t audio_data;

  int checks = 0;
  int failures = 0;

  wail dut (
    .lo_pitch(lo_pitch), .hi_pitch(hi_pitch), .wspeed(wspeed),
    .wclk(wclk), .audio_clk(audio_clk), .rst(rst), .square(square), .audio_data(audio_data)
  );

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

  int unsigned ref_pitch = 0;
  bit          ref_up = 1'b0;
  int unsigned ref_phase = 0;
  int          turns_down = 0;
  int          turns_up = 0;

  task automatic audio_tick();
    audio_clk = 1'b1;
    ref_phase = (ref_phase + ref_pitch) % 65536;
    #5;
    checks++;
    if (int'(audio_data) != sample_ref(ref_phase, square)) begin
      failures++;
      if (failures < 10)
        $display("FAIL sample: pitch=%0d phase=%0d square=%b data=%0d expected=%0d",
                 ref_pitch, ref_phase, square, audio_data, sample_ref(ref_phase, square));
    end
    audio_clk = 1'b0;
    #5;
  endtask

  task automatic wail_tick();
    bit up_before = ref_up;
    wclk = 1'b1;
    if (ref_pitch >= hi_pitch)      ref_up = 1'b0;
    else if (ref_pitch <= lo_pitch) ref_up = 1'b1;
    if (up_before && !ref_up) turns_down++;
    if (!up_before && ref_up) turns_up++;
    ref_pitch = ref_up ? (ref_pitch + wspeed) % 16384
                       : (ref_pitch + 16384 - wspeed) % 16384;
    #5;
    wclk = 1'b0;
    #5;
  endtask

  // n wail periods, each followed by k audio samples.
  task automatic run(int unsigned n, int unsigned k);
    repeat (n) begin
      wail_tick();
      repeat (k) audio_tick();
    end
  endtask

  initial begin
    #1 rst = 1'b0;
    #1 rst = 1'b1;       // make sure an asynchronous reset edge is seen
    #5 rst = 1'b0;
    #5;
    audio_tick();        // pitch 0 after reset: the phase must not move
    run(120, 3);         // 100..200 in steps of 7
    lo_pitch = pitch_t'(344); hi_pitch = pitch_t'(687); wspeed = speed_t'(8);
    run(200, 2);         // the lab's default sweep
    lo_pitch = pitch_t'(1000); hi_pitch = pitch_t'(1010); wspeed = speed_t'(255);
    run(40, 5);          // a step much larger than the range
    lo_pitch = pitch_t'(5000); hi_pitch = pitch_t'(12000); wspeed = speed_t'($urandom_range(255, 1));
    run(300, 2);
    square = 1'b1;
    lo_pitch = pitch_t'(3000); hi_pitch = pitch_t'(9000);
    run(100, 4);         // square-wave tone
    square = 1'b0;
    checks++;
    if (turns_down < 4 || turns_up < 4) begin
      failures++;
      $display("FAIL too few turns: down=%0d up=%0d", turns_down, turns_up);
    end
    $display("turns: down=%0d up=%0d", turns_down, turns_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
