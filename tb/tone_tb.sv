// tone_tb: self-checking testbench for the triangle oscillator.
//
// Drives the audio clock directly and keeps its own phase accumulator.
// After every clock edge the DUT's sample is compared with a triangle
// computed from that phase by a piecewise formula over the full 16-bit
// phase range (0..65535 -> 0..16383..0..-16383..0). Several pitches are
// used, including 1 (slowest), 1000 (the ~745 Hz example), the largest
// 14-bit pitch and random ones, and the number of completed waveform
// periods in a fixed number of samples is checked against
// floor(samples * pitch / 65536), which is the tone's frequency law.
// The square-wave mode is checked the same way (+16383 for the first half
// of the phase range, -16383 for the second), including switching
// between the two shapes without disturbing the phase.
module tone_tb;
  import siren_pkg::*;

  logic    clk = 1'b0;
  logic    rst = 1'b1;
  pitch_t  pitch = '0;
  logic    square = 1'b0;
  sample_t data;

  int checks = 0;
  int failures = 0;

  tone dut (.clk(clk), .rst(rst), .pitch(pitch), .square(square), .data(data));

  always #10 clk = ~clk;

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

  int unsigned ref_phase = 0;
  int          square_checks = 0;
  int          quad_seen[4] = '{0, 0, 0, 0};

  task automatic check_sample(string what);
    checks++;
    if (int'(data) != sample_ref(ref_phase, square)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: phase=%0d pitch=%0d square=%b data=%0d expected=%0d",
                 what, ref_phase, pitch, square, data, sample_ref(ref_phase, square));
    end
    if (square) square_checks++;
    quad_seen[ref_phase >> 14]++;
  endtask

  // Run n samples at pitch p and count phase wraps.
  task automatic run_pitch(int unsigned p, int unsigned n);
    int unsigned wraps = 0;
    int unsigned start = ref_phase;
    pitch = pitch_t'(p);
    repeat (n) begin
      @(posedge clk);
      ref_phase = ref_phase + p;
      if (ref_phase >= 65536) begin
        ref_phase -= 65536;
        wraps++;
      end
      #1;
      check_sample($sformatf("pitch %0d", p));
    end
    checks++;
    if (wraps != (start + p * n) / 65536) begin
      failures++;
      $display("FAIL frequency: pitch=%0d samples=%0d wraps=%0d expected=%0d",
               p, n, wraps, (start + p * n) / 65536);
    end
  endtask

  initial begin
    #35 rst = 1'b0;
    // Reset value: phase 0, sample 0.
    #1 check_sample("after reset");
    run_pitch(1000, 400);
    run_pitch(16383, 200);
    run_pitch(1, 70000);          // one full period at the lowest pitch
    run_pitch(8192, 64);
    for (int k = 0; k < 20; k++)
      run_pitch($urandom_range(16383, 1), 200);
    // Square-wave mode, switched on and off mid-run.
    square = 1'b1;
    #1 check_sample("square switched on");
    run_pitch(1000, 300);
    run_pitch(16383, 50);
    square = 1'b0;
    #1 check_sample("square switched off");
    run_pitch(777, 100);
    square = 1'b1;
    for (int k = 0; k < 10; k++)
      run_pitch($urandom_range(16383, 1), 100);
    square = 1'b0;
    checks++;
    if (square_checks < 1000) begin
      failures++;
      $display("FAIL too few square-wave samples: %0d", square_checks);
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad_seen[q] == 0) begin
        failures++;
        $display("FAIL quadrant %0d never reached", q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20 * 200000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
