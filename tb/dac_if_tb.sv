// dac_if_tb: self-checking testbench for the I2S shift register.
//
// The testbench drives SCLK and the load strobes and predicts SDATA bit
// by bit. Each word is loaded on one falling SCLK edge and must then
// appear MSB first, one bit per falling edge. The checks cover: left and
// right loads with random data, left winning when both strobes are high,
// zeros shifted in after the 16th bit when no new load comes, and SDATA
// being unchanged across every rising edge (the edge on which the DAC
// samples it).
module dac_if_tb;
  import siren_pkg::*;

  logic    SCLK = 1'b1;
  logic    rst = 1'b1;
  logic    L_start = 1'b0;
  logic    R_start = 1'b0;
  sample_t L_data = '0;
  sample_t R_data = '0;
  logic    SDATA;

  int checks = 0;
  int failures = 0;

  dac_if dut (
    .SCLK(SCLK), .rst(rst), .L_start(L_start), .R_start(R_start),
    .L_data(L_data), .R_data(R_data), .SDATA(SDATA)
  );

  task automatic expect_bit(logic exp, string what);
    checks++;
    if (SDATA !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: SDATA=%b expected=%b", what, SDATA, exp);
    end
  endtask

  // One SCLK period: falling edge, settle, rising edge. The bit on SDATA
  // after the falling edge must still be there after the rising edge.
  task automatic sclk_cycle(logic exp, string what);
    SCLK = 1'b0;
    #5 expect_bit(exp, what);
    #5 SCLK = 1'b1;
    #5 expect_bit(exp, {what, " (after rising edge)"});
    #5;
  endtask

  // Send one word with the given strobes; `word` is the expected content.
  task automatic send(logic l, logic r, logic [15:0] word, int unsigned extra);
    L_start = l;
    R_start = r;
    sclk_cycle(word[15], "MSB after load");
    L_start = 1'b0;
    R_start = 1'b0;
    L_data  = sample_t'($urandom);   // data may change once loaded
    R_data  = sample_t'($urandom);
    for (int b = 14; b >= 0; b--) sclk_cycle(word[b], $sformatf("bit %0d", b));
    repeat (extra) sclk_cycle(1'b0, "zero fill");
  endtask

  initial begin
    logic [15:0] w;
    #3 rst = 1'b0;
    #1 rst = 1'b1;
    #5 rst = 1'b0;
    #5 expect_bit(1'b0, "after reset");
    for (int k = 0; k < 200; k++) begin
      w = 16'($urandom);
      if (k % 2 == 0) begin
        L_data = sample_t'(w);
        send(1'b1, 1'b0, w, 0);
      end else begin
        R_data = sample_t'(w);
        send(1'b0, 1'b1, w, 0);
      end
    end
    // Both strobes high: the left word wins.
    L_data = sample_t'(16'hA5C3);
    R_data = sample_t'(16'h5A3C);
    send(1'b1, 1'b1, 16'hA5C3, 4);
    // A lone word followed by zeros.
    R_data = sample_t'(16'hFFFF);
    send(1'b0, 1'b1, 16'hFFFF, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
