// tb_lfo_bank: runs the three LFOs on the sawtooth table for one second of
// samples (44,100) at requested rates of 5 Hz, 35 Hz and -3 Hz and counts the
// cycles: 5, 20 (limited to the 20 Hz maximum) and 0. It also checks that the
// LFOs with the sine shape stay within [-1, 1]. sample_en pulses every 4 clocks.
module tb_lfo_bank;
  import fmpga_pkg::*;
  logic clk = 0, rst = 1, sample_en = 0;
  fix_t  [2:0] rate;
  wave_e [2:0] shape;
  fix_t  [2:0] lfo;
  int checks = 0, failures = 0;

  lfo_bank dut (.*);
  always #5 clk = ~clk;

  initial begin
    int wraps [3];
    fix_t prev [3];
    rate[0] = fix_t'(5 * 4096); rate[1] = fix_t'(35 * 4096); rate[2] = -fix_t'(3 * 4096);
    shape = {WAVE_SAW, WAVE_SAW, WAVE_SAW};
    for (int l = 0; l < 3; l++) begin wraps[l] = 0; prev[l] = '0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    for (int l = 0; l < 3; l++) prev[l] = lfo[l];
    for (int k = 0; k < 44100; k++) begin
      @(posedge clk); sample_en <= 1;
      @(posedge clk); sample_en <= 0;
      @(posedge clk); @(posedge clk); @(negedge clk);
      for (int l = 0; l < 3; l++) begin
        if (lfo[l] < prev[l]) wraps[l]++;
        prev[l] = lfo[l];
      end
    end
    checks++; if (wraps[0] < 4 || wraps[0] > 5) begin failures++; $display("FAIL lfo0 %0d cycles, expected 5", wraps[0]); end
    checks++; if (wraps[1] < 19 || wraps[1] > 20) begin failures++; $display("FAIL lfo1 %0d cycles, expected 20", wraps[1]); end
    checks++; if (wraps[2] != 0) begin failures++; $display("FAIL lfo2 %0d cycles, expected 0", wraps[2]); end
    shape = {WAVE_SINE, WAVE_SINE, WAVE_SINE};
    rate[2] = fix_t'(20 * 4096);
    for (int k = 0; k < 3000; k++) begin
      @(posedge clk); sample_en <= 1;
      @(posedge clk); sample_en <= 0;
      @(posedge clk); @(posedge clk); @(negedge clk);
      for (int l = 0; l < 3; l++) begin
        checks++;
        if (lfo[l] > UNIT_ONE || lfo[l] < -UNIT_ONE) begin failures++; $display("FAIL lfo%0d out of range", l); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
