// tb_wavetable_oscillator: runs the oscillator on the sawtooth table, where the
// phase can be read back from each sample, and checks
//  - that the phase after k samples is floor(k * 2048 f / 44100) (within one
//    table step) for f = 440 Hz and 4000 Hz,
//  - that 44,100 samples at 440 Hz contain 440 cycles (frequency error < 1 %,
//    in fact < 0.3 %), and at 20 Hz contain 20,
//  - that sync restarts the phase at 0.
// sample_en pulses every 4 clocks.
module tb_wavetable_oscillator;
  import fmpga_pkg::*;
  logic clk = 0, rst = 1, sample_en = 0, sync = 0;
  fix_t freq;
  wave_e shape = WAVE_SAW;
  fix_t sample;
  int checks = 0, failures = 0;

  wavetable_oscillator dut (.*);
  always #5 clk = ~clk;

  function automatic int phase_of(fix_t s);  // saw: sample16 = 32*i - 32768
    return ((int'(s) >>> 9) + 32768) / 32;
  endfunction

  task automatic step_sample();
    @(posedge clk); sample_en <= 1;
    @(posedge clk); sample_en <= 0;
    @(posedge clk); @(posedge clk);   // two cycles to the table output
    @(negedge clk);
  endtask

  task automatic run(input real f, input int n, input bit track);
    int wraps, prev, ph;
    longint expn;
    freq = fix_t'(int'(f * 4096.0));
    @(posedge clk); sync <= 1; @(posedge clk); sync <= 0;
    @(posedge clk); @(posedge clk);
    prev = 0; wraps = 0;
    for (int k = 1; k <= n; k++) begin
      step_sample();
      ph = phase_of(sample);
      if (ph < prev) wraps++;
      prev = ph;
      if (track && k <= 3000) begin
        expn = longint'($floor(real'(k) * f * 2048.0 / 44100.0)) % 2048;
        checks++;
        if (ph != int'(expn) && ph != int'((expn + 1) % 2048) && ph != int'((expn + 2047) % 2048)) begin
          failures++;
          if (failures < 10) $display("FAIL f=%f k=%0d phase %0d expected %0d", f, k, ph, expn);
        end
      end
    end
    if (n == 44100) begin
      checks++;
      if (wraps < int'($floor(f * 0.99)) || wraps > int'($ceil(f * 1.01))) begin
        failures++; $display("FAIL f=%f: %0d cycles in one second", f, wraps);
      end
    end
  endtask

  initial begin
    freq = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    run(440.0, 44100, 1);
    run(4000.0, 3000, 1);
    run(20.0, 44100, 0);
    @(posedge clk); sync <= 1; @(posedge clk); sync <= 0;
    repeat (3) @(posedge clk); @(negedge clk);
    checks++;
    if (phase_of(sample) != 0) begin failures++; $display("FAIL sync left phase %0d", phase_of(sample)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
