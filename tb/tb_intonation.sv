// tb_intonation: tuning accuracy of the note-to-sound path over the whole range
// the oscillators are meant to play (about 20 Hz to 4 kHz, MIDI notes 16 to 107).
// For each note the frequency from pitch_lut drives a wavetable_oscillator for
// 4,410 samples (0.1 s at 44.1 kHz). The phase advanced in that time, read
// with its fractional error register, gives the frequency actually played,
// which is compared with equal temperament (A4 = 440 Hz). The requirement is
// an error below 1 %; this design stays below 0.01 %, which is also checked.
// Sample strobes are 3 clocks apart here; only their count matters.
module tb_intonation;
  import fmpga_pkg::*;
  logic clk = 0, rst = 1, sample_en = 0, sync = 0;
  logic [6:0] note = '0;
  fix_t freq, sample;
  int checks = 0, failures = 0;

  pitch_lut u_lut (.clk, .note, .freq);
  wavetable_oscillator dut (.clk, .rst, .sample_en, .sync, .freq, .shape(WAVE_SINE), .sample);
  always #5 clk = ~clk;

  localparam int NSAMP = 4410;
  real worst = 0.0;

  // phase position in table samples, including the error register's fraction
  function automatic real pos();
    return real'(dut.phase) + real'(dut.err) / 16777216.0;
  endfunction

  initial begin
    real p0, p1, advance, f_meas, f_ideal, e;
    int wraps;
    logic [WT_AW-1:0] prev;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 16; n <= 107; n++) begin
      note <= 7'(n);
      repeat (3) @(posedge clk);
      p0 = pos(); wraps = 0; prev = dut.phase;
      for (int s = 0; s < NSAMP; s++) begin
        sample_en <= 1; @(posedge clk);
        sample_en <= 0; @(posedge clk); @(posedge clk);
        if (dut.phase < prev) wraps++;
        prev = dut.phase;
      end
      p1 = pos();
      advance = real'(wraps) * 2048.0 + p1 - p0;
      f_meas  = advance / 2048.0 * 44100.0 / real'(NSAMP);
      f_ideal = 440.0 * $pow(2.0, real'(n - 69) / 12.0);
      e = (f_meas - f_ideal) / f_ideal;
      if (e < 0) e = -e;
      if (e > worst) worst = e;
      checks++;
      if (e > 0.01) begin failures++; $display("FAIL note %0d: %f Hz, expected %f", n, f_meas, f_ideal); end
    end
    $display("worst tuning error %0.5f %%", worst * 100.0);
    checks++;
    if (worst > 1.0e-4) begin failures++; $display("FAIL worst error above 0.01 %%"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
