// tb_pitch_lut: compares the frequency of every MIDI note 0..127 with
// 440 * 2^((n-69)/12) Hz computed in floating point, requiring the Q14.12
// result to be within 0.01 % + 1 LSB, and checks the one-cycle latency.
module tb_pitch_lut;
  logic clk = 0;
  logic [6:0] note = 0;
  fmpga_pkg::fix_t freq;
  int checks = 0, failures = 0;

  pitch_lut dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 128; n++) begin
      real expv, err;
      note <= 7'(n);
      @(posedge clk);   // registered
      @(negedge clk);
      expv = 440.0 * (2.0 ** ((real'(n) - 69.0) / 12.0)) * 4096.0;
      err  = real'(freq) - expv;
      if (err < 0) err = -err;
      checks++;
      if (err > expv * 1.0e-4 + 1.0) begin
        failures++; $display("FAIL note %0d freq %0d expected %f", n, freq, expv);
      end
    end
    // A4 is exact
    note <= 7'd69; @(posedge clk); @(negedge clk);
    checks++;
    if (freq !== 27'sd1802240) begin failures++; $display("FAIL A4 = %0d", freq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
