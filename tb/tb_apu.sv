// tb_apu: plays notes on one audio processing unit with hand-built settings and
// checks, from its output stream:
//  - one output per sample, rising ceil(k) + 7 cycles after sample_en (the
//    testbench samples it one edge later, hence 9, 11, 13 and 18 below for
//    k = 1, 2.5, 5, 10), and the k = 10 latency against a 25 us budget;
//  - pitch applicator = note frequency + LFO * pitch scalar (440 + 0.5*2 Hz);
//  - the output frequency, by counting rising zero crossings over 4,410
//    samples (44.1 cycles expected);
//  - the sustain amplitude (envelope 1 -> amplitude, S = 0.5): peak near 0.5;
//  - distortion: with k = 5 fully wet, the mean |out| / peak rises from the
//    sine's 0.64 towards a square wave's 1;
//  - velocity as amplitude source: peak near 100/128;
//  - release: silence and sounding = 0 after the release time.
// sample_en pulses every 40 clocks.
module tb_apu;
  import fmpga_pkg::*;
  logic clk = 0, rst = 1, sample_en = 0;
  note_event_t ev;
  synth_cfg_t cfg;
  fix_t [2:0] lfo;
  fix_t out, pitch_hz;
  logic out_valid, sounding;
  int checks = 0, failures = 0;

  apu dut (.*);
  always #5 clk = ~clk;

  function automatic real r24(fix_t v); return real'(v) / 16777216.0; endfunction

  int cyc = 0, t_en = 0, lat = -1, nvalid = 0;
  always @(posedge clk) begin
    cyc++;
    if (sample_en) t_en = cyc;
    if (out_valid) begin nvalid++; lat = cyc - t_en; end
  end

  // run n samples, measuring peak, mean |out| and rising zero crossings
  real peak, meanabs;
  int  crossings;
  task automatic run(input int n);
    real prev, v;
    peak = 0; meanabs = 0; crossings = 0; prev = 0;
    for (int s = 0; s < n; s++) begin
      @(posedge clk); sample_en <= 1;
      @(posedge clk); sample_en <= 0;
      repeat (38) @(posedge clk);
      v = r24(out);
      if (prev < 0 && v >= 0) crossings++;
      prev = v;
      if ((v < 0 ? -v : v) > peak) peak = (v < 0 ? -v : v);
      meanabs += (v < 0 ? -v : v) / n;
    end
  endtask

  task automatic check_range(input string what, input real got, input real lo, input real hi);
    checks++;
    if (got < lo || got > hi) begin failures++; $display("FAIL %s = %f, expected %f..%f", what, got, lo, hi); end
  endtask

  task automatic note(input logic on, input int num, input int vel, input real hz);
    @(posedge clk);
    ev = '0; ev.note_on = on; ev.note_off = !on; ev.note = 7'(num); ev.velocity = 7'(vel);
    ev.frequency = fix_t'(int'(hz * 4096.0));
    @(posedge clk);
    ev.note_on = 0; ev.note_off = 0;
  endtask

  initial begin
    ev = '0;
    cfg = '0;
    for (int e = 0; e < 3; e++) begin
      cfg.env[e].attack  = ufix_t'(167772);    // 10 ms
      cfg.env[e].decay   = ufix_t'(167772);    // 10 ms
      cfg.env[e].sustain = fix_t'(1 << 23);    // 0.5
      cfg.env[e].rel     = ufix_t'(335544);    // 20 ms
    end
    cfg.main_shape = WAVE_SINE;
    cfg.mod_shape  = WAVE_SINE;
    cfg.k_base     = fix_t'(1 << 22);          // k = 1
    cfg.wet_base   = '0;
    cfg.amp_scl[SRC_ENV1]   = UNIT_ONE;
    cfg.pitch_scl[SRC_LFO1] = fix_t'(2 << 12);  // 2 Hz per unit
    lfo[0] = fix_t'(1 << 23);                  // held at 0.5
    lfo[1] = '0; lfo[2] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    run(10);
    check_range("silent before note", peak, 0.0, 0.0);
    note(1, 69, 100, 440.0);
    run(1000);                                  // attack + decay done (882 samples)
    check_range("pitch_hz", real'(pitch_hz) / 4096.0, 440.99, 441.01);
    checks++; if (lat != 9) begin failures++; $display("FAIL latency %0d, expected 9 (k=1)", lat); end
    run(4410);
    check_range("zero crossings", real'(crossings), 43.0, 45.0);
    check_range("sustain peak", peak, 0.49, 0.505);
    check_range("sine mean/peak", meanabs / peak, 0.60, 0.67);
    // distortion k = 5, fully wet
    cfg.k_base   = fix_t'(5 << 22);
    cfg.wet_base = UNIT_ONE;
    run(2000);
    check_range("distorted mean/peak", meanabs / peak, 0.80, 1.0);
    check_range("distorted peak", peak, 0.49, 0.505);
    checks++; if (lat != 13) begin failures++; $display("FAIL latency %0d, expected 13 (k=5)", lat); end
    // worst case k = 10, and a fractional k = 2.5 (ceil 3)
    cfg.k_base = fix_t'(10 << 22);
    run(50);
    checks++; if (lat != 18) begin failures++; $display("FAIL latency %0d, expected 18 (k=10)", lat); end
    // APU latency budget: one sample period plus the pipeline, at most 25 us
    check_range("APU latency at k=10 (us)", real'(lat - 1) / 50.0 + 1.0e6 / 44100.0, 22.0, 25.0);
    cfg.k_base = fix_t'(5 << 21);
    run(50);
    checks++; if (lat != 11) begin failures++; $display("FAIL latency %0d, expected 11 (k=2.5)", lat); end
    cfg.k_base = fix_t'(5 << 22);
    run(200);
    // release: 20 ms = 882 samples
    note(0, 69, 0, 0.0);
    run(1000);
    run(100);
    check_range("silent after release", peak, 0.0, 0.0);
    checks++; if (sounding) begin failures++; $display("FAIL still sounding"); end
    // velocity as the amplitude source
    cfg.k_base = fix_t'(1 << 22); cfg.wet_base = '0;
    cfg.amp_scl[SRC_ENV1] = '0;
    cfg.amp_scl[SRC_VEL]  = UNIT_ONE;
    note(1, 57, 100, 220.0);
    run(2000);
    check_range("velocity peak", peak, 0.77, 0.785);
    check_range("220 Hz crossings", real'(crossings), 9.0, 11.0);
    checks++; if (nvalid != 10820) begin failures++; $display("FAIL %0d outputs for 10820 samples", nvalid); end
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
