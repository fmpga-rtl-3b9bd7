// tb_fmpga_top: end-to-end test of the synthesizer at reduced sizes (16 clocks
// per MIDI bit, 80 clocks per audio sample, 4-clock encoder debounce, 30,000-
// clock LCD frames). Everything enters through the top-level pins: serial MIDI
// bytes on midi_rx and quadrature signals on the encoder pins. Checked:
//  - silence before any note, sound after a Note On, on the unit the
//    dispatcher chose;
//  - four-note polyphony, and a fifth note stealing the oldest voice;
//  - a Note On with velocity 0 acting as Note Off (that voice releases);
//  - a MIDI framing error being detected and the next message still decoded;
//  - an encoder edit (page VOICE, distortion k raised to 5) reaching the APUs;
//  - every DAC frame carrying the top ten bits of the mixer output;
//  - LCD frames being sent;
//  - silence again after every note is released.
// Each of these mechanisms is counted; one that never happens is a failure.
module tb_fmpga_top;
  import fmpga_pkg::*;
  localparam int SR = 16;
  logic clk = 0, rst = 1, midi_rx = 1;
  logic [2:0] enc_a = '1, enc_b = '1;
  logic dac_sclk, dac_sync_n, dac_din, lcd_cs_n, lcd_rst_n, lcd_a0, lcd_sclk, lcd_si;
  logic signed [15:0] audio_sample;
  logic audio_valid, voice_stolen, midi_frame_error, lcd_frame_done;
  logic [3:0] apu_sounding;
  int checks = 0, failures = 0;

  fmpga_top #(.SAMPLE_HZ(625_000), .SAMPLING_RATE(SR), .DEBOUNCE(4), .FRAME_CYCLES(30_000)) dut (.*);
  always #5 clk = ~clk;

  // ---- monitors --------------------------------------------------------------
  int n_steal = 0, n_ferr = 0, n_lcd = 0, n_dac_ok = 0, n_dac_bad = 0, n_release_end = 0;
  int n_loud = 0, n_samples = 0, n_start = 0, n_enc = 0, n_dist = 0;
  logic [3:0] sounding_q = '0;
  always @(posedge clk) if (!rst) begin
    if (voice_stolen) n_steal++;
    if (midi_frame_error) n_ferr++;
    if (lcd_frame_done) n_lcd++;
    if (audio_valid) begin n_samples++; if (audio_sample > 16'sd200 || audio_sample < -16'sd200) n_loud++; end
    sounding_q <= apu_sounding;
    for (int i = 0; i < 4; i++) if (sounding_q[i] && !apu_sounding[i]) n_release_end++;
    for (int i = 0; i < 4; i++) if (!sounding_q[i] && apu_sounding[i]) n_start++;
    if (dut.enc_step != 0) n_enc++;
    if (dut.g_apu[0].u_apu.k_v > fix_t'(1 << 22) && audio_valid) n_dist++;
  end

  // DAC frame capture: compare with the sample the mixer produced
  logic [15:0] dsh; int dn = 0; logic dsclk_q = 1, dsync_q = 1;
  logic signed [15:0] last_sample;
  always @(posedge clk) begin
    dsclk_q <= dac_sclk; dsync_q <= dac_sync_n;
    if (audio_valid) last_sample <= audio_sample;
    if (dsync_q && !dac_sync_n) dn = 0;
    if (!dac_sync_n && dsclk_q && !dac_sclk) begin dsh = {dsh[14:0], dac_din}; dn++; end
    if (!dsync_q && dac_sync_n) begin
      if (dn == 16 && dsh == {4'b0000, ~last_sample[15], last_sample[14:6], 2'b00}) n_dac_ok++;
      else n_dac_bad++;
    end
  end

  // ---- stimulus ----------------------------------------------------------------
  task automatic midi_byte(input logic [7:0] b, input logic stop = 1'b1);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin midi_rx <= f[i]; repeat (SR) @(posedge clk); end
    midi_rx <= 1'b1; repeat (SR) @(posedge clk);
  endtask
  task automatic midi_msg(input logic [7:0] st, input int n, input int v);
    midi_byte(st); midi_byte(8'(n)); midi_byte(8'(v));
    repeat (10) @(posedge clk);
  endtask

  task automatic enc_turn(input int e, input int n);   // clockwise detents
    repeat (n) begin
      enc_a[e] <= 0; enc_b[e] <= 1; repeat (12) @(posedge clk);
      enc_a[e] <= 0; enc_b[e] <= 0; repeat (12) @(posedge clk);
      enc_a[e] <= 1; enc_b[e] <= 0; repeat (12) @(posedge clk);
      enc_a[e] <= 1; enc_b[e] <= 1; repeat (12) @(posedge clk);
    end
  endtask

  task automatic samples(input int n); repeat (n * 80) @(posedge clk); endtask

  task automatic expect_true(input string what, input bit c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic mechanism(input string what, input int count);
    checks++;
    $display("mechanism %-28s happened %0d times", what, count);
    if (count == 0) begin failures++; $display("FAIL mechanism %s never happened", what); end
  endtask

  int loud0, steals0;
  initial begin
    repeat (5) @(posedge clk);
    rst <= 0;
    samples(200);
    expect_true("silent before notes", n_loud == 0 && n_samples > 150);
    // one note: unit 0
    midi_msg(8'h90, 69, 100);
    samples(300);
    expect_true("note 69 on unit 0", apu_sounding == 4'b0001);
    expect_true("sound after note on", n_loud > 100);
    // three more notes: all four units
    midi_msg(8'h90, 72, 90); midi_msg(8'h90, 76, 80); midi_msg(8'h90, 79, 70);
    samples(100);
    expect_true("four voices", apu_sounding == 4'b1111);
    // fifth note steals the oldest (unit 0)
    steals0 = n_steal;
    midi_msg(8'h91, 84, 110);
    samples(50);
    expect_true("fifth note stole a voice", n_steal == steals0 + 1);
    expect_true("stolen unit plays note 84", dut.u_dispatcher.held_note[0] == 7'd84);
    // note on with velocity 0 = note off for 72 (unit 1)
    midi_msg(8'h90, 72, 0);
    samples(14000);                         // default release 0.297 s = 13,100 samples
    expect_true("unit 1 released", apu_sounding == 4'b1101);
    // framing error in the middle of a message, then a good message
    midi_byte(8'h90); midi_byte(8'd60, 1'b0);
    midi_msg(8'h80, 76, 0);
    samples(14000);
    expect_true("unit 2 released after framing error", apu_sounding == 4'b1001);
    // encoders: page VOICE (3 steps), setting k (2 steps), +64 -> k = 5
    enc_turn(0, 3);
    enc_turn(1, 2);
    enc_turn(2, 64);
    samples(10);
    expect_true("page is VOICE", dut.page == 4'd3 && dut.sel == 3'd2);
    expect_true("k reached the APU", dut.g_apu[0].u_apu.k_v == fix_t'(80 << 18));
    loud0 = n_loud;
    samples(500);
    expect_true("distorted voices still sound", n_loud > loud0 + 400);
    // release everything
    midi_msg(8'h80, 84, 0); midi_msg(8'h80, 79, 0);
    samples(14000);
    expect_true("all released", apu_sounding == 4'b0000);
    loud0 = n_loud;
    samples(200);
    expect_true("silent at the end", n_loud == loud0);
    mechanism("voice start", n_start);
    mechanism("voice steal", n_steal);
    mechanism("release to silence", n_release_end);
    mechanism("encoder step", n_enc);
    mechanism("sample with k above 1", n_dist);
    mechanism("MIDI framing error", n_ferr);
    mechanism("LCD frame", n_lcd);
    mechanism("DAC frame matching mixer", n_dac_ok);
    mechanism("loud samples", n_loud);
    expect_true("no bad DAC frame", n_dac_bad == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
