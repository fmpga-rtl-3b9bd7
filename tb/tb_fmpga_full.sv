// tb_fmpga_full: the synthesizer at its real sizes (50 MHz clock, MIDI at
// 31,250 baud, 44.1 kHz audio, 1 ms encoder debounce, 60 frames/s display)
// taken through one complete note: a Note On for A4 (note 69) is sent bit by bit
// on midi_rx, the note sounds, a Note Off is sent, and the voice releases to
// silence. Checked:
//  - key-to-sound latency: from the end of the Note On's last byte to the first
//    DAC frame carrying sound, below 10 ms;
//  - pitch: the zero-crossing rate of the mixer output over 0.2 s gives the
//    frequency, within 1 % of 440 Hz;
//  - the audio sample rate (44.1 kHz) from the spacing of audio_valid;
//  - LCD frames 16.7 ms apart (60 frames/s), each sent in under 2 ms;
//  - silence after the release.
module tb_fmpga_full;
  localparam int CLK_HZ = 50_000_000, BIT = CLK_HZ / 31_250;
  logic clk = 0, rst = 1, midi_rx = 1;
  logic [2:0] enc_a = '1, enc_b = '1;
  logic dac_sclk, dac_sync_n, dac_din, lcd_cs_n, lcd_rst_n, lcd_a0, lcd_sclk, lcd_si;
  logic signed [15:0] audio_sample;
  logic audio_valid, voice_stolen, midi_frame_error, lcd_frame_done;
  logic [3:0] apu_sounding;
  int checks = 0, failures = 0;

  fmpga_top dut (.*);
  always #10 clk = ~clk;   // 50 MHz

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // DAC frames: decode the 10-bit code and remember when sound first appears
  logic [15:0] dsh; logic dsclk_q = 1, dsync_q = 1;
  longint first_sound = -1;
  always @(posedge clk) begin
    dsclk_q <= dac_sclk; dsync_q <= dac_sync_n;
    if (!dac_sync_n && dsclk_q && !dac_sclk) dsh = {dsh[14:0], dac_din};
    if (!dsync_q && dac_sync_n && first_sound < 0) begin
      int code;
      code = int'(dsh[11:2]);
      if (code > 512 + 4 || code < 512 - 4) first_sound = cyc;
    end
  end

  // sample spacing and zero crossings
  longint last_valid = -1, min_gap = 1 << 30, max_gap = 0;
  int n_lcd = 0, n_loud = 0;
  // LCD: spacing of frame_done strobes and the time each frame keeps cs_n low
  int n_frames = 0;
  longint last_frame = -1, min_fgap = 1 << 30, max_fgap = 0, cs_start = -1, max_cs = 0;
  logic cs_q = 1;
  always @(posedge clk) if (!rst) begin
    cs_q <= lcd_cs_n;
    if (cs_q && !lcd_cs_n) cs_start = cyc;
    if (!cs_q && lcd_cs_n && cs_start >= 0 && cyc - cs_start > max_cs) max_cs = cyc - cs_start;
    if (lcd_frame_done) begin
      n_frames++;
      if (n_frames > 2) begin   // the first frame also carries the initialisation
        if (cyc - last_frame < min_fgap) min_fgap = cyc - last_frame;
        if (cyc - last_frame > max_fgap) max_fgap = cyc - last_frame;
      end
      last_frame = cyc;
    end
  end
  always @(posedge clk) if (!rst) begin
    if (lcd_frame_done) n_lcd++;
    if (audio_valid) begin
      if (last_valid >= 0) begin
        if (cyc - last_valid < min_gap) min_gap = cyc - last_valid;
        if (cyc - last_valid > max_gap) max_gap = cyc - last_valid;
      end
      last_valid = cyc;
      if (audio_sample > 16'sd100 || audio_sample < -16'sd100) n_loud++;
    end
  end

  task automatic midi_byte(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin midi_rx <= f[i]; repeat (BIT) @(posedge clk); end
  endtask

  task automatic expect_true(input string what, input bit c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  longint t_key;
  int crossings, first_x, last_x, nsamp, loud0;
  logic signed [15:0] prev;
  real f_meas, lat_ms;
  initial begin
    repeat (10) @(posedge clk);
    rst <= 0;
    repeat (1000) @(posedge clk);
    midi_byte(8'h90); midi_byte(8'd69); midi_byte(8'd100);
    t_key = cyc;
    wait (first_sound >= 0);
    lat_ms = real'(first_sound - t_key) / 50_000.0;
    $display("key-to-DAC latency %0.3f ms", lat_ms);
    expect_true("latency below 10 ms", lat_ms < 10.0);
    // let the attack finish, then measure the pitch over 0.2 s
    repeat (CLK_HZ / 10) @(posedge clk);
    crossings = 0; first_x = -1; last_x = -1; nsamp = 0; prev = 0;
    while (nsamp < 8820) begin
      @(posedge clk);
      if (audio_valid) begin
        if (prev < 0 && audio_sample >= 0) begin
          if (first_x < 0) first_x = nsamp; else crossings++;
          last_x = nsamp;
        end
        prev = audio_sample;
        nsamp++;
      end
    end
    f_meas = real'(crossings) * 44_100.0 / real'(last_x - first_x);
    $display("measured pitch %0.2f Hz", f_meas);
    expect_true("pitch within 1 % of 440 Hz", f_meas > 435.6 && f_meas < 444.4);
    expect_true("sample spacing 1133..1134 clocks", min_gap >= 1133 && max_gap <= 1134);
    expect_true("voice sounding", apu_sounding == 4'b0001);
    midi_byte(8'h80); midi_byte(8'd69); midi_byte(8'd0);
    repeat (CLK_HZ / 3) @(posedge clk);   // release is 0.297 s
    expect_true("voice released", apu_sounding == 4'b0000);
    loud0 = n_loud;
    repeat (CLK_HZ / 100) @(posedge clk);
    expect_true("silent after release", n_loud == loud0);
    expect_true("LCD frames sent", n_lcd >= 20);
    $display("LCD frame spacing %0d..%0d clocks, longest transfer %0d clocks", min_fgap, max_fgap, max_cs);
    expect_true("LCD at 60 frames/s", min_fgap == 833_333 && max_fgap == 833_333);
    expect_true("LCD update below 2 ms", max_cs > 0 && max_cs < 100_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
