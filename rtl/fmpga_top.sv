// fmpga_top: the FMPGA synthesizer, a four-voice digital synthesizer played
// from a MIDI keyboard, with settings edited by three rotary encoders and shown
// on a 128x64 LCD.
//
// MIDI layer:  midi_sampler -> midi_decoder -> event_packager -> event_dispatcher
//              turns the serial MIDI line into note events and assigns each
//              note to one of four audio processing units.
// Audio layer: four apu instances sharing one lfo_bank, started by a 44.1 kHz
//              sample strobe, and a mixer summing them to one 16-bit stream.
// Output:      dac_spi sends every mixed sample to the external DAC.
// Config/video: three rotary_encoder front ends feed config_settings, whose
//              settings go to every APU and whose current page is drawn by
//              video_driver.
// The block structure and its connections follow the document's top-level
// diagram. audio_sample/audio_valid (the mixer output) and the status outputs
// are extra observation ports of this design. Reset is synchronous and active
// high.
module fmpga_top #(
  parameter int unsigned CLK_HZ        = 50_000_000,
  parameter int unsigned SAMPLE_HZ     = 44_100,
  parameter int unsigned SAMPLING_RATE = 1600,       // clocks per MIDI bit
  parameter int unsigned DEBOUNCE      = 50_000,     // encoder debounce, clocks
  parameter int unsigned FRAME_CYCLES  = 833_333,    // LCD frame period, clocks
  parameter int          RECIP_AW      = 13          // 1/x table: 2^13 x 32 bit
) (
  input  logic               clk,
  input  logic               rst,
  // MIDI input (from the opto-isolator)
  input  logic               midi_rx,
  // rotary encoders: 0 page, 1 setting, 2 value
  input  logic [2:0]         enc_a,
  input  logic [2:0]         enc_b,
  // serial DAC
  output logic               dac_sclk,
  output logic               dac_sync_n,
  output logic               dac_din,
  // LCD
  output logic               lcd_cs_n,
  output logic               lcd_rst_n,
  output logic               lcd_a0,
  output logic               lcd_sclk,
  output logic               lcd_si,
  // observation
  output logic signed [15:0] audio_sample,
  output logic               audio_valid,
  output logic [3:0]         apu_sounding,
  output logic               voice_stolen,
  output logic               midi_frame_error,
  output logic               lcd_frame_done
);
  import fmpga_pkg::*;

  // ---- MIDI layer -----------------------------------------------------------
  logic       bit_valid, bit_value;
  logic       msg_valid, msg_is_on;
  logic [6:0] msg_note, msg_vel;
  note_event_t                ev;
  note_event_t [NUM_APU-1:0]  apu_ev;

  midi_sampler #(.SAMPLING_RATE(SAMPLING_RATE)) u_sampler (
    .clk, .rst, .midi_rx, .bit_valid, .bit_value);

  midi_decoder u_decoder (
    .clk, .rst, .bit_valid, .bit_value, .msg_valid, .msg_is_on,
    .msg_note, .msg_velocity(msg_vel), .frame_error(midi_frame_error));

  event_packager u_packager (
    .clk, .rst, .msg_valid, .msg_is_on, .msg_note, .msg_velocity(msg_vel), .ev);

  logic [NUM_APU-1:0] held_unused;
  event_dispatcher #(.N(NUM_APU)) u_dispatcher (
    .clk, .rst, .ev, .apu_ev, .apu_held(held_unused), .stolen(voice_stolen));

  // ---- configuration and video ---------------------------------------------
  logic [2:0]       enc_step, enc_up;
  synth_cfg_t       cfg;
  logic [3:0]       page, page_len;
  logic [2:0]       sel;
  logic [7:0][7:0]  page_codes;

  for (genvar g = 0; g < 3; g++) begin : g_enc
    rotary_encoder #(.DEBOUNCE(DEBOUNCE)) u_enc (
      .clk, .rst, .enc_a(enc_a[g]), .enc_b(enc_b[g]), .step(enc_step[g]), .up(enc_up[g]));
  end

  config_settings u_config (
    .clk, .rst, .enc_step, .enc_up, .cfg, .page, .sel, .page_len, .page_codes);

  video_driver #(.FRAME_CYCLES(FRAME_CYCLES)) u_video (
    .clk, .rst, .page, .sel, .page_len, .page_codes,
    .lcd_cs_n, .lcd_rst_n, .lcd_a0, .lcd_sclk, .lcd_si, .frame_done(lcd_frame_done));

  // ---- audio layer ------------------------------------------------------------
  logic sample_en;
  sample_clock #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_sclk (
    .clk, .rst, .tick(sample_en));

  fix_t [NUM_LFO-1:0] lfo;
  lfo_bank u_lfo (
    .clk, .rst, .sample_en, .rate(cfg.lfo_rate), .shape(cfg.lfo_shape), .lfo);

  fix_t [NUM_APU-1:0] voice;
  logic [NUM_APU-1:0] voice_valid;
  for (genvar a = 0; a < NUM_APU; a++) begin : g_apu
    fix_t pitch_unused;
    apu #(.RECIP_AW(RECIP_AW)) u_apu (
      .clk, .rst, .sample_en, .ev(apu_ev[a]), .cfg, .lfo,
      .out(voice[a]), .out_valid(voice_valid[a]), .sounding(apu_sounding[a]),
      .pitch_hz(pitch_unused));
  end

  mixer #(.N(NUM_APU)) u_mixer (
    .clk, .rst, .sample_en, .in_sample(voice), .in_valid(voice_valid),
    .out_sample(audio_sample), .out_valid(audio_valid));

  dac_spi u_dac (
    .clk, .rst, .start(audio_valid), .sample(audio_sample),
    .sclk(dac_sclk), .sync_n(dac_sync_n), .din(dac_din), .busy());
endmodule
