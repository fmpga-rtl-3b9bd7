// apu: audio processing unit, the voice that plays one note.
//
// Blocks and data flow:
//   - three ADSR envelopes, all started by the note-on and released by the
//     note-off sent to this unit;
//   - a modulation wavetable oscillator running at the note's own frequency;
//   - four applicators (pitch, amplitude, distortion k, distortion dry/wet),
//     each forming base + sum(source * scalar) over the eight modulation sources
//     {envelope 1..3, LFO 1..3, velocity, modulation oscillator};
//   - the audible wavetable oscillator, playing the pitch applicator's frequency;
//   - the distortion stage, fed with the audible oscillator's sample and the k and
//     dry/wet values;
//   - a multiplier scaling the distorted sample by the amplitude value.
// The bases are the note frequency (pitch), 0 (amplitude) and the configured k
// and dry/wet values; all scalars come from the configuration settings, so
// envelope 1 drives amplitude only when its amplitude scalar is set, as in the
// reset settings.
//
// Timing: sample_en starts a sample. The oscillator output is valid two cycles
// later, when the distortion starts; out_valid pulses with `out` when the
// distortion has finished and the product is registered, ceil(k) + 7 cycles
// after sample_en. Velocity enters as a unit value, velocity/128. The block
// structure follows the document's APU diagram; which oscillator is the
// modulation source and which is audible follows that diagram too (the text
// elsewhere numbers them the other way round); the bases, the velocity scaling
// and the timing are this design's.
module apu #(
  parameter int RECIP_AW = 13
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    sample_en,
  input  fmpga_pkg::note_event_t  ev,
  input  fmpga_pkg::synth_cfg_t   cfg,
  input  fmpga_pkg::fix_t [fmpga_pkg::NUM_LFO-1:0] lfo,
  output fmpga_pkg::fix_t         out,
  output logic                    out_valid,
  output logic                    sounding,   // amplitude envelope not idle
  output fmpga_pkg::fix_t         pitch_hz    // current pitch applicator output, Q14.12
);
  import fmpga_pkg::*;

  // note held by this unit
  fix_t       note_freq;
  logic [6:0] note_vel;
  always_ff @(posedge clk) begin
    if (rst) begin
      note_freq <= '0;
      note_vel  <= '0;
    end else if (ev.note_on) begin
      note_freq <= ev.frequency;
      note_vel  <= ev.velocity;
    end
  end

  // envelopes
  fix_t [NUM_ENV-1:0] env;
  logic [NUM_ENV-1:0] env_active;
  for (genvar e = 0; e < NUM_ENV; e++) begin : g_env
    envelope #(.RECIP_AW(RECIP_AW)) u_env (
      .clk(clk), .rst(rst), .sample_en(sample_en),
      .note_on(ev.note_on), .note_off(ev.note_off),
      .cfg(cfg.env[e]), .out(env[e]), .active(env_active[e])
    );
  end
  assign sounding = env_active[0];

  // modulation oscillator at the note frequency
  fix_t mod_wave;
  wavetable_oscillator u_osc_mod (
    .clk(clk), .rst(rst), .sample_en(sample_en), .sync(ev.note_on),
    .freq(note_freq), .shape(cfg.mod_shape), .sample(mod_wave)
  );

  // modulation sources in mod_src_e order
  fix_t [NUM_SRC-1:0] src;
  always_comb begin
    src[SRC_ENV1] = env[0];
    src[SRC_ENV2] = env[1];
    src[SRC_ENV3] = env[2];
    src[SRC_LFO1] = lfo[0];
    src[SRC_LFO2] = lfo[1];
    src[SRC_LFO3] = lfo[2];
    src[SRC_VEL]  = fix_t'({note_vel, 17'd0});
    src[SRC_WT]   = mod_wave;
  end

  // applicators
  fix_t pitch_v, amp_v, k_v, wet_v;
  applicator u_app_pitch (.clk(clk), .rst(rst), .base(note_freq), .sources(src),
                          .scalars(cfg.pitch_scl), .value(pitch_v), .refresh());
  applicator u_app_amp   (.clk(clk), .rst(rst), .base('0), .sources(src),
                          .scalars(cfg.amp_scl), .value(amp_v), .refresh());
  applicator u_app_k     (.clk(clk), .rst(rst), .base(cfg.k_base), .sources(src),
                          .scalars(cfg.k_scl), .value(k_v), .refresh());
  applicator u_app_wet   (.clk(clk), .rst(rst), .base(cfg.wet_base), .sources(src),
                          .scalars(cfg.wet_scl), .value(wet_v), .refresh());
  assign pitch_hz = pitch_v;

  // audible oscillator
  fix_t main_wave;
  wavetable_oscillator u_osc_main (
    .clk(clk), .rst(rst), .sample_en(sample_en), .sync(ev.note_on),
    .freq(pitch_v), .shape(cfg.main_shape), .sample(main_wave)
  );

  // distortion starts once the oscillator's new sample is out of its table
  logic [1:0] en_dly;
  always_ff @(posedge clk) begin
    if (rst) en_dly <= '0;
    else     en_dly <= {en_dly[0], sample_en};
  end

  fix_t dist_y;
  logic dist_done;
  distortion u_dist (
    .clk(clk), .rst(rst), .start(en_dly[1]), .x(main_wave), .k(k_v), .wet(wet_v),
    .y(dist_y), .done(dist_done), .busy()
  );

  // amplitude
  always_ff @(posedge clk) begin
    if (rst) begin
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= dist_done;
      if (dist_done) out <= mul_unit(dist_y, amp_v);
    end
  end
endmodule
