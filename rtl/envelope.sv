// envelope: linear attack-decay-sustain-release (ADSR) envelope generator.
//
// The output is a Q2.24 value between 0 and 1 that is updated once per audio
// sample (sample_en). With t the time spent in the current stage:
//   attack   out = t / A                   until t reaches A
//   decay    out = 1 - t * (1 - S) / D      until t reaches D
//   sustain  out = S                        until note_off
//   release  out = v_i - t * v_i / R        until t reaches R, then idle at 0
// v_i is the output at the moment of the note-off, so releasing during attack or
// decay is smooth. Each division is a multiplication by 1/A, 1/D or 1/R read
// from a recip_rom, addressed by the current stage's time. The stage equations,
// the 0..4 s stage times and the 1/x table follow the document.
//
// Timing and choices of this design: t advances by the sample period (UQ3.24,
// 380/2^24 s) each sample_en. note_on restarts the attack from 0 and note_off
// enters release, in the cycle they arrive, taking priority over sample_en. The
// table is read in the cycle after a stage change, so sample_en pulses must be at
// least two cycles apart. t / A is clamped to 1, since the table is indexed by
// the time truncated to 1/2048 s.
module envelope #(
  parameter int RECIP_AW = 13
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  sample_en,
  input  logic                  note_on,
  input  logic                  note_off,
  input  fmpga_pkg::adsr_cfg_t  cfg,
  output fmpga_pkg::fix_t       out,
  output logic                  active     // not idle
);
  import fmpga_pkg::*;

  typedef enum logic [2:0] {ENV_IDLE, ENV_ATTACK, ENV_DECAY, ENV_SUSTAIN, ENV_RELEASE} env_state_e;
  env_state_e state;
  ufix_t      t;
  fix_t       v_i;

  // ---- reciprocal of the current stage's time ----------------------------
  ufix_t                stage_len;
  logic [RECIP_AW-1:0]  recip_addr;
  logic [31:0]          recip;

  always_comb begin
    unique case (state)
      ENV_DECAY:   stage_len = cfg.decay;
      ENV_RELEASE: stage_len = cfg.rel;
      default:     stage_len = cfg.attack;
    endcase
    // x in [0,4) s: keep the integer bits [25:24] and the top fraction bits
    recip_addr = stage_len[TIME_FRAC+1 -: RECIP_AW];
  end

  recip_rom #(.ADDR_W(RECIP_AW)) u_recip (.clk(clk), .addr(recip_addr), .data(recip));

  // ---- stage fraction t / len, clamped to 1 ------------------------------
  logic [W+32-1:0] prod;
  logic [W+32-1:0] ratio_wide;
  fix_t            ratio;       // Q2.24, 0..1
  fix_t            attack_v, decay_v, release_v;

  always_comb begin
    prod       = (W+32)'(t) * (W+32)'(recip);      // frac 24 + 20
    ratio_wide = prod >> 20;                       // frac 24
    ratio      = (ratio_wide > (W+32)'(UNIT_ONE)) ? UNIT_ONE : fix_t'(ratio_wide);
    attack_v   = ratio;
    decay_v    = UNIT_ONE - mul_unit(ratio, UNIT_ONE - cfg.sustain);
    release_v  = v_i - mul_unit(ratio, v_i);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ENV_IDLE;
      t     <= '0;
      v_i   <= '0;
      out   <= '0;
    end else if (note_on) begin
      state <= ENV_ATTACK;
      t     <= '0;
    end else if (note_off) begin
      if (state != ENV_IDLE) begin
        state <= ENV_RELEASE;
        t     <= '0;
        v_i   <= out;
      end
    end else if (sample_en) begin
      unique case (state)
        ENV_IDLE: out <= '0;
        ENV_ATTACK:
          if (t >= cfg.attack) begin
            state <= ENV_DECAY;
            t     <= '0;
            out   <= UNIT_ONE;
          end else begin
            out <= attack_v;
            t   <= t + TIME_STEP;
          end
        ENV_DECAY:
          if (t >= cfg.decay) begin
            state <= ENV_SUSTAIN;
            t     <= '0;
            out   <= cfg.sustain;
          end else begin
            out <= decay_v;
            t   <= t + TIME_STEP;
          end
        ENV_SUSTAIN: out <= cfg.sustain;
        ENV_RELEASE:
          if (t >= cfg.rel) begin
            state <= ENV_IDLE;
            t     <= '0;
            out   <= '0;
          end else begin
            out <= release_v;
            t   <= t + TIME_STEP;
          end
        default: state <= ENV_IDLE;
      endcase
    end
  end

  assign active = (state != ENV_IDLE);
endmodule
