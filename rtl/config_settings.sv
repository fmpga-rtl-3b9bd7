// config_settings: the central store of every user setting, edited with three
// rotary encoders and read by the audio processing units and the display.
//
// The 54 settings are arranged in nine pages of up to eight:
//   0-2  ENV 1..3   attack, decay, sustain, release of envelope n
//   3    VOICE      audible wave, modulation wave, distortion k, dry/wet
//   4    LFO        rate 1..3, wave 1..3
//   5    AMP        amplitude scalar for each of the 8 modulation sources
//   6    PITCH      pitch scalar for each source
//   7    DIST K     distortion-k scalar for each source
//   8    DRYWET     dry/wet scalar for each source
// (source order: envelope 1..3, LFO 1..3, velocity, modulation wave).
// Encoder 0 steps the page (wrapping, selecting the page's first setting),
// encoder 1 steps the selected setting within the page (wrapping), encoder 2
// changes its value, saturating at the ends of its range. Each setting is kept as
// an 8-bit code and decoded into the fixed-point synth_cfg_t:
//   times      code / 64 s               (0 .. 3.98 s)
//   levels     code / 255                (sustain, dry/wet base)
//   k base     code / 16                 (0 .. 15.9, limited to 10 downstream)
//   LFO rate   code * 20/255 Hz
//   waves      code 0..3: sine, square, triangle, sawtooth
//   scalars    signed codes: amplitude and dry/wet code/64, pitch code Hz,
//              k code/16.
// At reset envelope 1 drives amplitude with a 47 ms attack, 203 ms decay, 70 %
// sustain and 297 ms release, with a sine wave, k = 1 and fully dry output.
// Outputs change the cycle after a step pulse. The three encoders' roles, the
// nine pages of up to eight settings and the "over 50" count follow the document;
// the page contents, ranges, codes and reset values are this design's.
module config_settings (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [2:0]             enc_step,   // one-cycle pulses: page, select, value
  input  logic [2:0]             enc_up,     // direction of each pulse
  output fmpga_pkg::synth_cfg_t  cfg,
  output logic [3:0]             page,
  output logic [2:0]             sel,
  output logic [3:0]             page_len,   // settings on the current page
  output logic [7:0][7:0]        page_codes  // codes of the current page
);
  import fmpga_pkg::*;

  typedef enum logic [1:0] {K_UNSIGNED, K_SHAPE, K_SIGNED} code_kind_e;

  logic [7:0] code [NUM_PAGES][PARAMS_PER_PAGE];

  function automatic logic [3:0] len_of(logic [3:0] p);
    unique case (p)
      4'd0, 4'd1, 4'd2, 4'd3: return 4'd4;
      4'd4:                   return 4'd6;
      default:                return 4'd8;
    endcase
  endfunction

  function automatic code_kind_e kind_of(logic [3:0] p, logic [2:0] s);
    if (p >= 4'd5)                 return K_SIGNED;
    if (p == 4'd3 && s <= 3'd1)    return K_SHAPE;
    if (p == 4'd4 && s >= 3'd3)    return K_SHAPE;
    return K_UNSIGNED;
  endfunction

  function automatic logic [7:0] reset_code(int p, int s);
    if (p <= 2) begin
      unique case (s)
        0: return 8'd3;     // attack  0.047 s
        1: return 8'd13;    // decay   0.203 s
        2: return 8'd179;   // sustain 0.70
        3: return 8'd19;    // release 0.297 s
        default: return 8'd0;
      endcase
    end
    if (p == 3 && s == 2) return 8'd16;               // k = 1
    if (p == 4 && s <= 2) return 8'(64 >> s);         // 5.0, 2.5, 1.25 Hz
    if (p == 4 && s >= 3) return 8'(s - 3);           // sine, square, triangle
    if (p == 5 && s == 0) return 8'd64;               // amplitude = envelope 1
    return 8'd0;
  endfunction

  // ---- editing ------------------------------------------------------------
  logic [7:0] cur;
  code_kind_e cur_kind;
  always_comb begin
    cur      = code[page][sel];
    cur_kind = kind_of(page, sel);
  end

  function automatic logic [7:0] bump(logic [7:0] c, code_kind_e k, logic up_dir);
    unique case (k)
      K_SHAPE:    return up_dir ? ((c >= 8'd3) ? 8'd3 : c + 1'b1) : ((c == 8'd0) ? 8'd0 : c - 1'b1);
      K_SIGNED:   return up_dir ? ((c == 8'h7F) ? c : c + 1'b1) : ((c == 8'h80) ? c : c - 1'b1);
      default:    return up_dir ? ((c == 8'hFF) ? c : c + 1'b1) : ((c == 8'h00) ? c : c - 1'b1);
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      page <= '0;
      sel  <= '0;
      for (int p = 0; p < NUM_PAGES; p++)
        for (int s = 0; s < PARAMS_PER_PAGE; s++)
          code[p][s] <= reset_code(p, s);
    end else begin
      if (enc_step[0]) begin
        sel <= '0;
        if (enc_up[0]) page <= (page == 4'(NUM_PAGES - 1)) ? 4'd0 : page + 1'b1;
        else           page <= (page == 4'd0) ? 4'(NUM_PAGES - 1) : page - 1'b1;
      end else if (enc_step[1]) begin
        if (enc_up[1]) sel <= (4'(sel) == page_len - 1'b1) ? 3'd0 : sel + 1'b1;
        else           sel <= (sel == 3'd0) ? 3'(page_len - 1'b1) : sel - 1'b1;
      end else if (enc_step[2]) begin
        code[page][sel] <= bump(cur, cur_kind, enc_up[2]);
      end
    end
  end

  assign page_len = len_of(page);
  always_comb for (int s = 0; s < 8; s++) page_codes[s] = code[page][s];

  // ---- decoding -----------------------------------------------------------
  function automatic fix_t level(logic [7:0] c);   // c / 255 in Q2.24
    return fix_t'({c, 16'd0}) + fix_t'({c, 8'd0}) + fix_t'(c);
  endfunction

  function automatic fix_t scaled_signed(logic [7:0] c, int shift);
    return fix_t'(signed'(c)) <<< shift;
  endfunction

  always_comb begin
    for (int e = 0; e < NUM_ENV; e++) begin
      cfg.env[e].attack  = ufix_t'({code[e][0], 18'd0});
      cfg.env[e].decay   = ufix_t'({code[e][1], 18'd0});
      cfg.env[e].sustain = level(code[e][2]);
      cfg.env[e].rel     = ufix_t'({code[e][3], 18'd0});
    end
    cfg.main_shape = wave_e'(code[3][0][1:0]);
    cfg.mod_shape  = wave_e'(code[3][1][1:0]);
    cfg.k_base     = fix_t'({code[3][2], 18'd0});
    cfg.wet_base   = level(code[3][3]);
    for (int l = 0; l < NUM_LFO; l++) begin
      cfg.lfo_rate[l]  = fix_t'(code[4][l]) * fix_t'(321);
      cfg.lfo_shape[l] = wave_e'(code[4][l+3][1:0]);
    end
    for (int s = 0; s < NUM_SRC; s++) begin
      cfg.amp_scl[s]   = scaled_signed(code[5][s], 18);
      cfg.pitch_scl[s] = scaled_signed(code[6][s], FREQ_FRAC);
      cfg.k_scl[s]     = scaled_signed(code[7][s], 18);
      cfg.wet_scl[s]   = scaled_signed(code[8][s], 18);
    end
  end
endmodule
