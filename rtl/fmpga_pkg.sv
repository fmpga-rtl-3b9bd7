// fmpga_pkg: types, fixed-point formats and constants shared by the FMPGA
// synthesizer.
//
// All arithmetic values are 27 bits wide, matching the 27x27 DSP multipliers the
// design is sized for. The binary point depends on the quantity:
//   unit values  (samples, envelopes, LFOs, amplitude, dry/wet)  signed Q2.24
//   frequencies  (Hz)                                             signed Q14.12
//   time         (ADSR attack/decay/release, seconds, 0..4)       unsigned Q3.24
//   distortion k (exponent, 0..K_MAX)                             signed Q4.22
// The 27-bit width, the 44.1 kHz sample rate, the 50 MHz clock, the 2048-entry
// wavetables, 4 APUs, 3 envelopes per APU and 3 LFOs follow the document; the
// placement of the binary points is this design's choice.
package fmpga_pkg;

  localparam int unsigned CLK_HZ      = 50_000_000;
  localparam int unsigned SAMPLE_HZ   = 44_100;
  localparam int unsigned MIDI_BAUD   = 31_250;

  localparam int W          = 27;   // datapath width
  localparam int UNIT_FRAC  = 24;   // Q2.24 unit values
  localparam int FREQ_FRAC  = 12;   // Q14.12 frequencies
  localparam int TIME_FRAC  = 24;   // UQ3.24 seconds
  localparam int K_FRAC     = 22;   // Q4.22 distortion exponent

  localparam int NUM_APU    = 4;
  localparam int NUM_ENV    = 3;
  localparam int NUM_LFO    = 3;
  localparam int NUM_SRC    = 8;    // modulation sources seen by an applicator
  localparam int NUM_PAGES  = 9;
  localparam int PARAMS_PER_PAGE = 8;

  localparam int WT_SAMPLES = 2048; // samples per wavetable cycle
  localparam int WT_AW      = 11;

  typedef logic signed [W-1:0] fix_t;   // any 27-bit signed fixed-point value
  typedef logic        [W-1:0] ufix_t;  // 27-bit unsigned fixed-point value

  localparam fix_t UNIT_ONE = fix_t'(1) <<< UNIT_FRAC;

  // Sample period in seconds, UQ3.24: round(2^24 / 44100). 27 bits cannot hold
  // it exactly (380.43), so envelope times run about 0.1 % long.
  localparam ufix_t TIME_STEP = ufix_t'(380);

  // Phase step per Hz: N_s / F_s = 2048 / 44100 in UQ0.24 (round(2^24*2048/44100)).
  localparam logic [19:0] STEP_PER_HZ = 20'd779132;

  // Modulation source order at every applicator.
  typedef enum logic [2:0] {
    SRC_ENV1 = 3'd0, SRC_ENV2 = 3'd1, SRC_ENV3 = 3'd2,
    SRC_LFO1 = 3'd3, SRC_LFO2 = 3'd4, SRC_LFO3 = 3'd5,
    SRC_VEL  = 3'd6, SRC_WT   = 3'd7
  } mod_src_e;

  typedef enum logic [1:0] {
    WAVE_SINE = 2'd0, WAVE_SQUARE = 2'd1, WAVE_TRIANGLE = 2'd2, WAVE_SAW = 2'd3
  } wave_e;

  // A note event as sent from the MIDI layer to an APU.
  typedef struct packed {
    logic       note_on;    // one-cycle strobe
    logic       note_off;   // one-cycle strobe
    logic [6:0] note;       // MIDI note number
    logic [6:0] velocity;   // MIDI velocity
    fix_t       frequency;  // Q14.12 Hz
  } note_event_t;

  typedef struct packed {
    ufix_t attack;   // UQ3.24 s
    ufix_t decay;    // UQ3.24 s
    fix_t  sustain;  // Q2.24, 0..1
    ufix_t rel;      // UQ3.24 s, release time
  } adsr_cfg_t;

  // Decoded synthesizer settings, as delivered by config_settings.
  typedef struct packed {
    adsr_cfg_t [NUM_ENV-1:0] env;
    wave_e                   main_shape;   // audible oscillator
    wave_e                   mod_shape;    // modulation oscillator
    fix_t                    k_base;       // Q4.22
    fix_t                    wet_base;     // Q2.24
    fix_t  [NUM_LFO-1:0]     lfo_rate;     // Q14.12 Hz
    wave_e [NUM_LFO-1:0]     lfo_shape;
    fix_t  [NUM_SRC-1:0]     amp_scl;      // Q2.24
    fix_t  [NUM_SRC-1:0]     pitch_scl;    // Q14.12 Hz per unit of source
    fix_t  [NUM_SRC-1:0]     k_scl;        // Q4.22
    fix_t  [NUM_SRC-1:0]     wet_scl;      // Q2.24
  } synth_cfg_t;

  // Product of a Q2.24 source and a scalar, in the scalar's own format.
  function automatic fix_t mul_unit(fix_t src, fix_t scl);
    logic signed [2*W-1:0] p;
    p = src * scl;
    return fix_t'(p >>> UNIT_FRAC);
  endfunction

endpackage
