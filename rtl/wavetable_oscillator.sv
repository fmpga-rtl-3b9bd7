// wavetable_oscillator: plays a stored single-cycle waveform at a given
// frequency by stepping a phase through the 2048-sample table once per audio
// sample.
//
// The step is step(f) = N_s * f / F_s = f * (2048 / 44100); the constant
// 2048/44100 is precomputed (UQ0.24), so no division is needed. The step has an
// integer part, added to the 11-bit phase every sample, and a 24-bit fraction,
// added to an error register; when the error register passes 1 the carry adds
// one more to the phase and the register keeps only its fraction. The phase
// indexes wavetable_rom, whose registered output, widened to Q2.24, is `sample`.
//
// Interface and timing: freq is Q14.12 Hz (negative values play 0 Hz);
// sample_en pulses once per audio sample; `sample` reflects the new phase two
// cycles after sample_en. The step equation, the integer/error-register split and
// the 2048-entry tables follow the document; the widths and the phase reset on
// `sync` (used at note-on) are this design's.
module wavetable_oscillator (
  input  logic              clk,
  input  logic              rst,
  input  logic              sample_en,
  input  logic              sync,       // restart the cycle at phase 0
  input  fmpga_pkg::fix_t   freq,
  input  fmpga_pkg::wave_e  shape,
  output fmpga_pkg::fix_t   sample
);
  import fmpga_pkg::*;

  logic [WT_AW-1:0]   phase;
  logic [23:0]        err;
  logic [46:0]        step_wide;
  logic [WT_AW-1:0]   step_int;
  logic [23:0]        step_frac;
  logic [24:0]        err_sum;
  logic signed [15:0] rom_data;

  always_comb begin
    step_wide = (freq[W-1] ? 47'd0 : 47'(freq)) * 47'(STEP_PER_HZ);  // frac 12+24
    step_int  = step_wide[FREQ_FRAC+24 +: WT_AW];
    step_frac = step_wide[FREQ_FRAC +: 24];
    err_sum   = {1'b0, err} + {1'b0, step_frac};
  end

  always_ff @(posedge clk) begin
    if (rst || sync) begin
      phase <= '0;
      err   <= '0;
    end else if (sample_en) begin
      phase <= phase + step_int + WT_AW'(err_sum[24]);
      err   <= err_sum[23:0];
    end
  end

  wavetable_rom u_rom (.clk(clk), .shape(shape), .phase(phase), .data(rom_data));

  assign sample = fix_t'(rom_data) <<< (UNIT_FRAC - 15);
endmodule
