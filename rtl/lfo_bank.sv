// lfo_bank: the three low-frequency oscillators shared by all audio processing
// units, used for effects such as tremolo and vibrato.
//
// Each LFO works like the audio wavetable oscillator (phase accumulator over a
// 2048-sample wavetable, one step per audio sample) with its own rate and
// shape, but its rate is limited to the LFO range 0..MAX_HZ: requested rates
// above MAX_HZ play at MAX_HZ and negative ones at 0. Outputs are Q2.24 in
// [-1, 1], valid two cycles after sample_en. The count of three, the shared use
// and the 0-20 Hz range follow the document; reusing the audio oscillator is the
// document's description ("function similarly"), the clamping is this design's.
module lfo_bank #(
  parameter int NLFO   = fmpga_pkg::NUM_LFO,
  parameter int MAX_HZ = 20
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              sample_en,
  input  fmpga_pkg::fix_t   [NLFO-1:0]      rate,    // Q14.12 Hz
  input  fmpga_pkg::wave_e  [NLFO-1:0]      shape,
  output fmpga_pkg::fix_t   [NLFO-1:0]      lfo
);
  import fmpga_pkg::*;
  localparam fix_t MAX_RATE = fix_t'(MAX_HZ) <<< FREQ_FRAC;

  for (genvar g = 0; g < NLFO; g++) begin : g_lfo
    fix_t r;
    always_comb begin
      if (rate[g] < 0)             r = '0;
      else if (rate[g] > MAX_RATE) r = MAX_RATE;
      else                         r = rate[g];
    end
    wavetable_oscillator u_osc (
      .clk(clk), .rst(rst), .sample_en(sample_en), .sync(1'b0),
      .freq(r), .shape(shape[g]), .sample(lfo[g])
    );
  end
endmodule
