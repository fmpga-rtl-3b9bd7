// mixer: combines the audio processing units into the single 16-bit output.
//
// Each APU's newest sample (Q2.24, nominally [-1, 1]) is captured when its
// valid strobe pulses. On every sample_en the captured samples are added and
// the sum is normalised by the number of units (N = 4: a shift by 2) and
// rounded down to signed 16 bits (Q1.15), saturating at full scale; out_valid
// pulses one cycle later. A sample therefore leaves the mixer one audio sample
// after the APU produced it. Adding the units and normalising to 16 bits follow
// the document; the divide-by-N normalisation, the saturation and the
// capture-then-release timing are this design's.
module mixer #(
  parameter int N = fmpga_pkg::NUM_APU
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        sample_en,
  input  fmpga_pkg::fix_t [N-1:0]     in_sample,
  input  logic            [N-1:0]     in_valid,
  output logic signed [15:0]          out_sample,
  output logic                        out_valid
);
  import fmpga_pkg::*;
  localparam int SW    = W + $clog2(N) + 1;
  localparam int SHIFT = UNIT_FRAC - 15 + $clog2(N);

  fix_t held [N];
  logic signed [SW-1:0] sum, scaled;

  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++) sum += SW'(held[i]);
    scaled = sum >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) held[i] <= '0;
      out_sample <= '0;
      out_valid  <= 1'b0;
    end else begin
      for (int i = 0; i < N; i++) if (in_valid[i]) held[i] <= in_sample[i];
      out_valid <= sample_en;
      if (sample_en) begin
        if (scaled > SW'(32767))       out_sample <= 16'sd32767;
        else if (scaled < -SW'(32768)) out_sample <= -16'sd32768;
        else                           out_sample <= 16'(scaled);
      end
    end
  end
endmodule
