// wavetable_rom: the preconfigured single-cycle wavetables read by the
// wavetable oscillators and LFOs: sine, square, triangle and sawtooth, 2048
// signed 16-bit samples each (full scale +-32767), 8192 words in all.
//
// The address is {shape, phase}. Reads are synchronous with one cycle of
// latency, like a block RAM. The tables are filled at start-up from closed
// forms: the sine from an integer recurrence over the first quarter period
// (mirrored for the other three), the square as +-32767 by half period, the
// sawtooth rising linearly from -32768, the triangle rising from 0 to the peak at
// a quarter period. The 2048-sample length and the four shapes follow the
// document; the sample width and the table contents' exact scaling are this
// design's.
module wavetable_rom (
  input  logic                                clk,
  input  fmpga_pkg::wave_e                    shape,
  input  logic [fmpga_pkg::WT_AW-1:0]         phase,
  output logic signed [15:0]                  data
);
  import fmpga_pkg::*;

  logic signed [15:0] mem [4*WT_SAMPLES];

  function automatic logic signed [15:0] to_q15(longint y);   // Q30 -> Q1.15
    longint v;
    v = (y * 32767 + (64'sd1 <<< 29)) >>> 30;
    if (v > 32767) v = 32767;
    return 16'(v);
  endfunction

  function automatic logic signed [15:0] triangle_at(int i);
    int v;
    if (i < 512)       v = i * 64;
    else if (i < 1536) v = 32768 - (i - 512) * 64;
    else               v = (i - 2048) * 64;
    if (v > 32767)  v = 32767;
    if (v < -32767) v = -32767;
    return 16'(v);
  endfunction

  // Sine: the recurrence y[n+1] = 2cos(w) y[n] - y[n-1], w = 2*pi/2048, in Q30
  // over the first quarter period, mirrored into the other three quarters.
  // 2cos(w) = 2147473542 / 2^30, sin(w) = 3294193 / 2^30; error <= 1 LSB.
  initial begin
    longint y_prev, y_cur, y_next;
    logic signed [15:0] v;
    y_prev = 0;
    y_cur  = 64'sd3294193;
    mem[0]    = 16'sd0;
    mem[1024] = 16'sd0;
    for (int n = 1; n <= 512; n++) begin
      v = to_q15(y_cur);
      mem[n]        = v;
      mem[1024 - n] = v;
      mem[1024 + n] = -v;
      mem[2048 - n] = -v;
      y_next = ((64'sd2147473542 * y_cur) >>> 30) - y_prev;
      y_prev = y_cur;
      y_cur  = y_next;
    end
  end

  initial for (int i = 0; i < WT_SAMPLES; i++)
    mem[int'(WAVE_SQUARE) * WT_SAMPLES + i] = (i < WT_SAMPLES / 2) ? 16'sd32767 : -16'sd32767;

  initial for (int i = 0; i < WT_SAMPLES; i++)
    mem[int'(WAVE_TRIANGLE) * WT_SAMPLES + i] = triangle_at(i);

  initial for (int i = 0; i < WT_SAMPLES; i++)
    mem[int'(WAVE_SAW) * WT_SAMPLES + i] = 16'(i * 32 - 32768);

  always_ff @(posedge clk) data <= mem[{shape, phase}];
endmodule
