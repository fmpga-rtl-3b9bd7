// applicator: computes one modulated synthesis parameter,
//   value = base + sum_i source_i * scalar_i,
// with a single multiplier used sequentially.
//
// A counter walks through the NSRC modulation sources (envelopes, LFOs,
// velocity and the modulation wavetable, all Q2.24); a multiplexer picks the
// source and its scalar, the product is added to an accumulator that was loaded
// with the base value at the first source, and after the last source the sum is
// copied to `value` and the walk restarts. value is therefore refreshed every
// NSRC cycles and lags its inputs by at most 2*NSRC cycles. The scalars and the
// base share the parameter's own fixed-point format (the product is shifted by
// the 24 fraction bits of the source), so one module serves pitch (Hz),
// amplitude, distortion k and dry/wet. The counter/mux/multiplier/accumulator
// structure follows the document; the additive combination and the saturation of
// the result to 27 bits are this design's reading of it.
module applicator #(
  parameter int NSRC = fmpga_pkg::NUM_SRC
) (
  input  logic                          clk,
  input  logic                          rst,
  input  fmpga_pkg::fix_t               base,
  input  fmpga_pkg::fix_t [NSRC-1:0]    sources,
  input  fmpga_pkg::fix_t [NSRC-1:0]    scalars,
  output fmpga_pkg::fix_t               value,
  output logic                          refresh   // one-cycle strobe: value updated
);
  import fmpga_pkg::*;
  localparam int CW = (NSRC > 1) ? $clog2(NSRC) : 1;
  localparam int AW = W + 4;   // accumulator headroom

  logic [CW-1:0]          cnt;
  logic signed [AW-1:0]   acc;
  logic signed [AW-1:0]   acc_next;
  fix_t                   term;

  always_comb begin
    term     = mul_unit(sources[cnt], scalars[cnt]);
    acc_next = ((cnt == '0) ? AW'(base) : acc) + AW'(term);
  end

  function automatic fix_t saturate(logic signed [AW-1:0] a);
    if (a > AW'(fix_t'({1'b0, {(W-1){1'b1}}})))      return {1'b0, {(W-1){1'b1}}};
    else if (a < AW'(fix_t'({1'b1, {(W-1){1'b0}}}))) return {1'b1, {(W-1){1'b0}}};
    else                                              return fix_t'(a);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      acc     <= '0;
      value   <= '0;
      refresh <= 1'b0;
    end else begin
      acc     <= acc_next;
      refresh <= 1'b0;
      if (cnt == CW'(NSRC - 1)) begin
        cnt     <= '0;
        value   <= saturate(acc_next);
        refresh <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
