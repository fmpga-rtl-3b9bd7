// distortion: S-curve saturation with a dry/wet mix,
//   d  = 1 - (1 - x)^k      for x >= 0
//   d  = -1 + (1 + x)^k     for x <  0
//   y  = d * wet + (1 - wet) * x  =  x + wet * (d - x)
// for a sample x in [-1, 1]. k = 1 leaves the sample unchanged; large k tends to
// a square wave.
//
// A non-integer k is handled by a power module. With b = 1 - |x|, it multiplies
// 1 by b repeatedly, keeping b^floor(k) and b^ceil(k), then interpolates
// linearly between them with the fraction of k. One shared multiplier does all
// the products, one per cycle, so a sample takes ceil(k) + 4 cycles from start to
// done (14 at k = K_MAX = 10). The equations, the floor/ceil repeated
// multiplication with interpolation and the dry/wet mix follow the document; the
// single shared multiplier, the limit K_MAX and the clamping of inputs (x to
// [-1,1], wet to [0,1], k to [0,K_MAX]) are this design's.
//
// Interface: start is a one-cycle strobe sampling x (Q2.24), k (Q4.22) and wet
// (Q2.24); done pulses for one cycle with y (Q2.24) valid and held until the
// next result. A start while busy is ignored.
module distortion #(
  parameter int K_MAX = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  fmpga_pkg::fix_t  x,
  input  fmpga_pkg::fix_t  k,
  input  fmpga_pkg::fix_t  wet,
  output fmpga_pkg::fix_t  y,
  output logic             done,
  output logic             busy
);
  import fmpga_pkg::*;

  typedef enum logic [2:0] {D_IDLE, D_POW, D_INTERP, D_SHAPE, D_MIX} dist_state_e;
  dist_state_e state;

  localparam fix_t K_LIMIT = fix_t'(K_MAX) <<< K_FRAC;

  fix_t       xs, ws, base, p, p_floor, p_ceil, d;
  logic       neg;
  logic [4:0] n_floor, n_ceil, i;
  fix_t       frac;        // fraction of k, Q2.24

  // the one multiplier
  fix_t mul_a, mul_b, mul_y;
  always_comb begin
    unique case (state)
      D_POW:    begin mul_a = p;                mul_b = base; end
      D_INTERP: begin mul_a = p_ceil - p_floor; mul_b = frac; end
      default:  begin mul_a = d - xs;           mul_b = ws;   end
    endcase
    mul_y = mul_unit(mul_a, mul_b);
  end

  // input conditioning
  fix_t x_c, w_c, k_c;
  always_comb begin
    x_c = (x > UNIT_ONE) ? UNIT_ONE : (x < -UNIT_ONE) ? -UNIT_ONE : x;
    w_c = (wet > UNIT_ONE) ? UNIT_ONE : (wet < 0) ? '0 : wet;
    k_c = (k > K_LIMIT) ? K_LIMIT : (k < 0) ? '0 : k;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= D_IDLE;
      y       <= '0;
      done    <= 1'b0;
      xs      <= '0;
      ws      <= '0;
      base    <= '0;
      p       <= '0;
      p_floor <= '0;
      p_ceil  <= '0;
      d       <= '0;
      neg     <= 1'b0;
      n_floor <= '0;
      n_ceil  <= '0;
      i       <= '0;
      frac    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        D_IDLE: if (start) begin
          xs      <= x_c;
          ws      <= w_c;
          neg     <= x_c[W-1];
          base    <= UNIT_ONE - (x_c[W-1] ? -x_c : x_c);
          n_floor <= 5'(k_c >>> K_FRAC);
          n_ceil  <= 5'(k_c >>> K_FRAC) + 5'(k_c[K_FRAC-1:0] != '0);
          frac    <= fix_t'({k_c[K_FRAC-1:0], 2'b00});
          p       <= UNIT_ONE;
          i       <= '0;
          state   <= D_POW;
        end
        D_POW: begin
          // p holds base^i
          if (i == n_floor) p_floor <= p;
          if (i == n_ceil) begin
            p_ceil <= p;
            state  <= D_INTERP;
          end else begin
            p <= mul_y;
            i <= i + 1'b1;
          end
        end
        D_INTERP: begin
          p     <= p_floor + mul_y;      // base^k
          state <= D_SHAPE;
        end
        D_SHAPE: begin
          d     <= neg ? (p - UNIT_ONE) : (UNIT_ONE - p);
          state <= D_MIX;
        end
        D_MIX: begin
          y     <= xs + mul_y;
          done  <= 1'b1;
          state <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  assign busy = (state != D_IDLE);
endmodule
