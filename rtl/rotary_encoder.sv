// rotary_encoder: turns the two quadrature contacts of a mechanical rotary
// encoder (pins A and B, pulled up on the board) into step pulses.
//
// Both contacts pass through a two-flop synchroniser and a debouncer that
// accepts a new level only after it has been stable for DEBOUNCE clocks. Each
// rising edge of the debounced A contact is one detent: `step` pulses for one
// cycle and `up` tells the direction, 1 when B is low at that edge (clockwise)
// and 0 when B is high. Timing: step rises DEBOUNCE + 5 clocks after the
// first clock edge that sees the new level. The document uses rotary encoders
// as endless knobs; the debouncing, the edge convention and DEBOUNCE = 1 ms at
// 50 MHz are this design's choices.
module rotary_encoder #(
  parameter int unsigned DEBOUNCE = 50_000
) (
  input  logic clk,
  input  logic rst,
  input  logic enc_a,
  input  logic enc_b,
  output logic step,
  output logic up
);
  localparam int CW = $clog2(DEBOUNCE + 1);

  logic [1:0]    sync1, sync2, stable, cand;
  logic [CW-1:0] cnt;
  logic          a_prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1  <= 2'b11;
      sync2  <= 2'b11;
      stable <= 2'b11;
      cand   <= 2'b11;
      cnt    <= '0;
      a_prev <= 1'b1;
      step   <= 1'b0;
      up     <= 1'b0;
    end else begin
      sync1 <= {enc_a, enc_b};
      sync2 <= sync1;
      // debounce: a level must persist DEBOUNCE cycles
      if (sync2 != cand) begin
        cand <= sync2;
        cnt  <= '0;
      end else if (cnt < CW'(DEBOUNCE)) begin
        cnt <= cnt + 1'b1;
      end else begin
        stable <= cand;
      end
      // quadrature: a rising edge on A is one detent
      a_prev <= stable[1];
      step   <= stable[1] && !a_prev;
      if (stable[1] && !a_prev) up <= !stable[0];
    end
  end
endmodule
