// sample_clock: produces the audio sample strobe from the system clock.
//
// A fractional accumulator adds SAMPLE_HZ every clock and pulses `tick` and
// subtracts CLK_HZ whenever the sum reaches CLK_HZ, so the average rate is
// exactly SAMPLE_HZ (44.1 kHz from 50 MHz: ticks alternate between 1133 and
// 1134 clocks apart). The 44.1 kHz rate and the 50 MHz clock follow the
// document; the accumulator is this design's way of producing it.
module sample_clock #(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned SAMPLE_HZ = 44_100
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  logic [31:0] acc;
  logic [32:0] nxt;

  always_comb nxt = {1'b0, acc} + 33'(SAMPLE_HZ);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      tick <= 1'b0;
    end else if (nxt >= 33'(CLK_HZ)) begin
      acc  <= 32'(nxt - 33'(CLK_HZ));
      tick <= 1'b1;
    end else begin
      acc  <= nxt[31:0];
      tick <= 1'b0;
    end
  end
endmodule
