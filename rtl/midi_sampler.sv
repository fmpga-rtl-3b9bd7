// midi_sampler: turns the asynchronous 31,250 baud MIDI line into a stream of
// bit samples, one per bit period, each taken near the middle of its bit.
//
// The line is first passed through two flip-flops. A down-counter then emits a
// sample (bit_valid for one cycle, bit_value the line level) each time it runs
// out and reloads SAMPLING_RATE-1, so an idle line yields a sample every
// SAMPLING_RATE clocks. Whenever the line changes level the counter is reloaded
// with SAMPLING_RATE/2 instead, so the next sample falls half a bit after the
// edge, in the middle of the new bit. SAMPLING_RATE = 50 MHz / 31,250 baud = 1600
// and the half-period restart follow the document; the two-flop synchroniser and
// the reset to an idle (high) line are this design's choice.
module midi_sampler #(
  parameter int unsigned SAMPLING_RATE = 1600
) (
  input  logic clk,
  input  logic rst,
  input  logic midi_rx,     // raw line from the opto-coupler, idle high
  output logic bit_valid,   // one-cycle strobe: a bit sample is ready
  output logic bit_value    // the sampled level
);
  localparam int CW = $clog2(SAMPLING_RATE);

  logic          sync1, sync2, prev;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1     <= 1'b1;
      sync2     <= 1'b1;
      prev      <= 1'b1;
      count     <= CW'(SAMPLING_RATE - 1);
      bit_valid <= 1'b0;
      bit_value <= 1'b1;
    end else begin
      sync1     <= midi_rx;
      sync2     <= sync1;
      prev      <= sync2;
      bit_valid <= 1'b0;
      if (sync2 != prev) begin
        count <= CW'(SAMPLING_RATE / 2);
      end else if (count == '0) begin
        count     <= CW'(SAMPLING_RATE - 1);
        bit_valid <= 1'b1;
        bit_value <= sync2;
      end else begin
        count <= count - 1'b1;
      end
    end
  end
endmodule
