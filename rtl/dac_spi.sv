// dac_spi: sends each mixed audio sample to the external serial DAC
// (a DAC101S101, 10-bit, with a 16-bit SPI-style frame).
//
// On `start` the signed 16-bit sample is converted to offset binary and its ten
// most significant bits are placed in the frame
//   [15:14] 00, [13:12] 00 (normal operation), [11:2] data, [1:0] 00,
// which is shifted out MSB first while sync_n is low. sclk idles high; din
// changes after each rising edge and the DAC takes it on the falling edge. Each
// sclk half period is HALF clocks (2: 12.5 MHz), so a frame takes 63 clocks, well
// inside one 44.1 kHz sample. A start while busy is ignored. The document names
// an SPI link from the mixer to the DAC and the DAC part; the frame format comes
// from that part's usual interface and, like the clock rate, is this design's
// assumption.
module dac_spi #(
  parameter int HALF = 2
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic signed [15:0] sample,
  output logic               sclk,
  output logic               sync_n,
  output logic               din,
  output logic               busy
);
  localparam int HW = (HALF > 1) ? $clog2(HALF) : 1;

  logic [15:0]   shreg;
  logic [4:0]    bits_left;
  logic [HW-1:0] hcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      bits_left <= '0;
      hcnt      <= '0;
      sclk      <= 1'b1;
      sync_n    <= 1'b1;
      din       <= 1'b0;
    end else if (bits_left == '0) begin
      sclk   <= 1'b1;
      sync_n <= 1'b1;
      if (start) begin
        shreg     <= {4'b0000, ~sample[15], sample[14:6], 2'b00};
        bits_left <= 5'd16;
        hcnt      <= '0;
        sync_n    <= 1'b0;
        din       <= 1'b0;   // first frame bit is a 0
      end
    end else if (hcnt == HW'(HALF - 1)) begin
      hcnt <= '0;
      sclk <= !sclk;
      if (sclk) begin
        // falling edge: the DAC takes din; drop the bit that was taken
        bits_left <= bits_left - 1'b1;
        shreg     <= {shreg[14:0], 1'b0};
      end else begin
        din <= shreg[15];
      end
    end else begin
      hcnt <= hcnt + 1'b1;
    end
  end

  assign busy = (bits_left != '0);
endmodule
