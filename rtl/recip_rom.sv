// recip_rom: read-only lookup table of 1/x for 0 <= x < 4, used by the envelope
// generator to turn its divisions by a stage time into one multiplication.
//
// Entry i stands for x = i / 2^(ADDR_W-2), so with ADDR_W = 13 there are 8192
// entries of 32 bits, 32 KB, spaced 1/2048 s apart. Each entry holds 1/x as an
// unsigned Q12.20 value, floor(2^(ADDR_W+18) / i); entry 0 (division by zero)
// holds the largest code. The read is synchronous with one cycle of latency,
// like a block RAM. The 32 KB size, the 0..4 range and single-cycle division
// follow the document; the entry format and spacing are this design's.
module recip_rom #(
  parameter int ADDR_W = 13
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [31:0]       data
);
  localparam int DEPTH = 1 << ADDR_W;

  logic [31:0] mem [DEPTH];

  initial begin
    mem[0] = 32'hFFFF_FFFF;
    for (int i = 1; i < DEPTH; i++)
      mem[i] = 32'((64'd1 << (ADDR_W + 18)) / 64'(i));
  end

  always_ff @(posedge clk) data <= mem[addr];
endmodule
