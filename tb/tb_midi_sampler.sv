// tb_midi_sampler: checks that the MIDI sampler takes one sample per bit
// period, near the middle of each bit, and that the sampled bits are the ones
// sent. The bit period is shortened to 16 clocks (SAMPLING_RATE = 16); the line
// is driven with a UART frame whose bit cells are 16 clocks long and start at
// an arbitrary phase. Each sample's time within its bit cidx is checked to be
// within 2 clocks of the middle, after removing the 3 clocks of synchroniser
// delay.
module tb_midi_sampler;
  localparam int SR = 16;
  logic clk = 0, rst = 1, midi_rx = 1;
  logic bit_valid, bit_value;
  int checks = 0, failures = 0;

  midi_sampler #(.SAMPLING_RATE(SR)) dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // transmitted frame, bit cells: start(0), 8 data LSB first, stop(1)
  logic [9:0] frame;
  int frame_start = -1;
  int nsamp = 0;
  int idle_samples = 0;

  always @(posedge clk) if (!rst && bit_valid) begin
    if (frame_start < 0) idle_samples++;
    else begin
      int rel, cidx, off;
      rel  = cyc - frame_start - 3;   // synchroniser delay
      cidx = rel / SR;
      off  = rel % SR;
      if (rel >= 0 && cidx < 10) begin
        checks++;
        if (bit_value !== frame[cidx]) begin
          failures++; $display("FAIL cidx %0d value %0b expected %0b", cidx, bit_value, frame[cidx]);
        end
        checks++;
        if (off < SR/2 - 2 || off > SR/2 + 2) begin
          failures++; $display("FAIL cidx %0d sampled at offset %0d", cidx, off);
        end
        nsamp++;
      end
    end
  end

  task automatic send_byte(input logic [7:0] b, input int skew);
    frame = {1'b1, b, 1'b0};
    repeat (skew) @(posedge clk);
    frame_start = cyc + 1;
    for (int i = 0; i < 10; i++) begin
      midi_rx <= frame[i];
      repeat (SR) @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10 * SR) @(posedge clk);
    checks++;
    if (idle_samples < 8 || idle_samples > 11) begin
      failures++; $display("FAIL idle line gave %0d samples in 10 bit periods", idle_samples);
    end
    send_byte(8'h93, 5);
    send_byte(8'h3C, 11);
    send_byte(8'hA5, 0);
    repeat (2 * SR) @(posedge clk);
    checks++;
    if (nsamp != 30) begin failures++; $display("FAIL %0d samples in frames, expected 30", nsamp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
