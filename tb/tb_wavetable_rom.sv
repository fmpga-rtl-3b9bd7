// tb_wavetable_rom: reads all four tables and checks them against the closed
// forms: sine within 2 LSB of 32767 sin(2 pi i / 2048) from $sin, square,
// triangle and sawtooth exactly; plus the one-cycle read latency.
module tb_wavetable_rom;
  import fmpga_pkg::*;
  logic clk = 0;
  wave_e shape = WAVE_SINE;
  logic [10:0] phase = 0;
  logic signed [15:0] data;
  int checks = 0, failures = 0;

  wavetable_rom dut (.*);
  always #5 clk = ~clk;

  function automatic int tri_ref(int i);
    int v;
    if (i < 512) v = i * 64; else if (i < 1536) v = 32768 - (i - 512) * 64; else v = (i - 2048) * 64;
    if (v > 32767) v = 32767;
    return v;
  endfunction

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int i = 0; i < 2048; i += (s == 0) ? 1 : 7) begin
        int expv, d;
        shape <= wave_e'(s); phase <= 11'(i);
        @(posedge clk); @(negedge clk);
        case (s)
          0: expv = int'($floor(32767.0 * $sin(2.0 * 3.14159265358979 * real'(i) / 2048.0) + 0.5));
          1: expv = (i < 1024) ? 32767 : -32767;
          2: expv = tri_ref(i);
          default: expv = i * 32 - 32768;
        endcase
        d = int'(data) - expv;
        checks++;
        if (d > ((s == 0) ? 2 : 0) || d < ((s == 0) ? -2 : 0)) begin
          failures++; $display("FAIL shape %0d index %0d: %0d expected %0d", s, i, data, expv);
        end
      end
    end
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
