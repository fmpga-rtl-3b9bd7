// tb_mixer: drives random APU samples with their valid strobes and checks that
// each sample_en produces, one cycle later, the sum of the latest samples
// divided by four, truncated to 16 bits and saturated.
module tb_mixer;
  import fmpga_pkg::*;
  logic clk = 0, rst = 1, sample_en = 0;
  fix_t [3:0] in_sample;
  logic [3:0] in_valid = '0;
  logic signed [15:0] out_sample;
  logic out_valid;
  int checks = 0, failures = 0;

  mixer dut (.*);
  always #5 clk = ~clk;

  longint held [4];

  initial begin
    in_sample = '0;
    for (int i = 0; i < 4; i++) held[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 400; n++) begin
      longint s;
      int lim;
      lim = (n < 200) ? (1 << 24) : (1 << 26) - 1;
      for (int i = 0; i < 4; i++) begin
        if ($urandom_range(3, 0) != 0) begin
          @(posedge clk);
          in_sample[i] <= fix_t'(int'($urandom_range(2 * lim, 0)) - lim);
          in_valid <= 4'(1 << i);
          @(posedge clk);
          in_valid <= '0;
          held[i] = longint'(in_sample[i]);
        end
      end
      @(posedge clk); sample_en <= 1;
      @(posedge clk); sample_en <= 0;
      @(negedge clk);
      s = (held[0] + held[1] + held[2] + held[3]) >>> 11;
      if (s > 32767) s = 32767;
      if (s < -32768) s = -32768;
      checks++;
      if (!out_valid || longint'(out_sample) != s) begin
        failures++; $display("FAIL out %0d valid %0b expected %0d", out_sample, out_valid, s);
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
