// tb_dac_spi: sends random samples through the DAC serialiser, captures din on
// every falling sclk edge while sync_n is low, and checks the 16-bit frame
// (00, 00, ten offset-binary data bits, 00), that exactly 16 bits are sent, and
// that sync_n stays low for about 16 sclk periods of 2*HALF clocks.
module tb_dac_spi;
  logic clk = 0, rst = 1, start = 0;
  logic signed [15:0] sample;
  logic sclk, sync_n, din, busy;
  int checks = 0, failures = 0;

  dac_spi dut (.*);
  always #5 clk = ~clk;

  logic [15:0] cap;
  int nbits = 0, cyc = 0, t_lo = 0, t_hi = 0;
  logic sclk_q = 1, sync_q = 1;
  always @(posedge clk) begin
    cyc++;
    sclk_q <= sclk; sync_q <= sync_n;
    if (sync_q && !sync_n) begin nbits = 0; t_lo = cyc; end
    if (!sync_q && sync_n) t_hi = cyc;
    if (!sync_n && sclk_q && !sclk) begin cap = {cap[14:0], din}; nbits++; end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 50; n++) begin
      logic [15:0] expv;
      logic signed [15:0] s;
      s = (n == 0) ? 16'sh7FFF : (n == 1) ? -16'sh8000 : 16'($urandom);
      @(posedge clk); sample <= s; start <= 1;
      @(posedge clk); start <= 0;
      @(posedge clk);
      while (busy) @(posedge clk);
      repeat (4) @(posedge clk);
      expv = {4'b0000, ~s[15], s[14:6], 2'b00};
      checks++;
      if (nbits != 16 || cap !== expv) begin
        failures++; $display("FAIL sample %h: %0d bits, frame %h expected %h", s, nbits, cap, expv);
      end
      checks++;
      if (t_hi - t_lo < 62 || t_hi - t_lo > 65) begin failures++; $display("FAIL frame took %0d clocks", t_hi - t_lo); end
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
