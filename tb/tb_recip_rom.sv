// tb_recip_rom: reads entries of the 1/x table and compares them with
// 2^31 / i computed in the testbench (entry 0 saturates), checking the
// one-cycle read latency and, through the real value, that entry i stands for
// 1/x with x = i/2048 s to within 0.1 %.
module tb_recip_rom;
  logic clk = 0;
  logic [12:0] addr = 0;
  logic [31:0] data;
  int checks = 0, failures = 0;

  recip_rom dut (.*);
  always #5 clk = ~clk;

  task automatic check(input int i);
    longint expv;
    real x, r;
    addr <= 13'(i);
    @(posedge clk); @(negedge clk);
    expv = (i == 0) ? 64'hFFFF_FFFF : (64'd1 << 31) / longint'(i);
    checks++;
    if (longint'(data) != expv) begin failures++; $display("FAIL entry %0d = %0d expected %0d", i, data, expv); end
    if (i >= 16) begin
      x = real'(i) / 2048.0;
      r = real'(data) / 1048576.0;
      checks++;
      if (r * x < 0.999 || r * x > 1.001) begin failures++; $display("FAIL 1/x at x=%f: %f", x, r); end
    end
  endtask

  initial begin
    check(0); check(1); check(2); check(3); check(2048); check(8191);
    for (int k = 0; k < 300; k++) check(int'($urandom_range(8191, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
