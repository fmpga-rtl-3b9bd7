// tb_applicator: loads random bases, sources and scalars into an applicator
// and checks, after each refresh, that the output equals
// base + sum(source * scalar >>> 24) computed in the testbench with 64-bit
// arithmetic and saturated to 27 bits. It also checks that refresh comes every
// eight cycles (one multiply per source).
module tb_applicator;
  import fmpga_pkg::*;
  logic clk = 0, rst = 1;
  fix_t base;
  fix_t [7:0] sources, scalars;
  fix_t value;
  logic refresh;
  int checks = 0, failures = 0;

  applicator dut (.*);
  always #5 clk = ~clk;

  function automatic fix_t rnd(int lim);   // uniform in [-lim, lim)
    return fix_t'(int'($urandom_range(2 * lim - 1, 0)) - lim);
  endfunction

  function automatic longint model();
    longint acc;
    acc = longint'(base);
    for (int i = 0; i < 8; i++) acc += (longint'(sources[i]) * longint'(scalars[i])) >>> 24;
    if (acc > 67108863) acc = 67108863;
    if (acc < -67108864) acc = -67108864;
    return acc;
  endfunction

  int last_refresh = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && refresh) begin
      if (last_refresh >= 0) begin
        checks++;
        if (cyc - last_refresh != 8) begin failures++; $display("FAIL refresh period %0d", cyc - last_refresh); end
      end
      last_refresh = cyc;
    end
  end

  initial begin
    base = '0; sources = '0; scalars = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 200; k++) begin
      base = rnd(k < 100 ? (1 << 24) : (1 << 26));
      for (int i = 0; i < 8; i++) begin
        sources[i] = rnd(1 << 24);
        scalars[i] = rnd(k < 100 ? (1 << 24) : (1 << 26));
      end
      // wait for a whole pass that started after the change
      @(posedge refresh); @(posedge refresh);
      @(negedge clk);
      checks++;
      if (longint'(value) != model()) begin
        failures++; $display("FAIL value %0d expected %0d", value, model());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
