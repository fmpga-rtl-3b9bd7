// tb_distortion: applies random samples, exponents k (0..12, limited to 10 by
// the design) and dry/wet values, and compares y with a floating-point model
// of d = sign(x)(1 - (1-|x|)^k) with the power interpolated linearly between
// floor(k) and ceil(k), and y = x + wet (d - x); tolerance 2^-14. It also
// checks that k = 1 with full wet gives y = x, and that a result takes
// ceil(k) + 4 cycles.
module tb_distortion;
  import fmpga_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  fix_t x, k, wet, y;
  logic done, busy;
  int checks = 0, failures = 0;

  distortion dut (.*);
  always #5 clk = ~clk;

  function automatic real r24(fix_t v); return real'(v) / 16777216.0; endfunction

  function automatic real model(real xr, real kr, real wr);
    real b, pf, pc, p, d, fr;
    int nf, nc;
    if (kr > 10.0) kr = 10.0;
    nf = int'($floor(kr)); nc = int'($ceil(kr)); fr = kr - nf;
    b  = 1.0 - ((xr < 0) ? -xr : xr);
    pf = b ** nf; pc = b ** nc;
    p  = pf + fr * (pc - pf);
    d  = (xr < 0) ? (p - 1.0) : (1.0 - p);
    return xr + wr * (d - xr);
  endfunction

  task automatic one(input fix_t xi, input fix_t ki, input fix_t wi);
    int cycles;
    real expv, kr;
    @(posedge clk);
    x <= xi; k <= ki; wet <= wi; start <= 1;
    @(posedge clk); start <= 0;
    // start was sampled at this edge; count edges until done is high
    cycles = 0;
    @(negedge clk);
    while (!done && cycles < 100) begin @(negedge clk); cycles++; end
    kr = real'(ki) / 4194304.0;
    expv = model(r24(xi), kr, r24(wi));
    checks++;
    if (r24(y) - expv > 1.0/16384 || expv - r24(y) > 1.0/16384) begin
      failures++; $display("FAIL x=%f k=%f wet=%f y=%f expected %f", r24(xi), kr, r24(wi), r24(y), expv);
    end
    checks++;
    if (kr > 10.0) kr = 10.0;
    if (cycles != int'($ceil(kr)) + 4) begin
      failures++; $display("FAIL k=%f took %0d cycles, expected %0d", kr, cycles, int'($ceil(kr)) + 4);
    end
  endtask

  initial begin
    x = '0; k = '0; wet = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // k = 1, full wet: identity
    one(fix_t'(6000000), fix_t'(1 << 22), UNIT_ONE);
    checks++; if (y != fix_t'(6000000)) begin failures++; $display("FAIL k=1 changed the sample"); end
    one(-fix_t'(12000000), fix_t'(5 << 22), UNIT_ONE);
    one(fix_t'(3000000), fix_t'(2 << 22) + fix_t'(1 << 21), fix_t'(1 << 23));
    for (int n = 0; n < 300; n++)
      one(fix_t'(int'($urandom_range(33554432, 0)) - 16777216),
          fix_t'($urandom_range(12 << 22, 0)),
          fix_t'($urandom_range(16777216, 0)));
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
