// tb_rotary_encoder: turns a simulated encoder clockwise and counter-clockwise
// (full quadrature cycles) with contact bounce shorter than the debounce time
// (DEBOUNCE = 20 clocks here) and counts the step pulses and their direction:
// one step per detent, none from bounce. Also checked: every step pulse lasts
// one cycle, a pulse on A shorter than the debounce time gives no step, and a
// clean edge on A produces its step DEBOUNCE + 5 clocks after the first clock edge
// that sees it (observed here one edge later).
module tb_rotary_encoder;
  logic clk = 0, rst = 1, enc_a = 1, enc_b = 1;
  logic step, up;
  int checks = 0, failures = 0, n_up = 0, n_down = 0;

  rotary_encoder #(.DEBOUNCE(20)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && step) begin if (up) n_up++; else n_down++; end
  int cyc = 0, t_step = -1, wide = 0;
  logic step_q = 0;
  always @(posedge clk) begin
    cyc++; step_q <= step;
    if (step) t_step = cyc;
    if (step && step_q) wide++;
  end

  task automatic set_ab(input logic a, input logic b, input bit bounce);
    if (bounce) begin
      enc_a <= a; enc_b <= b; repeat (3) @(posedge clk);
      enc_a <= ~a;            repeat (2) @(posedge clk);
    end
    enc_a <= a; enc_b <= b;
    repeat (60) @(posedge clk);
  endtask

  // (A,B): 00 -> 10 -> 11 -> 01 -> 00: A rises with B low
  task automatic cw(input bit bounce);
    set_ab(0, 0, 0); set_ab(1, 0, bounce); set_ab(1, 1, 0); set_ab(0, 1, bounce); set_ab(0, 0, 0);
  endtask
  // 00 -> 01 -> 11 -> 10 -> 00: A rises with B high
  task automatic ccw(input bit bounce);
    set_ab(0, 0, 0); set_ab(0, 1, 0); set_ab(1, 1, bounce); set_ab(1, 0, 0); set_ab(0, 0, bounce);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (50) @(posedge clk);
    repeat (5) cw(1);
    checks++; if (n_up != 5 || n_down != 0) begin failures++; $display("FAIL cw: %0d up %0d down", n_up, n_down); end
    repeat (3) ccw(1);
    checks++; if (n_up != 5 || n_down != 3) begin failures++; $display("FAIL ccw: %0d up %0d down", n_up, n_down); end
    cw(0); ccw(0); cw(0);
    checks++; if (n_up != 7 || n_down != 4) begin failures++; $display("FAIL mixed: %0d up %0d down", n_up, n_down); end
    // a 15-clock glitch on A (debounce 20) must not step
    enc_a <= 1; repeat (15) @(posedge clk); enc_a <= 0; repeat (80) @(posedge clk);
    checks++; if (n_up != 7 || n_down != 4) begin failures++; $display("FAIL glitch stepped: %0d up %0d down", n_up, n_down); end
    // latency of a clean rising edge on A
    begin
      int t0;
      @(posedge clk); enc_a <= 1; t0 = cyc + 1;
      repeat (60) @(posedge clk);
      checks++; if (t_step - t0 != 26) begin failures++; $display("FAIL step latency %0d, expected 26", t_step - t0); end
      checks++; if (n_up != 8) begin failures++; $display("FAIL clean edge gave %0d up", n_up); end
    end
    checks++; if (wide != 0) begin failures++; $display("FAIL %0d step pulses longer than one cycle", wide); end
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
