// tb_config_settings: edits settings through step pulses on the three encoder
// inputs and checks page and selection wrapping, value saturation, the decoded
// fixed-point settings and the reset values.
module tb_config_settings;
  import fmpga_pkg::*;
  logic clk = 0, rst = 1;
  logic [2:0] enc_step = '0, enc_up = '0;
  synth_cfg_t cfg;
  logic [3:0] page, page_len;
  logic [2:0] sel;
  logic [7:0][7:0] page_codes;
  int checks = 0, failures = 0;

  config_settings dut (.*);
  always #5 clk = ~clk;

  task automatic turn(input int enc, input bit dir, input int n);
    repeat (n) begin
      @(posedge clk); enc_step[enc] <= 1; enc_up[enc] <= dir;
      @(posedge clk); enc_step[enc] <= 0;
    end
    @(negedge clk);
  endtask

  task automatic expect_eq(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin failures++; $display("FAIL %s = %0d expected %0d", what, got, expv); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    // reset values
    expect_eq("attack", cfg.env[0].attack, 3 << 18);
    expect_eq("sustain", cfg.env[0].sustain, 179 * 65793);
    expect_eq("amp env1", cfg.amp_scl[0], 1 << 24);
    expect_eq("k base", cfg.k_base, 1 << 22);
    expect_eq("lfo rate", cfg.lfo_rate[0], 64 * 321);
    expect_eq("page", page, 0);
    expect_eq("len", page_len, 4);
    // value up 5 on ENV1 attack
    turn(2, 1, 5);
    expect_eq("attack+5", cfg.env[0].attack, 8 << 18);
    expect_eq("code", page_codes[0], 8);
    // select decay, down 20 -> saturates at 0
    turn(1, 1, 1);
    turn(2, 0, 20);
    expect_eq("decay floor", cfg.env[0].decay, 0);
    // selection wraps within 4 settings
    turn(1, 1, 3);
    expect_eq("sel wrap", sel, 0);
    turn(1, 0, 1);
    expect_eq("sel back wrap", sel, 3);
    // page back from 0 wraps to 8 (DRYWET), selection resets
    turn(0, 0, 1);
    expect_eq("page wrap", page, 8);
    expect_eq("sel reset", sel, 0);
    expect_eq("len8", page_len, 8);
    // signed scalar: down 130 saturates at -128
    turn(2, 0, 130);
    expect_eq("wet scl", cfg.wet_scl[0], -(128 << 18));
    // page forward to 0, then to VOICE (3); wave code saturates at 3
    turn(0, 1, 4);
    expect_eq("page voice", page, 3);
    turn(2, 1, 6);
    expect_eq("main shape", cfg.main_shape, 3);
    // k base up 16 -> 2.0
    turn(1, 1, 2);
    turn(2, 1, 16);
    expect_eq("k base 2", cfg.k_base, 2 << 22);
    // PITCH page, LFO1 scalar +3 Hz
    turn(0, 1, 3);
    turn(1, 1, 3);
    turn(2, 1, 3);
    expect_eq("pitch lfo1", cfg.pitch_scl[3], 3 << 12);
    expect_eq("env2 attack untouched", cfg.env[1].attack, 3 << 18);
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
