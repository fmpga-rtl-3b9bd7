// tb_envelope: plays notes into one ADSR envelope and compares every output
// sample with a floating-point model of the four linear stages
// (attack t/A, decay 1 - t(1-S)/D, sustain S, release v_i - t v_i/R), allowing
// 1 % of full scale for the 1/x table's resolution. It also checks the length of
// each stage in samples (A, D, R divided by the sample period 1/44100 s), a
// release from the sustain level and a release in the middle of the attack.
// sample_en pulses every 3 clocks to keep the run short.
module tb_envelope;
  import fmpga_pkg::*;
  logic clk = 0, rst = 1, sample_en = 0, note_on = 0, note_off = 0;
  adsr_cfg_t cfg;
  fix_t out;
  logic active;
  int checks = 0, failures = 0;

  envelope dut (.*);
  always #5 clk = ~clk;

  localparam real TS = 380.0 / 16777216.0;   // sample period as held by the design
  real A = 0.05, D = 0.1, S = 0.5, R = 0.08;

  // model state
  typedef enum {M_IDLE, M_ATTACK, M_DECAY, M_SUSTAIN, M_RELEASE} mstate_e;
  mstate_e ms = M_IDLE;
  real mt = 0.0, mout = 0.0, mvi = 0.0;
  int stage_len [mstate_e];
  int samples_in_stage = 0;

  function automatic real to_real(fix_t v); return real'(v) / 16777216.0; endfunction

  // one audio sample: advance model then compare
  task automatic tick();
    mstate_e prev_st;
    @(posedge clk); sample_en <= 1;
    @(posedge clk); sample_en <= 0;
    prev_st = ms;
    case (ms)
      M_IDLE:    mout = 0.0;
      M_ATTACK:  if (mt >= A) begin ms = M_DECAY; mt = 0; mout = 1.0; end
                 else begin mout = mt / A; mt += TS; end
      M_DECAY:   if (mt >= D) begin ms = M_SUSTAIN; mt = 0; mout = S; end
                 else begin mout = 1.0 - mt * (1.0 - S) / D; mt += TS; end
      M_SUSTAIN: mout = S;
      M_RELEASE: if (mt >= R) begin ms = M_IDLE; mt = 0; mout = 0.0; end
                 else begin mout = mvi - mt * mvi / R; mt += TS; end
    endcase
    if (ms != prev_st) begin
      stage_len[prev_st] = samples_in_stage;
      samples_in_stage = 0;
    end
    samples_in_stage++;
    @(negedge clk);
    checks++;
    if (to_real(out) - mout > 0.01 || mout - to_real(out) > 0.01) begin
      failures++;
      if (failures < 10) $display("FAIL state %s t=%f out=%f model=%f", ms.name(), mt, to_real(out), mout);
    end
    @(posedge clk);
  endtask

  task automatic press();
    @(posedge clk); note_on <= 1; @(posedge clk); note_on <= 0;
    ms = M_ATTACK; mt = 0; samples_in_stage = 0;
  endtask
  task automatic lift();
    @(posedge clk); note_off <= 1; @(posedge clk); note_off <= 0;
    if (ms != M_IDLE) begin
      stage_len[ms] = samples_in_stage;
      ms = M_RELEASE; mt = 0; mvi = mout; samples_in_stage = 0;
    end
  endtask

  task automatic check_len(mstate_e st, real secs);
    int expn;
    expn = int'($ceil(secs / TS));
    checks++;
    if (stage_len[st] < expn || stage_len[st] > expn + 2) begin
      failures++; $display("FAIL %s lasted %0d samples, expected %0d", st.name(), stage_len[st], expn);
    end
  endtask

  initial begin
    cfg.attack  = ufix_t'(int'(A * 16777216.0));
    cfg.decay   = ufix_t'(int'(D * 16777216.0));
    cfg.sustain = fix_t'(int'(S * 16777216.0));
    cfg.rel     = ufix_t'(int'(R * 16777216.0));
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) tick();
    press();
    repeat (7000) tick();              // attack 2208 + decay 4415 samples, then sustain
    check_len(M_ATTACK, A);
    check_len(M_DECAY, D);
    checks++;
    if (!active) begin failures++; $display("FAIL not active in sustain"); end
    lift();
    repeat (3600) tick();              // release 3531 samples
    check_len(M_RELEASE, R);
    checks++;
    if (active || out != 0) begin failures++; $display("FAIL not idle after release"); end
    // release during attack
    press();
    repeat (1000) tick();
    lift();
    repeat (3600) tick();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
