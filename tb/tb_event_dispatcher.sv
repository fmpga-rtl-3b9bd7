// tb_event_dispatcher: plays a sequence of note-ons and note-offs into the
// dispatcher and checks which APU receives each event. Expected targets follow
// least-recently-used allocation: free units first, in order of last use, and
// the oldest unit when all four hold keys (a steal).
module tb_event_dispatcher;
  import fmpga_pkg::*;
  logic clk = 0, rst = 1;
  note_event_t ev = '0;
  note_event_t [3:0] apu_ev;
  logic [3:0] apu_held;
  logic stolen;
  int checks = 0, failures = 0, steals = 0;

  event_dispatcher dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && stolen) steals++;

  // returns the unit that received the event, -1 for none, -2 for several
  task automatic play(input logic on, input int note, input int exp_unit);
    int got, n;
    @(posedge clk);
    ev <= '0;
    ev.note_on <= on; ev.note_off <= !on; ev.note <= 7'(note);
    ev.velocity <= 7'd90; ev.frequency <= fix_t'(note * 1000);
    @(posedge clk);
    ev <= '0;
    @(negedge clk);
    got = -1; n = 0;
    for (int i = 0; i < 4; i++)
      if (apu_ev[i].note_on || apu_ev[i].note_off) begin got = i; n++; end
    if (n > 1) got = -2;
    checks++;
    if (got != exp_unit) begin
      failures++; $display("FAIL %s note %0d went to %0d, expected %0d", on ? "on" : "off", note, got, exp_unit);
    end
    if (got >= 0) begin
      checks++;
      if (apu_ev[got].note_on !== on || apu_ev[got].note != 7'(note) ||
          (on && apu_ev[got].frequency !== fix_t'(note * 1000))) begin
        failures++; $display("FAIL wrong event contents at unit %0d", got);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    play(1, 60, 0); play(1, 62, 1); play(1, 64, 2); play(1, 65, 3);
    play(0, 62, 1);                 // release unit 1
    play(1, 67, 1);                 // only free unit
    play(1, 69, 0);                 // all held: oldest (unit 0) is stolen
    play(0, 50, -1);                // unknown note: nothing
    play(0, 69, 0); play(0, 64, 2); play(0, 65, 3);
    // free: 0, 2, 3; recency order now 2, 3, 1, 0 -> unit 2 first
    play(1, 70, 2);
    play(1, 71, 3);
    play(1, 72, 0);
    play(1, 73, 1);                 // unit 1 still held (67): steal the oldest = 1
    repeat (2) @(posedge clk);
    checks++;
    if (steals != 2) begin failures++; $display("FAIL %0d steals, expected 2", steals); end
    checks++;
    if (apu_held !== 4'b1111) begin failures++; $display("FAIL held %b", apu_held); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
