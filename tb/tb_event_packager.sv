// tb_event_packager: drives decoded messages into the event packager and checks
// the packed events: note-on fields and frequency, a real Note Off, a Note On
// with velocity 0 turned into a note-off, and the two-cycle latency.
module tb_event_packager;
  import fmpga_pkg::*;
  logic clk = 0, rst = 1;
  logic msg_valid = 0, msg_is_on = 0;
  logic [6:0] msg_note = 0, msg_velocity = 0;
  note_event_t ev;
  int checks = 0, failures = 0;

  event_packager dut (.*);
  always #5 clk = ~clk;

  task automatic send(input logic on, input int note, input int vel,
                      input logic exp_on, input fix_t exp_freq);
    int lat;
    @(posedge clk);
    msg_valid <= 1; msg_is_on <= on; msg_note <= 7'(note); msg_velocity <= 7'(vel);
    @(posedge clk);
    msg_valid <= 0; msg_note <= 7'd5;   // inputs may change after the strobe
    lat = 1;
    @(negedge clk);
    while (!(ev.note_on || ev.note_off) && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
    checks++;
    if (ev.note_on !== exp_on || ev.note_off !== !exp_on || ev.note != 7'(note) ||
        ev.velocity != 7'(vel) || ev.frequency !== exp_freq) begin
      failures++;
      $display("FAIL ev on=%0b off=%0b note=%0d vel=%0d f=%0d", ev.note_on, ev.note_off,
               ev.note, ev.velocity, ev.frequency);
    end
    @(posedge clk); @(negedge clk);
    checks++;
    if (ev.note_on || ev.note_off) begin failures++; $display("FAIL strobe longer than a cycle"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    send(1, 69, 100, 1, 27'sd1802240);        // A4 440 Hz
    send(0, 69, 64, 0, 27'sd1802240);
    send(1, 81, 0, 0, 27'sd3604480);          // velocity 0 -> note off, A5 880 Hz
    send(1, 57, 127, 1, 27'sd901120);         // A3 220 Hz
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
