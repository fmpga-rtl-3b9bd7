// tb_midi_decoder: feeds bit samples (one every 4 clocks) straight into the
// MIDI decoder and checks the messages it reports: Note On and Note Off on
// several channels, a status byte interrupting a message, a framing failure
// interrupting a message, and ignored non-note messages. Expected messages are
// kept in a queue written by the stimulus.
module tb_midi_decoder;
  logic clk = 0, rst = 1;
  logic bit_valid = 0, bit_value = 1;
  logic msg_valid, msg_is_on, frame_error;
  logic [6:0] msg_note, msg_velocity;
  int checks = 0, failures = 0, nerr = 0;

  midi_decoder dut (.*);
  always #5 clk = ~clk;

  typedef struct { logic on; logic [6:0] note, vel; } msg_t;
  msg_t expq[$];

  always @(posedge clk) if (!rst) begin
    if (frame_error) nerr++;
    if (msg_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected message on=%0b note=%0d", msg_is_on, msg_note);
      end else begin
        msg_t e;
        e = expq.pop_front();
        if (e.on !== msg_is_on || e.note !== msg_note || e.vel !== msg_velocity) begin
          failures++;
          $display("FAIL got on=%0b note=%0d vel=%0d expected on=%0b note=%0d vel=%0d",
                   msg_is_on, msg_note, msg_velocity, e.on, e.note, e.vel);
        end
      end
    end
  end

  task automatic send_bit(input logic b);
    bit_valid <= 1; bit_value <= b;
    @(posedge clk); bit_valid <= 0;
    repeat (3) @(posedge clk);
  endtask

  task automatic send_byte(input logic [7:0] b, input logic stop = 1'b1);
    send_bit(1'b0);
    for (int i = 0; i < 8; i++) send_bit(b[i]);
    send_bit(stop);
    send_bit(1'b1);   // one idle bit
  endtask

  task automatic expect_msg(input logic on, input int note, input int vel);
    msg_t m; m.on = on; m.note = 7'(note); m.vel = 7'(vel);
    expq.push_back(m);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) send_bit(1'b1);
    expect_msg(1, 60, 100); send_byte(8'h90); send_byte(8'd60); send_byte(8'd100);
    expect_msg(0, 60, 64);  send_byte(8'h80); send_byte(8'd60); send_byte(8'd64);
    expect_msg(1, 72, 1);   send_byte(8'h9F); send_byte(8'd72); send_byte(8'd1);
    // Note On with velocity 0 is reported as a Note On; the packager converts it
    expect_msg(1, 72, 0);   send_byte(8'h9F); send_byte(8'd72); send_byte(8'd0);
    // status byte after the pitch: back to IDLE, the data bytes that follow are dropped
    send_byte(8'h90); send_byte(8'd40); send_byte(8'hB0); send_byte(8'd7); send_byte(8'd9);
    // a framing failure on the velocity byte
    send_byte(8'h90); send_byte(8'd41); send_byte(8'd50, 1'b0);
    send_byte(8'd50);
    // control change and program change are ignored
    send_byte(8'hB3); send_byte(8'd1); send_byte(8'd2);
    send_byte(8'hC0); send_byte(8'd5);
    expect_msg(1, 127, 127); send_byte(8'h95); send_byte(8'd127); send_byte(8'd127);
    expect_msg(0, 0, 0);     send_byte(8'h85); send_byte(8'd0); send_byte(8'd0);
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d messages missing", expq.size()); end
    checks++;
    if (nerr != 1) begin failures++; $display("FAIL %0d framing errors, expected 1", nerr); end
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
