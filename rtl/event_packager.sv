// event_packager: packs a decoded MIDI message into the note_event_t struct that
// the event dispatcher hands to the audio processing units.
//
// A Note On with velocity 0 (which many keyboards send instead of Note Off) is
// turned into a Note Off here. The note number is looked up in pitch_lut to get
// the frequency. The input message is held for one cycle while the lookup runs,
// so ev.note_on / ev.note_off pulse two cycles after msg_valid. The translation
// and the lookup follow the document; the two-cycle timing is this design's.
module event_packager (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    msg_valid,
  input  logic                    msg_is_on,
  input  logic [6:0]              msg_note,
  input  logic [6:0]              msg_velocity,
  output fmpga_pkg::note_event_t  ev
);
  import fmpga_pkg::*;

  logic       pend_valid, pend_on;
  logic [6:0] pend_note, pend_vel;
  fix_t       freq;

  pitch_lut u_lut (.clk(clk), .note(msg_note), .freq(freq));

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_valid <= 1'b0;
      pend_on    <= 1'b0;
      pend_note  <= '0;
      pend_vel   <= '0;
      ev         <= '0;
    end else begin
      pend_valid <= msg_valid;
      if (msg_valid) begin
        pend_on   <= msg_is_on && (msg_velocity != 7'd0);
        pend_note <= msg_note;
        pend_vel  <= msg_velocity;
      end
      ev.note_on  <= pend_valid && pend_on;
      ev.note_off <= pend_valid && !pend_on;
      if (pend_valid) begin
        ev.note      <= pend_note;
        ev.velocity  <= pend_vel;
        ev.frequency <= freq;
      end
    end
  end
endmodule
