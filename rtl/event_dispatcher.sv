// event_dispatcher: decides which audio processing unit (APU) plays each note.
//
// The dispatcher keeps, per APU, the note it was last given and whether that
// note is still held, plus a recency order of the APUs (order[0] is the least
// recently allocated). A note-on goes to the least recently used APU whose key
// is no longer held; if every APU holds a key, the oldest note is replaced.
// The chosen APU moves to the most-recent end of the order, so an APU whose note
// was just released (and may still be in its release stage) is reused last. A
// note-off goes to the APU holding that note, if any, and marks it free.
//
// Output events are registered: apu_ev[i] carries a note_on or note_off strobe
// one cycle after the input strobe. Least-recently-used allocation, forwarding
// note-offs to the matching unit and replacing the oldest note when full follow
// the document; the free-first preference and the matching on note number are
// this design's reading of it.
module event_dispatcher #(
  parameter int N = fmpga_pkg::NUM_APU
) (
  input  logic                          clk,
  input  logic                          rst,
  input  fmpga_pkg::note_event_t        ev,
  output fmpga_pkg::note_event_t [N-1:0] apu_ev,
  output logic [N-1:0]                  apu_held,   // key held per APU
  output logic                          stolen      // one-cycle strobe: a held note was replaced
);
  import fmpga_pkg::*;
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] order [N];
  logic [6:0]    held_note [N];
  logic [N-1:0]  held;

  // combinational choice of the target APU
  logic [IW-1:0] alloc_idx;
  logic [IW-1:0] alloc_pos;
  logic          found_free;
  logic [IW-1:0] off_idx;
  logic          off_found;

  always_comb begin
    found_free = 1'b0;
    alloc_pos  = '0;
    for (int p = 0; p < N; p++) begin
      if (!found_free && !held[order[p]]) begin
        found_free = 1'b1;
        alloc_pos  = IW'(p);
      end
    end
    alloc_idx = order[alloc_pos];

    off_found = 1'b0;
    off_idx   = '0;
    for (int i = 0; i < N; i++) begin
      if (!off_found && held[i] && held_note[i] == ev.note) begin
        off_found = 1'b1;
        off_idx   = IW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) begin
        order[i]     <= IW'(i);
        held_note[i] <= '0;
        apu_ev[i]    <= '0;
      end
      held   <= '0;
      stolen <= 1'b0;
    end else begin
      stolen <= 1'b0;
      for (int i = 0; i < N; i++) begin
        apu_ev[i].note_on  <= 1'b0;
        apu_ev[i].note_off <= 1'b0;
      end
      if (ev.note_on) begin
        apu_ev[alloc_idx]          <= ev;
        apu_ev[alloc_idx].note_off <= 1'b0;
        held[alloc_idx]            <= 1'b1;
        held_note[alloc_idx]       <= ev.note;
        stolen                     <= !found_free;
        // move the allocated unit to the most-recent end
        for (int p = 0; p < N - 1; p++)
          if (IW'(p) >= alloc_pos) order[p] <= order[p+1];
        order[N-1] <= alloc_idx;
      end else if (ev.note_off && off_found) begin
        apu_ev[off_idx].note_off <= 1'b1;
        apu_ev[off_idx].note_on  <= 1'b0;
        held[off_idx]            <= 1'b0;
      end
    end
  end

  assign apu_held = held;

// At most one unit receives a note-on in any cycle.
  logic [N-1:0] on_vec;
  always_comb for (int i = 0; i < N; i++) on_vec[i] = apu_ev[i].note_on;
  always_ff @(posedge clk) if (!rst) assert ($countones(on_vec) <= 1)
    else $error("event_dispatcher: note-on sent to several APUs");
endmodule
