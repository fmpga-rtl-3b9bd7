// midi_decoder: frames UART bytes out of the sampled MIDI bitstream and
// recognises Note On / Note Off messages.
//
// Framing: while idle, a sample of 0 is taken as the start bit; the next eight
// samples are the data bits, least significant first, and the tenth must be the
// stop bit 1, otherwise the byte is a framing failure. A byte with its MSB set
// is a status byte, otherwise a data byte.
//
// The message FSM has the states IDLE, PITCH, VELOCITY, NOTE_ON and NOTE_OFF.
// A Note On (0x9n) or Note Off (0x8n) status byte moves IDLE to PITCH; a data
// byte then moves PITCH to VELOCITY and another moves VELOCITY to NOTE_ON or
// NOTE_OFF, which last one cycle, pulse msg_valid and return to IDLE. A status
// byte or a framing failure in PITCH or VELOCITY returns to IDLE. The states,
// the transitions and their conditions follow the document's decoder diagram;
// the handling of other status bytes (ignored), of the channel nibble (any
// channel accepted) and of running status (not supported) is this design's.
//
// Timing: msg_valid rises two cycles after the sample of the velocity byte's
// stop bit.
module midi_decoder (
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_valid,
  input  logic       bit_value,
  output logic       msg_valid,   // one-cycle strobe
  output logic       msg_is_on,   // 1: Note On, 0: Note Off
  output logic [6:0] msg_note,
  output logic [6:0] msg_velocity,
  output logic       frame_error  // one-cycle strobe on a bad stop bit
);
  // ---- UART byte framing ------------------------------------------------
  typedef enum logic [1:0] {RX_IDLE, RX_DATA, RX_STOP} rx_state_e;
  rx_state_e  rx_state;
  logic [2:0] bit_idx;
  logic [7:0] shreg;
  logic       byte_valid;
  logic [7:0] byte_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_state    <= RX_IDLE;
      bit_idx     <= '0;
      shreg       <= '0;
      byte_valid  <= 1'b0;
      byte_data   <= '0;
      frame_error <= 1'b0;
    end else begin
      byte_valid  <= 1'b0;
      frame_error <= 1'b0;
      if (bit_valid) begin
        unique case (rx_state)
          RX_IDLE: if (!bit_value) begin
            rx_state <= RX_DATA;
            bit_idx  <= '0;
          end
          RX_DATA: begin
            shreg   <= {bit_value, shreg[7:1]};
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) rx_state <= RX_STOP;
          end
          RX_STOP: begin
            rx_state <= RX_IDLE;
            if (bit_value) begin
              byte_valid <= 1'b1;
              byte_data  <= shreg;
            end else begin
              frame_error <= 1'b1;
            end
          end
          default: rx_state <= RX_IDLE;
        endcase
      end
    end
  end

  // ---- message FSM ------------------------------------------------------
  typedef enum logic [2:0] {S_IDLE, S_PITCH, S_VELOCITY, S_NOTE_ON, S_NOTE_OFF} msg_state_e;
  msg_state_e state;
  logic       is_on;

  wire is_status  = byte_data[7];
  wire is_note_on = (byte_data[7:4] == 4'h9);
  wire is_note_of = (byte_data[7:4] == 4'h8);

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      is_on        <= 1'b0;
      msg_valid    <= 1'b0;
      msg_is_on    <= 1'b0;
      msg_note     <= '0;
      msg_velocity <= '0;
    end else begin
      msg_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (byte_valid && (is_note_on || is_note_of)) begin
          state <= S_PITCH;
          is_on <= is_note_on;
        end
        S_PITCH: if (frame_error || (byte_valid && is_status)) begin
          state <= S_IDLE;
        end else if (byte_valid) begin
          msg_note <= byte_data[6:0];
          state    <= S_VELOCITY;
        end
        S_VELOCITY: if (frame_error || (byte_valid && is_status)) begin
          state <= S_IDLE;
        end else if (byte_valid) begin
          msg_velocity <= byte_data[6:0];
          state        <= is_on ? S_NOTE_ON : S_NOTE_OFF;
        end
        S_NOTE_ON, S_NOTE_OFF: begin
          msg_valid <= 1'b1;
          msg_is_on <= (state == S_NOTE_ON);
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
