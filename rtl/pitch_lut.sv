// pitch_lut: converts a MIDI note number into its equal-temperament frequency,
// f = 440 Hz * 2^((n-69)/12), as a 27-bit signed Q14.12 value.
//
// Rather than a 128-entry table the module keeps the twelve frequencies of the
// top octave (notes 120..131) in Q14.22 and shifts the entry for n mod 12 right
// by one bit per octave below the top: the result for note n is
//   TOP[n mod 12] >> (10 + (10 - n/12)).
// The worst relative error is below 0.01 % (note 0, 8.18 Hz). The lookup is
// registered: freq is valid one cycle after note. The document specifies a lookup
// table from note number to a 27-bit fixed-point frequency; the octave-shift
// organisation and the Q14.12 format are this design's.
module pitch_lut (
  input  logic                  clk,
  input  logic [6:0]            note,
  output fmpga_pkg::fix_t       freq
);
  import fmpga_pkg::*;

  // round(440 * 2^((120+i-69)/12) * 2^22), i = 0..11
  function automatic logic [35:0] top_octave(input logic [3:0] i);
    unique case (i)
      4'd0:    return 36'd35114788961;
      4'd1:    return 36'd37202822971;
      4'd2:    return 36'd39415017944;
      4'd3:    return 36'd41758756875;
      4'd4:    return 36'd44241861775;
      4'd5:    return 36'd46872619776;
      4'd6:    return 36'd49659810789;
      4'd7:    return 36'd52612736804;
      4'd8:    return 36'd55741252937;
      4'd9:    return 36'd59055800320;
      4'd10:   return 36'd62567440947;
      default: return 36'd66287894592;
    endcase
  endfunction

  logic [3:0]  octave, semitone;
  logic [35:0] shifted;

  always_comb begin
    octave   = 4'(note / 7'd12);
    semitone = 4'(note % 7'd12);
    shifted  = top_octave(semitone) >> (5'd20 - 5'(octave));
  end

  always_ff @(posedge clk) freq <= fix_t'(shifted);
endmodule
