// input_module: selects the target word fed to the synthesis system.
//
// A 4-to-1 multiplexer of 48-bit words (six 8-bit ASCII characters, first
// letter in the top byte) steered by the 2-bit shift input. Codes 01, 10 and
// 11 give three built-in words, by default "bamite", "devote" and "gemini";
// code 00 passes the external word ext_word. Combinational.
//
// The thesis describes this module only as a multiplexer that provides the
// target word; the shift codes shown beside its three test words give the
// default assignment. The external-word input is this design's choice.
module input_module
  import tts_pkg::*;
#(
  parameter word_t WORD_01 = "bamite",
  parameter word_t WORD_10 = "devote",
  parameter word_t WORD_11 = "gemini"
) (
  input  logic [1:0] shift,
  input  word_t      ext_word,
  output word_t      word
);
  always_comb begin
    case (shift)
      2'b01:   word = WORD_01;
      2'b10:   word = WORD_10;
      2'b11:   word = WORD_11;
      default: word = ext_word;
    endcase
  end
endmodule
