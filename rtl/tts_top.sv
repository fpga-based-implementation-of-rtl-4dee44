// tts_top: concatenative text-to-speech front end.
//
// The input module picks a target word; the synthesis system splits it into
// two-letter segments, finds each segment's phone in the acoustic library
// and gives out the start address of its recording, one after another, to an
// external audio player that plays the recordings back to back. The player
// answers each found strobe with a done pulse when its recording has ended.
//
// Use: hold reset for a cycle; with load = 0 write the library entries
// (lib_we, lib_waddr, lib_wdata) and set shift / ext_word; raise ready, then
// load, then control. found pulses once per matched segment with
// starting_address valid from the next cycle; dfound pulses for a segment
// not in the library; word_done rises when every segment has been handled.
// Structure as in the thesis (input module beside the synthesis system);
// the library write port, found, word_done and state outputs are this
// design's additions.
module tts_top
  import tts_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              ready,
  input  logic              load,
  input  logic              control,
  input  logic              done,
  input  logic [1:0]        shift,
  input  word_t             ext_word,
  input  logic              lib_we,
  input  logic [ADDR_W-1:0] lib_waddr,
  input  lib_entry_t        lib_wdata,
  output saddr_t            starting_address,
  output logic              dfound,
  output logic              found,
  output logic              word_done,
  output state_t            state
);
  word_t target_word;

  input_module u_in (.shift, .ext_word, .word(target_word));

  synthesis_system #(.ADDR_W(ADDR_W)) u_sys (
    .clk, .reset, .ready, .load, .control, .done, .target_word,
    .lib_we, .lib_waddr, .lib_wdata,
    .starting_address, .dfound, .found, .word_done, .state
  );
endmodule
