// synthesis_system: controller and datapath of the speech synthesis engine.
//
// For each two-letter segment of the target word it scans the phone library
// from entry 0, and on a match hands the phone's recording start address to
// the audio player and waits for the player's done signal before moving to
// the next segment. A segment with no match raises dfound for one cycle and
// is skipped. The controller and datapath are wired as in the thesis's
// schematic: kvalue and cmp go up, reset_K, incr_K, incr_I and found go down.
//
// Timing: after load, a segment whose match is library entry k is found
// 3k + 2 cycles after the controller enters S2 (S2, then S3/S4/S5 per
// missed entry, then S3 and S4 for the hit); start_address is valid from the
// next cycle. A segment with no match raises dfound 3*DEPTH + 1 cycles
// after S2 (DEPTH = 2**ADDR_W) and is skipped.
//
// Choices of this design: the register file's sel is driven by load (the
// thesis: sel = 0 loads the register file, load = 0 means loading is in
// progress); found and word_done are brought out because the player needs
// a start strobe and the host needs to know when the word is finished;
// dfound is suppressed after the word is finished, while the controller
// keeps scanning as the thesis's state machine does.
module synthesis_system
  import tts_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              ready,
  input  logic              load,
  input  logic              control,
  input  logic              done,          // player_done from the player
  input  word_t             target_word,
  input  logic              lib_we,
  input  logic [ADDR_W-1:0] lib_waddr,
  input  lib_entry_t        lib_wdata,
  output saddr_t            starting_address,
  output logic              dfound,
  output logic              found,
  output logic              word_done,
  output state_t            state
);
  logic reset_k, incr_k, incr_i, kvalue, cmp, dfound_raw;

  controller u_ctrl (
    .clk, .reset, .ready, .load, .kvalue, .cmp, .player_done(done),
    .reset_k, .incr_k, .incr_i, .found, .dfound(dfound_raw), .state
  );

  datapath #(.ADDR_W(ADDR_W)) u_dp (
    .clk, .rst(reset), .sel(load), .control, .reset_k, .incr_k, .incr_i,
    .found, .target_word, .lib_we, .lib_waddr, .lib_wdata,
    .kvalue, .start_address(starting_address), .cmp, .word_done
  );

  assign dfound = dfound_raw && !word_done;
endmodule
