// audio_player_model: behavioural stand-in for the external audio player.
//
// Not synthesizable logic of the design: it models the player that reads a
// recording from the board's audio memory. On a clock edge with start = 1
// it takes start_address and "plays" for a number of cycles that depends on
// the address (PLAY_BASE plus the low three address bits), then pulses done
// for one cycle. busy is 1 while it plays. It also counts the recordings
// started and keeps the last start address for the testbench.
module audio_player_model
  import tts_pkg::*;
#(
  parameter int unsigned PLAY_BASE = 5
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  saddr_t start_address,
  output logic   done,
  output logic   busy,
  output int     plays
);
  int unsigned remaining;

  always_ff @(posedge clk) begin
    if (rst) begin
      done      <= 1'b0;
      busy      <= 1'b0;
      remaining <= 0;
      plays     <= 0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy      <= 1'b1;
        remaining <= PLAY_BASE + 32'(start_address[2:0]);
        plays     <= plays + 1;
      end else if (busy) begin
        if (remaining == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          remaining <= remaining - 1;
        end
      end
    end
  end
endmodule
