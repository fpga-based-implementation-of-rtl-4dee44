// output_module: holds the start address handed to the audio player.
//
// On a rising clock edge with found = 1 it loads the 19-bit start address
// read from the library entry that matched; otherwise it keeps its value, so
// the address stays valid while the player runs. This follows the thesis.
// The synchronous clear on rst is this design's choice.
module output_module
  import tts_pkg::*;
(
  input  logic   clk,
  input  logic   rst,          // synchronous, active high
  input  logic   found,
  input  saddr_t saddr_in,
  output saddr_t start_address
);
  always_ff @(posedge clk) begin
    if (rst)        start_address <= '0;
    else if (found) start_address <= saddr_in;
  end
endmodule
