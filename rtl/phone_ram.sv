// phone_ram: the acoustic library register file.
//
// DEPTH = 2**ADDR_W entries of 35 bits, each a 16-bit phone and the 19-bit
// start address of its recording. While sel is 0 the library is in its
// loading phase and we writes wdata at waddr on the rising clock edge; while
// sel is 1 writes are ignored. The read port is asynchronous: rdata follows
// raddr (driven by counter K) in the same cycle, so the controller can
// compare Y(K) in the state after it checks K.
//
// The thesis gives the 35-bit width, the sel read/write rule and the 8-bit
// address of its implementation (256 entries). The separate write address
// and data port is this design's choice, since the thesis does not say how
// the library is filled.
module phone_ram
  import tts_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              sel,    // 0: load (write allowed), 1: read only
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  lib_entry_t        wdata,
  input  logic [ADDR_W-1:0] raddr,
  output lib_entry_t        rdata
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  lib_entry_t mem [DEPTH];
  logic       load_phase;
  logic       wr;

  // sel is active low for writing (the inverter bubble on sel in the
  // datapath drawing).
  inv u_inv (.a(sel), .y(load_phase));
  assign wr = load_phase & we;

  always_ff @(posedge clk) begin
    if (wr) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
