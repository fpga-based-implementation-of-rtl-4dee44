// datapath: the search datapath of the synthesis system.
//
// The segment queue presents the current two-letter segment X of the target
// word. Counter K addresses the phone library (register file), whose
// asynchronous read gives entry Y(K). The comparator raises cmp when the
// phone of Y(K) equals X, and the output module latches the start address of
// Y(K) when the controller answers with found. kvalue tells the controller
// that K has passed the last entry. This structure and these signals are
// the thesis's.
//
// Choices of this design: a master reset rst for the registers; a library
// write port (lib_we, lib_waddr, lib_wdata) that writes only while sel is 0;
// and word_done, which forces cmp to 0 once the word has no segment left so
// that padding never matches a library entry.
module datapath
  import tts_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              sel,        // 0: library loading, 1: read
  input  logic              control,
  input  logic              reset_k,
  input  logic              incr_k,
  input  logic              incr_i,
  input  logic              found,
  input  word_t             target_word,
  input  logic              lib_we,
  input  logic [ADDR_W-1:0] lib_waddr,
  input  lib_entry_t        lib_wdata,
  output logic              kvalue,
  output saddr_t            start_address,
  output logic              cmp,
  output logic              word_done
);
  phone_t            seg;
  logic [ADDR_W-1:0] k_addr;
  lib_entry_t        entry;
  logic              eq;

  segment_queue u_queue (
    .clk, .rst, .control, .incr_i,
    .word(target_word), .seg, .word_done
  );

  counter_k #(.ADDR_W(ADDR_W)) u_counter (
    .clk, .rst, .reset_k, .incr_k, .addr(k_addr), .kvalue
  );

  phone_ram #(.ADDR_W(ADDR_W)) u_ram (
    .clk, .sel, .we(lib_we), .waddr(lib_waddr), .wdata(lib_wdata),
    .raddr(k_addr), .rdata(entry)
  );

  comparator #(.W(SEG_W)) u_cmp (.a(seg), .b(entry.phone), .cmp(eq));

  assign cmp = eq && !word_done;

  output_module u_out (
    .clk, .rst, .found, .saddr_in(entry.saddr), .start_address
  );
endmodule
