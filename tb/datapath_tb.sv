// datapath_tb: drives the datapath's control inputs as the controller
// would and checks cmp, kvalue and start_address against a model of the
// library. The 256-entry library holds distinct phones; the word "bamite"
// has "ba" and "te" in it and "mi" missing, so one segment scans the whole
// library and ends with kvalue.
module datapath_tb;
  import tts_pkg::*;
  localparam int ADDR_W = 8;
  localparam int DEPTH  = 1 << ADDR_W;
  logic clk = 0, rst, sel, control, reset_k, incr_k, incr_i, found;
  word_t target_word;
  logic lib_we;
  logic [ADDR_W-1:0] lib_waddr;
  lib_entry_t lib_wdata;
  logic kvalue, cmp, word_done;
  saddr_t start_address;
  lib_entry_t lib [DEPTH];
  int checks = 0, failures = 0;

  datapath dut (.clk, .rst, .sel, .control, .reset_k, .incr_k, .incr_i,
                .found, .target_word, .lib_we, .lib_waddr, .lib_wdata,
                .kvalue, .start_address, .cmp, .word_done);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Scan the library for the current segment; returns the matching index
  // or -1.
  task automatic search(input phone_t x, output int hit);
    hit = -1;
    reset_k = 1; @(posedge clk); #1 reset_k = 0;
    for (int k = 0; k <= DEPTH; k++) begin
      #1;
      chk(kvalue == (k == DEPTH), $sformatf("kvalue at k=%0d", k));
      if (k == DEPTH) break;
      chk(cmp == (lib[k].phone == x), $sformatf("cmp at k=%0d", k));
      if (cmp) begin
        found = 1; @(posedge clk); #1 found = 0;
        chk(start_address == lib[k].saddr,
            $sformatf("start_address %h exp %h", start_address, lib[k].saddr));
        hit = k;
        break;
      end
      incr_k = 1; @(posedge clk); #1 incr_k = 0;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hit;
    saddr_t held;
    rst = 1; sel = 0; control = 0; reset_k = 0; incr_k = 0; incr_i = 0;
    found = 0; lib_we = 0; lib_waddr = '0; lib_wdata = '0;
    target_word = "bamite";
    @(posedge clk); #1 rst = 0;
    // loading phase: distinct phones "A0".."A255"-like values, no "mi"
    for (int i = 0; i < DEPTH; i++) begin
      lib[i].phone = 16'h4000 + 16'(i);
      lib[i].saddr = 19'($urandom);
    end
    lib[37].phone  = "ba"; lib[37].saddr  = 19'h7EE00;
    lib[200].phone = "te"; lib[200].saddr = 19'h00000;
    lib_we = 1;
    for (int i = 0; i < DEPTH; i++) begin
      lib_waddr = ADDR_W'(i); lib_wdata = lib[i];
      @(posedge clk); #1;
    end
    lib_we = 0;
    sel = 1;
    control = 1;
    @(posedge clk); #1;

    search("ba", hit);
    chk(hit == 37, "ba at 37");
    incr_i = 1; @(posedge clk); #1 incr_i = 0;
    held = start_address;
    search("mi", hit);
    chk(hit == -1, "mi missing");
    chk(start_address == held, "address held on a miss");
    incr_i = 1; @(posedge clk); #1 incr_i = 0;
    search("te", hit);
    chk(hit == 200, "te at 200");
    chk(!word_done, "word not yet done");
    incr_i = 1; @(posedge clk); #1 incr_i = 0;
    #1 chk(word_done, "word done");
    // after the word, no entry may match, not even a zero phone
    lib_we = 1; sel = 0; lib_waddr = 0; lib_wdata = '0; lib[0] = '0;
    @(posedge clk); #1 lib_we = 0; sel = 1;
    search(16'hFFFF, hit);
    chk(hit == -1, "no match after word end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
