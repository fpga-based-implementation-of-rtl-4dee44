// tts_top_tb: end-to-end run of the whole design at its default size
// (256-entry library). Five words are synthesized in turn, each after a
// reset and a fresh library load:
//   shift 01 "bamite": ba 7EE00, mi 50540, te 00000
//   shift 11 "gemini": ge 52000, mi 3FF00, ni 40000
//   shift 10 "devote": de 10AA0, vo 25700, te 00000
//   shift 00 "bone" (zero padded): bo, ne
//   shift 00 "stampe": st present, am missing (dfound), pe present
// The library is filled with filler phones and the needed phones are put at
// random entries, so every search also misses and increments K. For every
// segment the testbench checks the start address handed to the player and
// the cycle at which found rises (3k + 2 after S2 for entry k), and that
// the player's recordings are played one after another. It counts each
// mechanism: idle wait, load wait, K increment, found, dfound, wait for
// the player, segment advance, end of word; one never seen is a failure.
module tts_top_tb;
  import tts_pkg::*;
  localparam int ADDR_W = 8;
  localparam int DEPTH  = 1 << ADDR_W;

  logic clk = 0, reset, ready, load, control, done, busy;
  logic [1:0] shift;
  word_t ext_word;
  logic lib_we;
  logic [ADDR_W-1:0] lib_waddr;
  lib_entry_t lib_wdata;
  saddr_t starting_address;
  logic dfound, found, word_done;
  state_t state;
  int plays;
  int checks = 0, failures = 0;
  int cycle = 0, s2_cycle = 0;

  // mechanism counters
  int n_idle = 0, n_loadwait = 0, n_incr_k = 0, n_found = 0, n_dfound = 0;
  int n_playwait = 0, n_advance = 0, n_word_done = 0;

  tts_top dut (
    .clk, .reset, .ready, .load, .control, .done, .shift, .ext_word,
    .lib_we, .lib_waddr, .lib_wdata,
    .starting_address, .dfound, .found, .word_done, .state);

  audio_player_model player (.clk, .rst(reset), .start(found),
                             .start_address(starting_address),
                             .done, .busy, .plays);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (state == S2_ASSIGN) s2_cycle <= cycle;
    if (!reset) begin
      if (state == S0_IDLE && !ready)   n_idle++;
      if (state == S1_LOAD && !load)    n_loadwait++;
      if (state == S5_INCK)             n_incr_k++;
      if (found)                        n_found++;
      if (dfound)                       n_dfound++;
      if (state == S6_PLAY && !done)    n_playwait++;
      if (state == S7_INCI)             n_advance++;
    end
  end

  // found must never rise while the player is still busy
  always @(posedge clk) if (found && busy) begin
    failures++;
    $display("FAIL found while the player is busy");
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  typedef struct {
    phone_t ph;
    saddr_t sa;
    logic   present;
  } seg_exp_t;

  // Run one word. segs lists its segments in order.
  task automatic run_word(input logic [1:0] sh, input word_t ext,
                          input seg_exp_t segs[$]);
    int pos [$];
    int used [DEPTH];
    int plays0;
    reset = 1; ready = 0; load = 0; control = 0; shift = sh; ext_word = ext;
    @(posedge clk); #1 reset = 0;
    // library: filler phones "#0".."#255", then the word's phones at random
    // distinct entries
    for (int i = 0; i < DEPTH; i++) used[i] = 0;
    lib_we = 1;
    for (int i = 0; i < DEPTH; i++) begin
      lib_waddr = ADDR_W'(i); lib_wdata = '{phone: {8'h23, 8'(i)}, saddr: 19'(i * 64)};
      @(posedge clk); #1;
    end
    foreach (segs[s]) begin
      int p;
      do p = $urandom % DEPTH; while (used[p] != 0);
      used[p] = 1;
      pos.push_back(p);
      if (segs[s].present) begin
        lib_waddr = ADDR_W'(p); lib_wdata = '{phone: segs[s].ph, saddr: segs[s].sa};
        @(posedge clk); #1;
      end
    end
    lib_we = 0;
    repeat (2) @(posedge clk);
    #1 chk(state == S0_IDLE, "idle until ready");
    ready = 1; @(posedge clk); #1 ready = 0;
    repeat (3) @(posedge clk);
    #1 chk(state == S1_LOAD, "waits in load state");
    load = 1; control = 1;
    plays0 = plays;
    foreach (segs[s]) begin
      int guard = 0, lat;
      while (!found && !dfound && guard < 4 * DEPTH) begin @(posedge clk); #1 guard++; end
      lat = cycle - s2_cycle;
      if (segs[s].present) begin
        chk(found, $sformatf("segment %s found", segs[s].ph));
        chk(lat == 3 * pos[s] + 2,
            $sformatf("segment %s at entry %0d found after %0d cycles", segs[s].ph, pos[s], lat));
        @(posedge clk); #1;
        chk(starting_address == segs[s].sa,
            $sformatf("segment %s start address %h exp %h", segs[s].ph, starting_address, segs[s].sa));
      end else begin
        chk(dfound, $sformatf("segment %s reported missing", segs[s].ph));
        chk(lat == 3 * DEPTH + 1, $sformatf("missing segment after %0d cycles", lat));
        @(posedge clk); #1;
      end
    end
    // let the last recording finish
    begin
      int guard = 0;
      while (!word_done && guard < 200) begin @(posedge clk); #1 guard++; end
      while (busy && guard < 200) begin @(posedge clk); #1 guard++; end
    end
    chk(word_done, "word done");
    if (word_done) n_word_done++;
    begin
      int np = 0;
      foreach (segs[s]) if (segs[s].present) np++;
      chk(plays - plays0 == np, $sformatf("recordings played %0d exp %0d", plays - plays0, np));
    end
    load = 0; control = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; ready = 0; load = 0; control = 0; shift = 2'b00; ext_word = '0;
    lib_we = 0; lib_waddr = '0; lib_wdata = '0;
    run_word(2'b01, '0, '{'{"ba", 19'h7EE00, 1}, '{"mi", 19'h50540, 1}, '{"te", 19'h00000, 1}});
    run_word(2'b11, '0, '{'{"ge", 19'h52000, 1}, '{"mi", 19'h3FF00, 1}, '{"ni", 19'h40000, 1}});
    run_word(2'b10, '0, '{'{"de", 19'h10AA0, 1}, '{"vo", 19'h25700, 1}, '{"te", 19'h00000, 1}});
    run_word(2'b00, {"bone", 16'h0}, '{'{"bo", 19'h01234, 1}, '{"ne", 19'h05678, 1}});
    run_word(2'b00, "stampe", '{'{"st", 19'h11111, 1}, '{"am", 19'h0, 0}, '{"pe", 19'h22222, 1}});
    $display("mechanisms: idle=%0d loadwait=%0d incr_k=%0d found=%0d dfound=%0d playwait=%0d advance=%0d word_done=%0d",
             n_idle, n_loadwait, n_incr_k, n_found, n_dfound, n_playwait, n_advance, n_word_done);
    chk(n_idle > 0, "idle wait seen");
    chk(n_loadwait > 0, "load wait seen");
    chk(n_incr_k > 0, "K increment seen");
    chk(n_found == 13, $sformatf("found count %0d", n_found));
    chk(n_dfound == 1, $sformatf("dfound count %0d", n_dfound));
    chk(n_playwait > 0, "player wait seen");
    chk(n_advance == 13, $sformatf("advance count %0d", n_advance));
    chk(n_word_done == 5, "all words done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
