// word_list_tb: workload run of the whole design at its default size with a
// library of 20 phones, loaded once, and the short words bone, when, vote,
// byte, dose, bane, mine, nine and goose synthesized in turn (each after a
// reset, which leaves the library intact). Four-letter words are zero
// padded; the odd-length "goose" ends in the segment "e" + NUL, which has
// its own library entry. For every segment the testbench checks the start
// address passed to the player and the cycle at which found rises
// (3k + 2 cycles after S2 for entry k); the unused 236 entries hold a
// filler phone.
module word_list_tb;
  import tts_pkg::*;
  localparam int ADDR_W = 8;
  localparam int DEPTH  = 1 << ADDR_W;
  localparam int NPH    = 20;

  logic clk = 0, reset, ready, load, control, done, busy;
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
  int n_found = 0;

  phone_t phones [NPH] = '{"bo", "ne", "wh", "en", "vo", "te", "by", "do", "se",
                           "ba", "mi", "ni", "go", "os", {"e", 8'h0}, "ge", "de",
                           "pe", "st", "am"};

  tts_top dut (
    .clk, .reset, .ready, .load, .control, .done, .shift(2'b00), .ext_word,
    .lib_we, .lib_waddr, .lib_wdata,
    .starting_address, .dfound, .found, .word_done, .state);

  audio_player_model #(.PLAY_BASE(9)) player (
    .clk, .rst(reset), .start(found), .start_address(starting_address),
    .done, .busy, .plays);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (state == S2_ASSIGN) s2_cycle <= cycle;
    if (found) n_found++;
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // entry of a phone: phone i is stored at entry 11*i + 3 (distinct for
  // i < 20), with start address 0x4000 * i + 0x100
  function automatic int entry_of(input phone_t p);
    for (int i = 0; i < NPH; i++) if (phones[i] == p) return 11 * i + 3;
    return -1;
  endfunction

  task automatic run_word(input word_t w, input int nseg);
    reset = 1; ready = 0; load = 0; control = 0; ext_word = w;
    @(posedge clk); #1 reset = 0;
    ready = 1; @(posedge clk); #1 ready = 0;
    load = 1; control = 1;
    for (int s = 0; s < nseg; s++) begin
      phone_t p;
      int k, lat, guard = 0;
      p = w[WORD_W-1 - SEG_W*s -: SEG_W];
      k = entry_of(p);
      while (!found && !dfound && guard < 4 * DEPTH) begin @(posedge clk); #1 guard++; end
      lat = cycle - s2_cycle;
      chk(found && lat == 3 * k + 2,
          $sformatf("%s: segment %0d found=%0b after %0d cycles, entry %0d", w, s, found, lat, k));
      @(posedge clk); #1;
      chk(starting_address == 19'((k - 3) / 11 * 'h4000 + 'h100),
          $sformatf("%s: segment %0d address %h", w, s, starting_address));
    end
    begin
      int guard = 0;
      while ((busy || !word_done) && guard < 200) begin @(posedge clk); #1 guard++; end
    end
    chk(word_done, $sformatf("%s: done", w));
    load = 0; control = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; ready = 0; load = 0; control = 0; ext_word = '0;
    lib_we = 0; lib_waddr = '0; lib_wdata = '0;
    @(posedge clk); #1 reset = 0;
    lib_we = 1;
    for (int i = 0; i < DEPTH; i++) begin
      lib_waddr = ADDR_W'(i); lib_wdata = '{phone: "##", saddr: '0};
      @(posedge clk); #1;
    end
    for (int i = 0; i < NPH; i++) begin
      lib_waddr = ADDR_W'(11 * i + 3);
      lib_wdata = '{phone: phones[i], saddr: 19'(i * 'h4000 + 'h100)};
      @(posedge clk); #1;
    end
    lib_we = 0;
    run_word({"bone", 16'h0}, 2);
    run_word({"when", 16'h0}, 2);
    run_word({"vote", 16'h0}, 2);
    run_word({"byte", 16'h0}, 2);
    run_word({"dose", 16'h0}, 2);
    run_word({"bane", 16'h0}, 2);
    run_word({"mine", 16'h0}, 2);
    run_word({"nine", 16'h0}, 2);
    run_word({"goose", 8'h0}, 3);
    chk(n_found == 19, $sformatf("recordings started %0d", n_found));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
