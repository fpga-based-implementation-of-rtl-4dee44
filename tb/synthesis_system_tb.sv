// synthesis_system_tb: controller and datapath together in the 16-entry
// library configuration (ADDR_W = 4). The word "bamite" is searched with
// "ba" at entry 9, "mi" at entry 0 and "te" missing, then "te" is added and
// the word run again. Checks each start address, the cycle at which found
// rises (3k + 2 cycles after S2 for entry k), the dfound pulse after a full
// scan (3*16 + 2 cycles) and the wait for the player's done pulse.
module synthesis_system_tb;
  import tts_pkg::*;
  localparam int ADDR_W = 4;
  localparam int DEPTH  = 1 << ADDR_W;
  logic clk = 0, reset, ready, load, control, done;
  word_t target_word;
  logic lib_we;
  logic [ADDR_W-1:0] lib_waddr;
  lib_entry_t lib_wdata;
  saddr_t starting_address;
  logic dfound, found, word_done, busy;
  state_t state;
  int plays;
  int checks = 0, failures = 0;
  int cycle = 0, s2_cycle = 0;

  synthesis_system #(.ADDR_W(ADDR_W)) dut (
    .clk, .reset, .ready, .load, .control, .done, .target_word,
    .lib_we, .lib_waddr, .lib_wdata,
    .starting_address, .dfound, .found, .word_done, .state);

  audio_player_model player (.clk, .rst(reset), .start(found),
                             .start_address(starting_address),
                             .done, .busy, .plays);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (state == S2_ASSIGN) s2_cycle <= cycle;
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic write_lib(input int a, input phone_t p, input saddr_t s);
    lib_we = 1; lib_waddr = ADDR_W'(a); lib_wdata = '{phone: p, saddr: s};
    @(posedge clk); #1 lib_we = 0;
  endtask

  // Wait for found (or dfound); return which, the start address and the
  // cycles since the controller was in S2.
  task automatic wait_event(output logic was_found, output saddr_t a, output int lat);
    int guard = 0;
    while (!found && !dfound && guard < 1000) begin @(posedge clk); #1 guard++; end
    was_found = found;
    lat = cycle - s2_cycle;
    @(posedge clk); #1;
    a = starting_address;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_word(input logic te_present);
    logic f; saddr_t a; int lat;
    reset = 1; ready = 0; load = 0; control = 0;
    @(posedge clk); #1 reset = 0;
    for (int i = 0; i < DEPTH; i++) write_lib(i, {8'h23, 8'(i)}, 19'(i));
    write_lib(9, "ba", 19'h7EE00);
    write_lib(0, "mi", 19'h50540);
    if (te_present) write_lib(15, "te", 19'h00000);
    repeat (3) @(posedge clk);
    #1 chk(state == S0_IDLE, "idle until ready");
    ready = 1; @(posedge clk); #1;
    chk(state == S1_LOAD, "load state");
    repeat (2) @(posedge clk);
    #1 chk(state == S1_LOAD, "waits for load");
    load = 1; control = 1;
    wait_event(f, a, lat);
    chk(f && a == 19'h7EE00 && lat == 3*9 + 2, $sformatf("ba: f=%0b a=%h lat=%0d", f, a, lat));
    chk(state == S6_PLAY, "waits for the player");
    wait_event(f, a, lat);
    chk(f && a == 19'h50540 && lat == 2, $sformatf("mi: f=%0b a=%h lat=%0d", f, a, lat));
    wait_event(f, a, lat);
    if (te_present)
      chk(f && a == 19'h00000 && lat == 3*15 + 2, $sformatf("te: f=%0b a=%h lat=%0d", f, a, lat));
    else
      chk(!f && a == 19'h50540 && lat == 3*DEPTH + 1, $sformatf("te missing: f=%0b a=%h lat=%0d", f, a, lat));
    repeat (40) @(posedge clk);
    #1 chk(word_done, "word done");
    chk(plays == (te_present ? 3 : 2), $sformatf("plays=%0d", plays));
    // no further found or dfound once the word is finished
    for (int i = 0; i < 3*DEPTH + 10; i++) begin
      @(posedge clk); #1;
      if (found || dfound) begin chk(0, "activity after word end"); break; end
    end
  endtask

  initial begin
    reset = 1; ready = 0; load = 0; control = 0; lib_we = 0;
    lib_waddr = '0; lib_wdata = '0; target_word = "bamite";
    run_word(0);
    run_word(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
