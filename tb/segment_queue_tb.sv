// segment_queue_tb: a six-letter word comes out as three two-letter
// segments in order; incr_i is ignored while control is 0; word_done rises
// after the third segment and at a zero-padded segment of a short word.
module segment_queue_tb;
  import tts_pkg::*;
  logic clk = 0, rst, control, incr_i, word_done;
  word_t word;
  phone_t seg;
  int checks = 0, failures = 0;

  segment_queue dut (.clk, .rst, .control, .incr_i, .word, .seg, .word_done);

  always #5 clk = ~clk;

  task automatic expect_seg(input phone_t s, input logic d);
    #1;
    checks++;
    if (seg !== s || word_done !== d) begin
      failures++;
      $display("FAIL seg=%s (%h) done=%0b exp %s done=%0b", seg, seg, word_done, s, d);
    end
  endtask

  task automatic advance();
    incr_i = 1; @(posedge clk); #1 incr_i = 0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; control = 0; incr_i = 0; word = "bamite";
    @(posedge clk); #1 rst = 0;
    @(posedge clk); #1;
    control = 1;
    word = "xxxxxx";               // must not disturb the held word
    expect_seg("ba", 0);
    @(posedge clk);
    expect_seg("ba", 0);           // holds without incr_i
    advance(); expect_seg("mi", 0);
    advance(); expect_seg("te", 0);
    advance(); expect_seg(16'h0, 1);
    advance(); expect_seg(16'h0, 1);  // stays done
    // new word: control low reloads and restarts at the first segment
    control = 0; word = "devote";
    incr_i = 1; @(posedge clk); #1 incr_i = 0;
    control = 1;
    expect_seg("de", 0);
    advance(); expect_seg("vo", 0);
    advance(); expect_seg("te", 0);
    // four-letter word padded with zeros
    control = 0; word = {"bone", 16'h0};
    @(posedge clk); #1 control = 1;
    expect_seg("bo", 0);
    advance(); expect_seg("ne", 0);
    advance(); expect_seg(16'h0, 1);
    // reset clears the held word
    rst = 1; @(posedge clk); #1 rst = 0;
    expect_seg(16'h0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
