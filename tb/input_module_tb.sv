// input_module_tb: each shift code selects its word; code 00 passes the
// external word.
module input_module_tb;
  import tts_pkg::*;
  logic [1:0] shift;
  word_t ext_word, word;
  int checks = 0, failures = 0;

  input_module dut (.shift, .ext_word, .word);

  task automatic check(input logic [1:0] s, input word_t e, input word_t exp);
    shift = s; ext_word = e;
    #1;
    checks++;
    if (word !== exp) begin
      failures++;
      $display("FAIL shift=%b word=%s exp=%s", s, word, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(2'b01, "zzzzzz", "bamite");
    check(2'b10, "zzzzzz", "devote");
    check(2'b11, "zzzzzz", "gemini");
    check(2'b00, "stampe", "stampe");
    for (int i = 0; i < 20; i++) begin
      word_t r;
      r = {16'($urandom), 32'($urandom)};
      check(2'b00, r, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
