// output_module_tb: the start address is loaded only on found and held
// otherwise; reset clears it.
module output_module_tb;
  import tts_pkg::*;
  logic clk = 0, rst, found;
  saddr_t saddr_in, start_address, model;
  int checks = 0, failures = 0;

  output_module dut (.clk, .rst, .found, .saddr_in, .start_address);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; found = 0; saddr_in = 19'h7EE00;
    @(posedge clk); #1;
    rst = 0; model = '0;
    checks++;
    if (start_address !== '0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 500; i++) begin
      found    = ($urandom % 4) == 0;
      saddr_in = 19'($urandom);
      @(posedge clk);
      if (found) model = saddr_in;
      #1;
      checks++;
      if (start_address !== model) begin
        failures++;
        $display("FAIL got=%h exp=%h", start_address, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
