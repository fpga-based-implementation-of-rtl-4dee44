// counter_k_tb: counts through the whole library range at the default
// 8-bit address, checks kvalue only at 256, saturation, reset_k priority
// and hold.
module counter_k_tb;
  localparam int ADDR_W = 8;
  localparam int DEPTH  = 1 << ADDR_W;
  logic clk = 0, rst, reset_k, incr_k;
  logic [ADDR_W-1:0] addr;
  logic kvalue;
  int checks = 0, failures = 0;
  int model;

  counter_k dut (.clk, .rst, .reset_k, .incr_k, .addr, .kvalue);

  always #5 clk = ~clk;

  task automatic step(input logic rk, input logic ik);
    reset_k = rk; incr_k = ik;
    @(posedge clk);
    if (rk) model = 0;
    else if (ik && model < DEPTH) model++;
    #1;
    checks++;
    if (addr !== ADDR_W'(model % DEPTH) || kvalue !== (model == DEPTH)) begin
      failures++;
      $display("FAIL model=%0d addr=%0d kvalue=%0b", model, addr, kvalue);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; reset_k = 0; incr_k = 0; model = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < DEPTH + 3; i++) step(0, 1);  // up to and past DEPTH
    step(0, 0);
    step(1, 1);                                        // reset wins
    for (int i = 0; i < 5; i++) step(0, 1);
    step(0, 0);
    step(0, 0);
    for (int i = 0; i < 300; i++) step(($urandom % 40) == 0, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
