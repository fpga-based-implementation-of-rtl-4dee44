// phone_ram_tb: fills all 256 entries while sel = 0, reads them back on the
// asynchronous port while sel = 1, and checks that writes with sel = 1 or
// we = 0 are ignored.
module phone_ram_tb;
  import tts_pkg::*;
  localparam int ADDR_W = 8;
  localparam int DEPTH  = 1 << ADDR_W;
  logic clk = 0, sel, we;
  logic [ADDR_W-1:0] waddr, raddr;
  lib_entry_t wdata, rdata;
  lib_entry_t model [DEPTH];
  int checks = 0, failures = 0;

  phone_ram dut (.clk, .sel, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic check_all();
    for (int i = 0; i < DEPTH; i++) begin
      raddr = ADDR_W'(i);
      #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL addr=%0d got=%h exp=%h", i, rdata, model[i]);
      end
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = 0; we = 1; raddr = '0;
    for (int i = 0; i < DEPTH; i++) begin
      waddr = ADDR_W'(i);
      wdata = {16'($urandom), 19'($urandom)};
      model[i] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    sel = 1;
    check_all();
    // writes while sel = 1 must not land
    we = 1;
    for (int i = 0; i < 20; i++) begin
      waddr = ADDR_W'($urandom);
      wdata = {16'($urandom), 19'($urandom)};
      @(posedge clk); #1;
    end
    // writes with we = 0 must not land either
    sel = 0; we = 0;
    for (int i = 0; i < 20; i++) begin
      waddr = ADDR_W'($urandom);
      wdata = {16'($urandom), 19'($urandom)};
      @(posedge clk); #1;
    end
    sel = 1;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
