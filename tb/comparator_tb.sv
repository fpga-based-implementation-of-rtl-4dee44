// comparator_tb: equal pairs, random pairs and single-bit differences.
module comparator_tb;
  logic [15:0] a, b;
  logic cmp;
  int checks = 0, failures = 0;

  comparator dut (.a, .b, .cmp);

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (cmp !== (x == y)) begin
      failures++;
      $display("FAIL a=%h b=%h cmp=%0b", x, y, cmp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check("ba", "ba");
    check("ba", "be");
    check(16'h0000, 16'h0000);
    for (int i = 0; i < 16; i++) check(16'hA5C3, 16'hA5C3 ^ (16'h1 << i));
    for (int i = 0; i < 200; i++) begin
      logic [15:0] r;
      r = 16'($urandom);
      check(r, (i % 2 == 0) ? r : 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
