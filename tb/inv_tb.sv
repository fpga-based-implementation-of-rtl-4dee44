// inv_tb: checks the inverter for both input values.
module inv_tb;
  logic a, y;
  int checks = 0, failures = 0;

  inv dut (.a, .y);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      a = i[0];
      #1;
      checks++;
      if (y !== !i[0]) begin
        failures++;
        $display("FAIL a=%0b y=%0b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
