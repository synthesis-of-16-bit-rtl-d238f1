// tb_paa_xor2: exhaustive check of the 4-element XOR against its truth table.
module tb_paa_xor2;
  logic a, b, y;
  int checks = 0, failures = 0;
  paa_xor2 dut (.a(a), .b(b), .y(y));
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    // Truth table of XOR, indexed by {a,b}.
    logic [3:0] expect_y;
    expect_y = 4'b0110;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== expect_y[i]) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
