// tb_paa_adder3: exhaustive check of the 3-bit neighbour-bit adder: all
// 64 operand pairs, sum and carry out against the integer sum.
module tb_paa_adder3;
  logic [2:0] a, b, s;
  logic       cout;
  int checks = 0, failures = 0;
  paa_adder3 dut (.a(a), .b(b), .s(s), .cout(cout));
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) begin
      logic [3:0] sum;
      {a, b} = 6'(i);
      sum = 4'(a) + 4'(b);
      #1;
      checks++;
      if ({cout, s} !== sum) begin
        failures++;
        $display("FAIL a=%0d b=%0d got=%0d exp=%0d", a, b, {cout, s}, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
