// tb_paa_carry_orand: exhaustive check of the OR-AND carry cell. With
// g = a & b and t = a | b its output must be the majority of a, b and c_in,
// the carry of the original design's 1-bit truth table.
module tb_paa_carry_orand;
  logic g, t, c_in, c_out;
  int checks = 0, failures = 0;
  paa_carry_orand dut (.g(g), .t(t), .c_in(c_in), .c_out(c_out));
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    // Carry out of the 1-bit adder, indexed by {a,b,cin}.
    logic [7:0] cout_tab;
    cout_tab = 8'b1110_1000;
    for (int i = 0; i < 8; i++) begin
      logic a, b;
      {a, b, c_in} = 3'(i);
      g = a & b; t = a | b;
      #1;
      checks++;
      if (c_out !== cout_tab[i]) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b out=%b", a, b, c_in, c_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
