// tb_paa_carry_andor: exhaustive check of the AND-OR carry cell. It is
// checked both as a raw g | p & c function and as the carry of a bit
// position driven from a, b.
module tb_paa_carry_andor;
  logic g, p, c_in, c_out;
  int checks = 0, failures = 0;
  paa_carry_andor dut (.g(g), .p(p), .c_in(c_in), .c_out(c_out));
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [7:0] expect_c;    // indexed by {g,p,c_in}
    expect_c = 8'b1111_1000;
    for (int i = 0; i < 8; i++) begin
      {g, p, c_in} = 3'(i);
      #1;
      checks++;
      if (c_out !== expect_c[i]) begin
        failures++;
        $display("FAIL g=%b p=%b c=%b out=%b", g, p, c_in, c_out);
      end
    end
    // As the carry of a full adder: majority of a, b, c.
    for (int i = 0; i < 8; i++) begin
      logic a, b, c;
      {a, b, c} = 3'(i);
      g = a & b; p = a ^ b; c_in = c;
      #1;
      checks++;
      if (c_out !== ((a & b) | (a & c) | (b & c))) begin
        failures++;
        $display("FAIL majority a=%b b=%b c=%b", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
