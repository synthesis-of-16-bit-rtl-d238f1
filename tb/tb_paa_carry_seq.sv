// tb_paa_carry_seq: exhaustive check of the sequential carry chain at its
// default two bits and at five bits. The carry out of every bit is compared
// with the carries of the integer sum a + b + c_in.
module tb_paa_carry_seq;
  logic [1:0] g2, t2, c2;
  logic [4:0] g5, t5, c5;
  logic       cin2, cin5;
  int checks = 0, failures = 0;

  paa_carry_seq dut2 (.g(g2), .t(t2), .c_in(cin2), .c(c2));
  paa_carry_seq #(.N(5)) dut5 (.g(g5), .t(t5), .c_in(cin5), .c(c5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Carry out of bit i of a + b + cin: bit i+1 of the sum minus the
  // contribution of the operand bits above i.
  function automatic logic [4:0] carries(input logic [4:0] a, input logic [4:0] b,
                                         input logic cin, input int n);
    logic [4:0] c;
    for (int i = 0; i < n; i++) begin
      logic [5:0] mask, part;
      mask = 6'((1 << (i + 1)) - 1);
      part = 6'(a & mask[4:0]) + 6'(b & mask[4:0]) + 6'(cin);
      c[i] = part[i+1];
    end
    for (int i = n; i < 5; i++) c[i] = 1'b0;
    return c;
  endfunction

  initial begin
    for (int i = 0; i < 32; i++) begin
      logic [1:0] a, b;
      {a, b, cin2} = 5'(i);
      g2 = a & b; t2 = a | b;
      #1;
      checks++;
      if (c2 !== carries({3'b0, a}, {3'b0, b}, cin2, 2) [1:0]) begin
        failures++;
        $display("FAIL N=2 a=%b b=%b cin=%b c=%b", a, b, cin2, c2);
      end
    end
    for (int i = 0; i < 2048; i++) begin
      logic [4:0] a, b;
      {a, b, cin5} = 11'(i);
      g5 = a & b; t5 = a | b;
      #1;
      checks++;
      if (c5 !== carries(a, b, cin5, 5)) begin
        failures++;
        $display("FAIL N=5 a=%b b=%b cin=%b c=%b", a, b, cin5, c5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
