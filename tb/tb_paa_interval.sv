// tb_paa_interval: checks the interval sum structure at its default three
// bits and at five and six bits. With per-bit g, t, h taken from random operands x, y
// and a carry into the interval c, the outputs must equal the low bits of
// x + y + c. Both values of the carry in are counted.
module tb_paa_interval;
  logic [5:0] x6, y6, s6;
  logic [4:0] x5, y5, s5;
  logic [2:0] s3;
  logic       c6, c5;
  int checks = 0, failures = 0;
  int cin_one = 0, cin_zero = 0;

  paa_interval dut3 (.g(x6[2:0] & y6[2:0]), .t(x6[2:0] | y6[2:0]), .h(x6[2:0] ^ y6[2:0]),
                     .c_in(c6), .s(s3));
  paa_interval #(.N(6)) dut6 (.g(x6 & y6), .t(x6 | y6), .h(x6 ^ y6), .c_in(c6), .s(s6));
  paa_interval #(.N(5)) dut5 (.g(x5 & y5), .t(x5 | y5), .h(x5 ^ y5), .c_in(c5), .s(s5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Exhaustive for six bits: 2^13 cases.
    for (int i = 0; i < 8192; i++) begin
      logic [6:0] exp6;
      {x6, y6, c6} = 13'(i);
      x5 = x6[4:0]; y5 = y6[4:0]; c5 = c6;
      exp6 = 7'(x6) + 7'(y6) + 7'(c6);
      #1;
      if (c6) cin_one++; else cin_zero++;
      checks += 3;
      if (s3 !== 3'(4'(x6[2:0]) + 4'(y6[2:0]) + 4'(c6))) begin
        failures++;
        $display("FAIL N=3 x=%b y=%b c=%b s=%b", x6[2:0], y6[2:0], c6, s3);
      end
      if (s6 !== exp6[5:0]) begin
        failures++;
        $display("FAIL N=6 x=%b y=%b c=%b s=%b", x6, y6, c6, s6);
      end
      if (s5 !== 5'(6'(x5) + 6'(y5) + 6'(c5))) begin
        failures++;
        $display("FAIL N=5 x=%b y=%b c=%b s=%b", x5, y5, c5, s5);
      end
    end
    checks++;
    if (cin_one == 0 || cin_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
