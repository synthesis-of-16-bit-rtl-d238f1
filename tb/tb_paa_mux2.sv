// tb_paa_mux2: exhaustive check of the "2 in 1" multiplexer element.
module tb_paa_mux2;
  logic sel, d0, d1, y;
  int checks = 0, failures = 0;
  paa_mux2 dut (.sel(sel), .d0(d0), .d1(d1), .y(y));
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    // Expected output indexed by {sel,d1,d0}: d0 for sel=0, d1 for sel=1.
    logic [7:0] expect_y;
    expect_y = 8'b1100_1010;
    for (int i = 0; i < 8; i++) begin
      {sel, d1, d0} = 3'(i);
      #1;
      checks++;
      if (y !== expect_y[i]) begin
        failures++;
        $display("FAIL sel=%b d0=%b d1=%b y=%b", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
