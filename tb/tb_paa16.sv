// tb_paa16: end-to-end test of the 16-bit parallel acyclic adder at its
// default (and only) size.
//
// Compares {cout, s} with the integer sum a + b for:
//   * the worked example 0110101100 + 0010010100 = 1001000000 (binary),
//   * corner cases (zeros, all ones, carry running through the whole word),
//   * every pair of 8-bit operands placed in the low byte, the high byte and
//     across the middle of the word,
//   * 20,000,000 random pairs.
// It also checks the depth rule in paa_pkg against its table (8 levels at
// 8 bits, two more per doubling, up to 24 at 2048 bits).
// It counts how often each mechanism of the adder is used: a carry leaving
// the 3-bit neighbour-bit adder; the ripple carry into bit 4; the anchor
// carry c4 at 1 while a middle carry c5..c12 is taken from it; the top
// interval selected with carry in 0 and with 1; a carry out of the word; a
// carry propagated from bit 0 to bit 15. A mechanism never seen counts as a
// failure.
module tb_paa16;
  logic [15:0] a, b, s;
  logic        cout;
  int checks = 0, failures = 0;
  int n_c2 = 0, n_c3 = 0, n_anchor = 0, n_iv_0 = 0, n_iv_1 = 0;
  int n_cout = 0, n_full_chain = 0;

  paa16 dut (.a(a), .b(b), .s(s), .cout(cout));

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    logic [16:0] exp_sum, lo;
    a = x; b = y;
    #1;
    exp_sum = 17'(x) + 17'(y);
    checks++;
    if ({cout, s} !== exp_sum) begin
      failures++;
      if (failures < 20)
        $display("FAIL a=%h b=%h got=%h exp=%h", x, y, {cout, s}, exp_sum);
    end
    // Mechanism coverage, derived from the operands alone.
    lo = 17'(x[2:0]) + 17'(y[2:0]);
    if (lo[3]) n_c2++;
    lo = 17'(x[3:0]) + 17'(y[3:0]);
    if (lo[4]) n_c3++;
    // c4 = 1 and bits 5..11 all propagate, so c12 comes from the anchor.
    lo = 17'(x[4:0]) + 17'(y[4:0]);
    if (lo[5] && (x[11:5] ^ y[11:5]) == 7'h7F) n_anchor++;
    lo = 17'(x[12:0]) + 17'(y[12:0]);
    if (lo[13]) n_iv_1++; else n_iv_0++;
    if (exp_sum[16]) n_cout++;
    if (x[0] & y[0] && (x[15:1] ^ y[15:1]) == 15'h7FFF) n_full_chain++;
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else
      $display("mechanism %-28s %0d", what, n);
  endtask

  initial begin
    // Depth rule of acyclic adders: 8, 10, 12, ... 24 levels for 8, 16, 32,
    // ... 2048 bits.
    for (int k = 0; k < 9; k++) begin
      checks++;
      if (paa_pkg::paa_depth_protocol(8 << k) != 8 + 2 * k) begin
        failures++;
        $display("FAIL depth rule at %0d bits", 8 << k);
      end
    end

    // Worked example from the text.
    apply(16'b0000000110101100, 16'b0000000010010100);
    checks++;
    if (s !== 16'b0000001001000000) failures++;

    apply(16'h0000, 16'h0000);
    apply(16'hFFFF, 16'hFFFF);
    apply(16'hFFFF, 16'h0001);
    apply(16'h7FFF, 16'h0001);
    apply(16'h8000, 16'h8000);
    apply(16'hAAAA, 16'h5555);
    apply(16'hAAAB, 16'h5555);
    for (int i = 0; i < 16; i++) begin
      apply(16'hFFFF >> i, 16'd1);
      apply(16'(1 << i), 16'(1 << i));
    end

    for (int i = 0; i < 65536; i++) begin
      logic [7:0] x, y;
      {x, y} = 16'(i);
      apply({8'h00, x}, {8'h00, y});
      apply({x, 8'hFF}, {y, 8'h01});
      apply({4'h0, x, 4'hF}, {4'hF, y, 4'h1});
    end

    for (int i = 0; i < 20000000; i++)
      apply(16'($urandom), 16'($urandom));

    need("carry out of bits 0..2", n_c2);
    need("ripple carry into bit 4", n_c3);
    need("anchor c4 -> c12", n_anchor);
    need("interval, carry in 0", n_iv_0);
    need("interval, carry in 1", n_iv_1);
    need("carry out of the word", n_cout);
    need("carry bit 0 -> bit 15", n_full_chain);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
