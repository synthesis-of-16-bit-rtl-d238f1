// tb_paa_group_gen: checks the lookahead tree at spans 1, 2, 3, 5, 10 and
// 16. The group generate must equal the carry out of the span's integer sum
// a + b, and the group propagate the AND of a | b. With t[0] fed in place of
// g[0], the generate must equal the carry out of a + b + 1. Spans up to 10
// are checked exhaustively when small, the rest with random operands. The
// planned depth of the tree is checked per span as well.
module tb_paa_group_gen;
  localparam int NS = 6;
  localparam int SPANS [NS] = '{1, 2, 3, 5, 10, 16};
  logic [15:0] a, b, g, t;
  logic [NS-1:0] gg, tt, gg1, tt1;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NS; k++) begin : g_dut
    localparam int N = SPANS[k];
    logic [N-1:0] g1in;
    if (N == 1) begin : g_one
      assign g1in = t[0];
    end else begin : g_many
      assign g1in = {g[N-1:1], t[0]};
    end
    paa_group_gen #(.N(N)) u0 (.g(g[N-1:0]), .t(t[N-1:0]), .gg(gg[k]), .tt(tt[k]));
    paa_group_gen #(.N(N)) u1 (.g(g1in), .t(t[N-1:0]), .gg(gg1[k]), .tt(tt1[k]));
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int k = 0; k < NS; k++) begin
      int n;
      logic [16:0] mask, s0, s1;
      n = SPANS[k];
      mask = 17'((64'd1 << n) - 1);
      s0 = (17'(a) & mask) + (17'(b) & mask);
      s1 = s0 + 17'd1;
      checks += 3;
      if (gg[k] !== s0[n]) begin
        failures++;
        $display("FAIL gg n=%0d a=%h b=%h", n, a, b);
      end
      if (gg1[k] !== s1[n]) begin
        failures++;
        $display("FAIL gg(cin=1) n=%0d a=%h b=%h", n, a, b);
      end
      if (tt[k] !== (((a | b) & mask[15:0]) == mask[15:0])) begin
        failures++;
        $display("FAIL tt n=%0d a=%h b=%h", n, a, b);
      end
    end
  endtask

  initial begin
    // Depth of the G path per span: 1:0 2:2 3:3 4-5:4 6-8:5 9-13:6 14-16:7.
    for (int n = 1; n <= 16; n++) begin
      int exp_d;
      exp_d = (n == 1) ? 0 : (n == 2) ? 2 : (n == 3) ? 3 : (n <= 5) ? 4 :
              (n <= 8) ? 5 : (n <= 13) ? 6 : 7;
      checks++;
      if (paa_pkg::gg_depth(n) != exp_d) begin
        failures++;
        $display("FAIL depth of span %0d: %0d", n, paa_pkg::gg_depth(n));
      end
    end
    // Exhaustive over the low 5 bits of both operands (spans 1..5 complete).
    for (int i = 0; i < 1024; i++) begin
      a = 16'(i & 31); b = 16'(i >> 5);
      g = a & b; t = a | b;
      #1;
      check_all();
    end
    // Long propagate chains with a single generate at the bottom.
    for (int i = 0; i < 16; i++) begin
      a = 16'hFFFF >> i; b = 16'd1;
      g = a & b; t = a | b;
      #1;
      check_all();
    end
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom); b = 16'($urandom);
      g = a & b; t = a | b;
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
