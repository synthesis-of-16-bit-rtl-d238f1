// tb_paa_full_adder: checks both constructions of the 1-bit full adder
// (AND-OR carry and multiplexer carry) against the 1-bit truth table,
// including the carry status column (kill / propagate / generate) and the
// G, P, K terms.
module tb_paa_full_adder;
  import paa_pkg::*;
  logic a, b, cin;
  logic s0, co0, g0, p0, k0, s1, co1, g1, p1, k1;
  carry_status_e st0, st1;
  int checks = 0, failures = 0;

  paa_full_adder dut_andor (.a(a), .b(b), .cin(cin), .s(s0), .cout(co0),
                            .g(g0), .p(p0), .k(k0), .status(st0));
  paa_full_adder #(.MUX_CARRY(1'b1)) dut_mux (.a(a), .b(b), .cin(cin), .s(s1), .cout(co1),
                            .g(g1), .p(p1), .k(k1), .status(st1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%b b=%b cin=%b got=%b exp=%b", what, a, b, cin, got, exp);
    end
  endtask

  initial begin
    // Truth table rows {A,B,Cin} -> Cout, S, status.
    logic          tab_cout [8];
    logic          tab_s    [8];
    carry_status_e tab_st   [8];
    tab_cout = '{0, 0, 0, 1, 0, 1, 1, 1};
    tab_s    = '{0, 1, 1, 0, 1, 0, 0, 1};
    tab_st   = '{CS_KILL, CS_KILL, CS_PROPAGATE, CS_PROPAGATE,
                 CS_PROPAGATE, CS_PROPAGATE, CS_GENERATE, CS_GENERATE};
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      check("s andor",    s0,  tab_s[i]);
      check("cout andor", co0, tab_cout[i]);
      check("s mux",      s1,  tab_s[i]);
      check("cout mux",   co1, tab_cout[i]);
      check("status andor", st0 == tab_st[i], 1'b1);
      check("status mux",   st1 == tab_st[i], 1'b1);
      check("g", g0, tab_st[i] == CS_GENERATE);
      check("p", p0, tab_st[i] == CS_PROPAGATE);
      check("k", k0, tab_st[i] == CS_KILL);
      check("g mux", g1, g0);
      check("p mux", p1, p0);
      check("k mux", k1, k0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
