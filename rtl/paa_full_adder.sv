// paa_full_adder: 1-bit full adder with its carry status.
//
//   G = A & B          (carry generated)
//   P = A ^ B          (carry propagated)
//   K = ~A & ~B        (carry killed)
//   S = P ^ Cin
//   Cout = G | P & Cin
//
// MUX_CARRY selects one of two constructions:
//   0: two 4-element XORs. The first XOR's internal A & B is reused as G, and
//      Cout comes from the AND-OR carry cell. 4 + 4 + 2 = 10 elements.
//   1: the same two XORs, with Cout = P ? Cin : A from one "2 in 1"
//      multiplexer element. That is 9 elements when the multiplexer counts as one.
// Both constructions and the equations follow the original design. status reports
// kill / generate / propagate as a carry_status_e. Purely combinational.
module paa_full_adder
  import paa_pkg::*;
#(
  parameter bit MUX_CARRY = 1'b0
) (
  input  logic          a,
  input  logic          b,
  input  logic          cin,
  output logic          s,
  output logic          cout,
  output logic          g,
  output logic          p,
  output logic          k,
  output carry_status_e status
);
  logic any;

  // First XOR, sharing A & B as the generate term.
  always_comb begin
    any = a | b;
    g   = a & b;
    p   = any & ~g;
    k   = ~any;
  end

  paa_xor2 u_sum (.a(p), .b(cin), .y(s));

  if (MUX_CARRY) begin : g_mux
    paa_mux2 u_cmux (.sel(p), .d0(a), .d1(cin), .y(cout));
  end else begin : g_andor
    paa_carry_andor u_carry (.g(g), .p(p), .c_in(cin), .c_out(cout));
  end

  always_comb begin
    if (g)      status = CS_GENERATE;
    else if (p) status = CS_PROPAGATE;
    else        status = CS_KILL;
  end

  // The three statuses are mutually exclusive and cover every input pair.
  always_comb begin
    assert (((g ? 2'd1 : 2'd0) + (p ? 2'd1 : 2'd0) + (k ? 2'd1 : 2'd0)) == 2'd1)
      else $error("carry status not one-hot: g=%b p=%b k=%b", g, p, k);
  end

endmodule
