// paa_carry_andor: transitive-carry cell in AND-OR form.
//
// c_out = g | (p & c_in). One AND, then one OR: two elements, and c_in reaches
// c_out through two levels. p may be the OR condition a | b or the XOR a ^ b.
// Both give the same carry, because g = a & b covers the case where they
// differ. The lookahead tree uses this cell, with (G, T) of a group in place
// of (g, p). Purely combinational.
module paa_carry_andor (
  input  logic g,
  input  logic p,
  input  logic c_in,
  output logic c_out
);
  logic pc;

  always_comb begin
    pc    = p & c_in;
    c_out = g | pc;
  end
endmodule
