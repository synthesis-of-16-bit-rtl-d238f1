// paa_carry_orand: transitive-carry cell in OR-AND form.
//
// c_out = t & (g | c_in) with t = a | b (the carry condition) and g = a & b.
// This equals g | t & c_in because g implies t. One OR, then one AND: two
// elements and two levels from c_in. When cells are chained, the g | c term of
// the next bit can absorb the carry, which keeps a ripple chain short in
// elements. Purely combinational.
module paa_carry_orand (
  input  logic g,
  input  logic t,
  input  logic c_in,
  output logic c_out
);
  logic gc;

  always_comb begin
    gc    = g | c_in;
    c_out = t & gc;
  end
endmodule
