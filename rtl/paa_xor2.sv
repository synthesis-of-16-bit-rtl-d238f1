// paa_xor2: 2-input XOR element built from four 2-input elements.
//
// y = (a | b) & ~(a & b): one OR, one AND, one inverter and a second AND.
// That is four elements, three levels deep, the cost the adder's depth and
// complexity figures use for an XOR. Purely combinational.
module paa_xor2 (
  input  logic a,
  input  logic b,
  output logic y
);
  logic any, both, not_both;

  always_comb begin
    any      = a | b;
    both     = a & b;
    not_both = ~both;
    y        = any & not_both;
  end
endmodule
