// paa_mux2: the "2 in 1" multiplexer element.
//
// y = sel ? d1 : d0, written as (sel & d1) | (~sel & d0): an inverter, two ANDs
// and an OR. The select reaches the output through three levels and the data
// inputs through two. Purely combinational.
module paa_mux2 (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic y
);
  logic sel_n, t1, t0;

  always_comb begin
    sel_n = ~sel;
    t1    = sel & d1;
    t0    = sel_n & d0;
    y     = t1 | t0;
  end
endmodule
