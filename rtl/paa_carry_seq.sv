// paa_carry_seq: sequential transitive-carry chain.
//
// Bit i of the chain computes c[i] = t[i] & (g[i] | c[i-1]), where c[-1] is
// c_in, with one OR-AND cell (paa_carry_orand) per bit. For N = 2 these are
// the four elements of the two-bit sequential structure. Each bit adds two
// levels, so the chain is short in elements but its depth grows linearly.
// The acyclic adder therefore uses it only for its low bits.
//
// Inputs:  g[i] = a[i] & b[i], t[i] = a[i] | b[i], c_in is the carry into bit 0.
// Outputs: c[i], the carry out of bit i. Purely combinational.
module paa_carry_seq #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] t,
  input  logic         c_in,
  output logic [N-1:0] c
);
  logic [N:0] chain;

  assign chain[0] = c_in;

  for (genvar i = 0; i < N; i++) begin : g_bit
    paa_carry_orand u_cell (
      .g    (g[i]),
      .t    (t[i]),
      .c_in (chain[i]),
      .c_out(chain[i+1])
    );
  end

  assign c = chain[N:1];
endmodule
