// paa_adder3: 3-bit adder with Ling-style carry for neighbouring bits.
//
// A 3-bit adder with no carry in. Its sums use XOR and "2 in 1" multiplexer
// elements:
//   s0 = a0 ^ b0
//   s1 = g0 ? ~h1 : h1                       (the carry into bit 1 is g0)
//   s2 = H1 ? (h2 ^ t1) : h2,  H1 = g1 | g0  (Ling pseudo-carry)
// Here g = a & b, t = a | b and h = a ^ b. The real carry into bit 2 is
// c1 = t1 & H1, so the sum of bit 2 is h2 when H1 = 0 and h2 ^ t1 when H1 = 1.
// The multiplexer therefore waits for the one-level H1, not for c1. This
// matches the published sum-of-products equations for S0, S1 and S2.
// cout, the carry out of bit 2, comes from the two-bit sequential OR-AND chain
// (paa_carry_seq, N = 2) started at g0. The sums are 8 levels deep and cout
// 5. cout is this design's addition: the original design's equations stop at S2,
// and the 16-bit adder needs the carry. Purely combinational.
module paa_adder3 (
  input  logic [2:0] a,
  input  logic [2:0] b,
  output logic [2:0] s,
  output logic       cout
);
  logic [2:0] g, t, h;
  logic       h1_n, ling_h1, h2_t1;
  logic [1:0] c12;

  always_comb begin
    g = a & b;
    t = a | b;
    h = t & ~g;                 // the 4-element XOR of a and b, sharing g and t
  end

  assign s[0] = h[0];

  assign h1_n = ~h[1];
  paa_mux2 u_s1 (.sel(g[0]), .d0(h[1]), .d1(h1_n), .y(s[1]));

  assign ling_h1 = g[1] | g[0];
  paa_xor2 u_x2 (.a(h[2]), .b(t[1]), .y(h2_t1));
  paa_mux2 u_s2 (.sel(ling_h1), .d0(h[2]), .d1(h2_t1), .y(s[2]));

  paa_carry_seq #(.N(2)) u_carry (
    .g   (g[2:1]),
    .t   (t[2:1]),
    .c_in(g[0]),
    .c   (c12)
  );
  assign cout = c12[1];
endmodule
