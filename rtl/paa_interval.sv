// paa_interval: sum bits of one interval, from two XORs and one MUX per bit.
//
// The interval covers N adjacent bits, with local index m = 0..N-1. c_in is
// the carry into the interval, computed elsewhere in parallel. For every bit
// both possible sums are formed in advance:
//   x0[m] = h[m] ^ G0[m-1:0]   carry into the interval = 0
//   x1[m] = h[m] ^ G1[m-1:0]   carry into the interval = 1
//   s[m]  = c_in ? x1[m] : x0[m]
// G0 is the group generate of the bits below m, and G1 the same with t[0]
// in place of g[0] (paa_group_gen). For m = 0, x0 = h[0] and x1 = ~h[0].
// c_in passes only through the final multiplexer, three levels, so a late
// interval carry costs little depth.
//
// Inputs are the per-bit g = a & b, t = a | b, h = a ^ b of the interval.
// Each bit builds its own lookahead, with no sharing between bits: that is
// this design's choice. The original design names the two-XOR-one-MUX structure for
// an interval but does not draw its lookahead. Purely combinational.
module paa_interval #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] t,
  input  logic [N-1:0] h,
  input  logic         c_in,
  output logic [N-1:0] s
);
  logic [N-1:0] x0, x1;

  assign x0[0] = h[0];
  assign x1[0] = ~h[0];

  for (genvar m = 1; m < N; m++) begin : g_bit
    logic       cg0, cg1, ct0, ct1;
    logic [m-1:0] g1_in;

    if (m == 1) begin : g_one
      assign g1_in = t[0];
    end else begin : g_many
      assign g1_in = {g[m-1:1], t[0]};
    end

    paa_group_gen #(.N(m)) u_g0 (.g(g[m-1:0]), .t(t[m-1:0]), .gg(cg0), .tt(ct0));
    paa_group_gen #(.N(m)) u_g1 (.g(g1_in),    .t(t[m-1:0]), .gg(cg1), .tt(ct1));
    paa_xor2 u_x0 (.a(h[m]), .b(cg0), .y(x0[m]));
    paa_xor2 u_x1 (.a(h[m]), .b(cg1), .y(x1[m]));
  end

  for (genvar m = 0; m < N; m++) begin : g_sel
    paa_mux2 u_mux (.sel(c_in), .d0(x0[m]), .d1(x1[m]), .y(s[m]));
  end
endmodule
