// ppa_prefix_adder: N-bit parallel prefix adder, the kind of circuit the
// acyclic adder paa16 is compared with.
//
// Each bit forms g = a & b, t = a | b and the half sum h = t & ~g. A prefix
// network of ppa_stages(TOPO, N) stages then turns the per-bit (g, t) into
// the carry out of every bit i..0. At each stage, bit i either passes its
// (G, P) pair on, or combines it with the pair of a lower node
// j = ppa_src(TOPO, N, stage, i): G = G_i | P_i & G_j through an AND-OR
// carry cell, and P = P_i & P_j. The sum is s[0] = h[0] and
// s[i] = h[i] ^ G[i-1], and cout = G[N-1]. There is no carry in.
//
// TOPO picks the textbook network (see paa_pkg::prefix_topo_e): Kogge-Stone,
// Knowles, Sklansky, Han-Carlson, Ladner-Fischer or Brent-Kung. The networks
// are the standard ones. The element model (XOR as four elements, no carry
// in, P taken as a | b) is the same as in paa16, so the depths compare
// directly. The Ling variant is not built.
//
// Interface: a[N-1:0], b[N-1:0] in; s[N-1:0], cout out. N is a power of two,
// at least 4. Purely combinational; the depth in 2-input elements is
// paa_pkg::ppa_depth(TOPO, N), 11 for Kogge-Stone at N = 16.
module ppa_prefix_adder
  import paa_pkg::*;
#(
  parameter int           N    = 16,
  parameter prefix_topo_e TOPO = PT_KOGGE_STONE
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);
  localparam int S = ppa_stages(TOPO, N);

  initial begin
    assert (N >= 4 && (1 << ppa_log2(N)) == N && N <= PPA_MAX)
      else $error("ppa_prefix_adder: N=%0d must be a power of two from 4 to %0d", N, PPA_MAX);
    assert (ppa_covers(TOPO, N))
      else $error("ppa_prefix_adder: network %s leaves a carry incomplete", TOPO.name());
  end

  logic [N-1:0] g, t, h;
  logic [N-1:0] gs [S+1];
  logic [N-1:0] ps [S+1];

  always_comb begin
    g = a & b;
    t = a | b;
    h = t & ~g;
  end

  assign gs[0] = g;
  assign ps[0] = t;

  for (genvar st = 0; st < S; st++) begin : g_stage
    for (genvar i = 0; i < N; i++) begin : g_bit
      localparam int J = ppa_src(TOPO, N, st, i);
      if (J >= 0) begin : g_cell
        paa_carry_andor u_cell (
          .g(gs[st][i]), .p(ps[st][i]), .c_in(gs[st][J]), .c_out(gs[st+1][i])
        );
        assign ps[st+1][i] = ps[st][i] & ps[st][J];
      end else begin : g_pass
        assign gs[st+1][i] = gs[st][i];
        assign ps[st+1][i] = ps[st][i];
      end
    end
  end

  assign s[0] = h[0];
  for (genvar i = 1; i < N; i++) begin : g_sum
    paa_xor2 u_sum (.a(h[i]), .b(gs[S][i-1]), .y(s[i]));
  end
  assign cout = gs[S][N-1];
endmodule
