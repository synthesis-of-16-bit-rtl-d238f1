// paa_group_gen: parallel group generate/propagate over a span of N bits.
//
// gg = 1 when the span produces a carry out with no carry in:
//   gg = g[N-1] | t[N-1] & g[N-2] | ... | t[N-1]...t[1] & g[0]
// tt = t[N-1] & ... & t[0] is 1 when a carry into the span passes through it.
// Feed t[0] in place of g[0] and gg becomes the carry out for a carry in of 1.
// paa_interval uses that for its second candidate carry.
//
// The span is a binary tree. A node of m bits is split into an upper part of
// K = paa_pkg::gg_split(m) bits and a lower part of m-K bits, and the parts are
// joined by the AND-OR carry cell: G = G_hi | T_hi & G_lo, T = T_hi & T_lo.
// The Fibonacci-like split keeps the G path shallow. The G output is
// paa_pkg::gg_depth(N) levels deep: 4 levels for 5 bits, 5 for 8, 6 for 13,
// 7 for 16. The 2N-1 nodes are laid out flat in preorder (see
// paa_pkg::gg_node), so the tree is built with one generate loop and no
// recursive instantiation. This lookahead network is this design's own: the
// document only says that the upper bits of the adder are computed in
// parallel. Purely combinational.
module paa_group_gen
  import paa_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] t,
  output logic         gg,
  output logic         tt
);
  localparam int unsigned NODES = 2 * N - 1;

  logic [NODES-1:0] ng, nt;   // group generate / propagate of every node

  for (genvar id = 0; id < NODES; id++) begin : g_node
    localparam int unsigned SPAN = gg_node(N, id, 1'b0);
    localparam int unsigned LO   = gg_node(N, id, 1'b1);
    if (SPAN == 1) begin : g_leaf
      assign ng[id] = g[LO];
      assign nt[id] = t[LO];
    end else begin : g_join
      localparam int unsigned K  = gg_split(SPAN);
      localparam int unsigned HI_ID = id + 1;
      localparam int unsigned LO_ID = id + 2 * K;
      paa_carry_andor u_join (
        .g    (ng[HI_ID]),
        .p    (nt[HI_ID]),
        .c_in (ng[LO_ID]),
        .c_out(ng[id])
      );
      assign nt[id] = nt[HI_ID] & nt[LO_ID];
    end
  end

  assign gg = ng[0];
  assign tt = nt[0];
endmodule
