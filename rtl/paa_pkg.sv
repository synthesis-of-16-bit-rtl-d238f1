// paa_pkg: types and constants shared by the parallel acyclic adder (PAA).
//
// - carry_status_e: the three carry statuses of one bit position
//   (kill, generate, propagate), as in the truth table of the 1-bit adder.
// - PAA_WIDTH and the interval boundaries of the 16-bit adder.
// - paa_depth_protocol(): the depth rule of the acyclic adder, counted in
//   2-input elements. An 8-bit adder is 8 elements deep, and each doubling of
//   the width adds 2 (8 -> 8, 16 -> 10, 32 -> 12, ...).
// - gg_split()/gg_depth(): pick how paa_group_gen splits a span of bits.
//   They minimise the depth of the group-generate tree with a small dynamic
//   programme. The AND-OR combining cell (G = Ghi | Thi & Glo) costs two levels
//   on the G path and one on the T path. Which split to use is this design's
//   own choice: the original design does not give the lookahead network.
// - gg_node(): span and lowest bit of each node of that tree, laid out flat
//   in preorder, so paa_group_gen can build it with one generate loop.
// - prefix_topo_e and the ppa_*() functions: the textbook prefix networks
//   the acyclic adder is compared with (Kogge-Stone, Knowles, Sklansky,
//   Han-Carlson, Ladner-Fischer, Brent-Kung). ppa_src() says, for each stage
//   and bit, which lower node the bit is combined with (or -1: no cell).
//   ppa_covers() checks that the network gives every bit its full carry,
//   and ppa_depth() counts the adder's depth in 2-input elements with the
//   same element model as the acyclic adder.
package paa_pkg;

  localparam int unsigned PAA_WIDTH = 16;

  // Bit partition of the 16-bit adder:
  //   bits 0..4   sequential: ripple carry (3-bit neighbour-bit adder, then a
  //               full adder and a final XOR);
  //   bits 5..12  parallel, XOR in the last level: s[i] = h[i] ^ c[i-1]. Their
  //               carries c5..c12 are group terms joined to the anchor carry
  //               c4 = G[4:0], itself from a lookahead tree;
  //   bits 13..15 one interval of two XORs and one MUX per bit, selected by c12.
  localparam int unsigned SEQ_BITS  = 5;
  localparam int unsigned MID_LO    = 5;
  localparam int unsigned ANCHOR    = 4;   // carry the middle bits join
  localparam int unsigned IV_LO     = 13;
  localparam int unsigned IV_BITS   = 3;

  // Depth in 2-input elements of the designed 16-bit adder. It equals
  // paa_depth_protocol(16).
  localparam int unsigned PAA_DEPTH = 10;

  typedef enum logic [1:0] {
    CS_KILL      = 2'd0,
    CS_GENERATE  = 2'd1,
    CS_PROPAGATE = 2'd2
  } carry_status_e;

  function automatic int unsigned paa_depth_protocol(input int unsigned n);
    int unsigned lg;
    lg = 0;
    while ((32'd1 << lg) < n) lg++;
    return 2 * lg + 2;
  endfunction

  localparam int unsigned GG_MAX = 64;

  // Levels of the G output (dg) and the T output (dt) for the best split of
  // every span 1..n. The split returned is the size of the upper part.
  function automatic int unsigned gg_plan(input int unsigned n, input bit want_split);
    int unsigned dg [GG_MAX+1];
    int unsigned dt [GG_MAX+1];
    int unsigned sp [GG_MAX+1];
    int unsigned cg, ct, m, k;
    dg[1] = 0; dt[1] = 0; sp[1] = 0;
    for (m = 2; m <= n && m <= GG_MAX; m++) begin
      dg[m] = 32'hFFFF; dt[m] = 32'hFFFF; sp[m] = 1;
      for (k = 1; k < m; k++) begin
        cg = ((dt[k] > dg[m-k]) ? dt[k] : dg[m-k]) + 1;
        cg = ((dg[k] > cg) ? dg[k] : cg) + 1;
        ct = ((dt[k] > dt[m-k]) ? dt[k] : dt[m-k]) + 1;
        if (cg < dg[m] || (cg == dg[m] && ct < dt[m])) begin
          dg[m] = cg; dt[m] = ct; sp[m] = k;
        end
      end
    end
    return want_split ? sp[n] : dg[n];
  endfunction

  function automatic int unsigned gg_split(input int unsigned n);
    return gg_plan(n, 1'b1);
  endfunction

  function automatic int unsigned gg_depth(input int unsigned n);
    return gg_plan(n, 1'b0);
  endfunction

  // The tree of a span of n bits is stored in preorder: node 0 is the root,
  // and a node of span m > 1 split as K = gg_split(m) has its upper child
  // (K bits) at id + 1 and its lower child (m - K bits) at id + 2K.
  // gg_node() walks from the root to node id and returns its span
  // (want_lo = 0) or the index of its lowest bit (want_lo = 1).
  function automatic int unsigned gg_node(input int unsigned n, input int unsigned id,
                                          input bit want_lo);
    int unsigned cur, span, lo, k;
    cur = 0; span = n; lo = 0;
    while (cur != id && span > 1) begin
      k = gg_split(span);
      if (id < cur + 2 * k) begin
        cur  = cur + 1;
        lo   = lo + (span - k);
        span = k;
      end else begin
        cur  = cur + 2 * k;
        span = span - k;
      end
    end
    return want_lo ? lo : span;
  endfunction

  // ---------------------------------------------------------------------
  // Prefix adders used for comparison (ppa_prefix_adder).
  // Bit i of stage s is combined with node ppa_src(...) of the same stage
  // as (G, P) = (G_i | P_i & G_j, P_i & P_j), or passed through when -1.
  // Widths are powers of two, at least 4; L = log2(n).
  // ---------------------------------------------------------------------
  typedef enum int {
    PT_KOGGE_STONE    = 0,  // L stages, a cell at every bit >= 2^s
    PT_KNOWLES        = 1,  // Knowles [2,1,..,1]: Kogge-Stone, last stage fanout 2
    PT_SKLANSKY       = 2,  // L stages, divide and conquer, fanout up to n/2
    PT_HAN_CARLSON    = 3,  // Kogge-Stone on the odd bits, then one even stage
    PT_LADNER_FISCHER = 4,  // Sklansky on the odd bits, then one even stage
    PT_BRENT_KUNG     = 5   // 2L-1 stages: up-sweep tree, then down-sweep
  } prefix_topo_e;

  localparam int PPA_MAX = 64;

  function automatic int ppa_log2(input int n);
    int lg;
    lg = 0;
    while ((1 << lg) < n) lg++;
    return lg;
  endfunction

  function automatic int ppa_stages(input prefix_topo_e topo, input int n);
    int lg;
    lg = ppa_log2(n);
    case (topo)
      PT_HAN_CARLSON, PT_LADNER_FISCHER: return lg + 1;
      PT_BRENT_KUNG:                     return 2 * lg - 1;
      default:                           return lg;
    endcase
  endfunction

  // Node that bit i is combined with at stage s, or -1 for no cell.
  function automatic int ppa_src(input prefix_topo_e topo, input int n,
                                 input int s, input int i);
    int lg, d, k;
    lg = ppa_log2(n);
    case (topo)
      PT_KOGGE_STONE:
        return (i >= (1 << s)) ? i - (1 << s) : -1;
      PT_KNOWLES: begin
        if (i < (1 << s)) return -1;
        if (s == lg - 1 && s > 0) return (i - (1 << s)) | 1;
        return i - (1 << s);
      end
      PT_SKLANSKY:
        return i[s] ? (i & ~((2 << s) - 1)) + (1 << s) - 1 : -1;
      PT_HAN_CARLSON: begin
        if (s == 0)  return i[0] ? i - 1 : -1;
        if (s == lg) return (!i[0] && i >= 2) ? i - 1 : -1;
        return (i[0] && i > (1 << s)) ? i - (1 << s) : -1;
      end
      PT_LADNER_FISCHER: begin
        if (s == 0)  return i[0] ? i - 1 : -1;
        if (s == lg) return (!i[0] && i >= 2) ? i - 1 : -1;
        if (!i[0]) return -1;
        k = i >> 1;
        d = s - 1;
        return k[d] ? 2 * ((k & ~((2 << d) - 1)) + (1 << d) - 1) + 1 : -1;
      end
      PT_BRENT_KUNG: begin
        if (s < lg) return ((i + 1) % (2 << s) == 0) ? i - (1 << s) : -1;
        d = 2 * lg - 2 - s;
        return ((i + 1) % (2 << d) == (1 << d) && i >= (2 << d)) ? i - (1 << d) : -1;
      end
      default: return -1;
    endcase
  endfunction

  // 1 when every cell joins two adjacent or overlapping spans and every bit
  // ends with a span reaching bit 0, i.e. its G output is the carry out of
  // bits i..0.
  function automatic bit ppa_covers(input prefix_topo_e topo, input int n);
    int lo [PPA_MAX];
    int nlo [PPA_MAX];
    int j;
    for (int i = 0; i < n; i++) lo[i] = i;
    for (int s = 0; s < ppa_stages(topo, n); s++) begin
      for (int i = 0; i < n; i++) begin
        j = ppa_src(topo, n, s, i);
        nlo[i] = lo[i];
        if (j >= 0) begin
          if (j >= i || j < lo[i] - 1) return 1'b0;
          nlo[i] = (lo[j] < lo[i]) ? lo[j] : lo[i];
        end
      end
      for (int i = 0; i < n; i++) lo[i] = nlo[i];
    end
    for (int i = 0; i < n; i++) if (lo[i] != 0) return 1'b0;
    return 1'b1;
  endfunction

  // Depth of the whole prefix adder in 2-input elements: g and t at level 1,
  // h = t & ~g at 3, each cell adds 2 levels on G (AND then OR) and 1 on P,
  // and each sum is an XOR, 3 levels deep from either input.
  function automatic int ppa_depth(input prefix_topo_e topo, input int n);
    int lg [PPA_MAX];
    int lp [PPA_MAX];
    int ng [PPA_MAX];
    int np [PPA_MAX];
    int j, a, worst;
    for (int i = 0; i < n; i++) begin lg[i] = 1; lp[i] = 1; end
    for (int s = 0; s < ppa_stages(topo, n); s++) begin
      for (int i = 0; i < n; i++) begin
        j = ppa_src(topo, n, s, i);
        ng[i] = lg[i]; np[i] = lp[i];
        if (j >= 0) begin
          a = ((lp[i] > lg[j]) ? lp[i] : lg[j]) + 1;
          ng[i] = ((lg[i] > a) ? lg[i] : a) + 1;
          np[i] = ((lp[i] > lp[j]) ? lp[i] : lp[j]) + 1;
        end
      end
      for (int i = 0; i < n; i++) begin lg[i] = ng[i]; lp[i] = np[i]; end
    end
    worst = 3;
    for (int i = 1; i < n; i++) begin
      a = ((lg[i-1] > 3) ? lg[i-1] : 3) + 3;
      if (a > worst) worst = a;
    end
    if (lg[n-1] > worst) worst = lg[n-1];
    return worst;
  endfunction

endpackage
