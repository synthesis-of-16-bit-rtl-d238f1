// paa16: 16-bit parallel acyclic adder (PAA).
//
// Adds two 16-bit binary codes, with no carry in, giving a 16-bit sum and the
// carry out. It is purely combinational and built only from 2-input AND, OR
// and inverter elements. An XOR counts as four elements, three levels deep,
// and a "2 in 1" multiplexer as an inverter, two ANDs and an OR. The longest
// path from an input to a sum bit is 10 elements, the depth the original design
// gives for its 16-bit acyclic adder. The carry out is 9 deep.
//
// A sum bit s[i] = h[i] ^ c[i-1] ends in a 3-level XOR. For a depth of 10
// every carry c[i-1] must therefore be ready at level 7. The depth budget is
// fixed first, and the bits are then split by how their carry can meet it:
//   * bits 0..4, sequential. Bits 0..2 are a 3-bit adder with Ling-style
//     neighbour-bit carry (paa_adder3). Its carry out c2 leaves at level 5.
//     Bit 3 is a full adder (paa_full_adder) whose ripple carry c3 is at
//     level 7. Bit 4 is a single XOR of h4 with c3.
//   * bits 5..12, parallel, with an XOR as the last element. An anchor
//     carry c4 = G[4:0] comes from a 5-bit lookahead tree (paa_group_gen) at
//     level 5. Each carry c5..c12 joins a group term of bits 5..k to it with
//     one AND-OR cell: c[k] = G[k:5] | T[k:5] & c4. The group terms span at
//     most 8 bits and are ready by level 6, so every carry is ready at 7.
//   * bits 13..15, one interval (paa_interval). Each bit is formed by two
//     XORs and one MUX, with the interval carry c12 as the select.
// The carry out is G[15:13] | T[15:13] & c12.
//
// Taken from the original design: the width, the depth of 10, the low bits
// computed sequentially and the rest in parallel, the transitive-carry cells,
// and the XOR/MUX structures for neighbouring bits and for an interval. The
// exact split, the anchoring on c4 and the lookahead trees are this design's
// own. The original circuit has 221 elements (XOR 15, AND 80, OR 61,
// inverters 20); this one has 240 (AND 131, OR 74, inverters 35), with
// identical gates counted once.
//
// Ports: a, b: addends; s: a + b modulo 2^16; cout: carry out of bit 15.
module paa16
  import paa_pkg::*;
(
  input  logic [PAA_WIDTH-1:0] a,
  input  logic [PAA_WIDTH-1:0] b,
  output logic [PAA_WIDTH-1:0] s,
  output logic                 cout
);
  logic [PAA_WIDTH-1:0] g, t, h;
  logic [PAA_WIDTH-1:0] c;            // c[k]: carry out of bit k
  logic fa_g, fa_p, fa_k;
  carry_status_e fa_status;

  // Per-bit generate, carry condition and half sum. h is the 4-element XOR
  // of a and b, sharing its AND and OR with g and t.
  always_comb begin
    g = a & b;
    t = a | b;
    h = t & ~g;
  end

  // ---- sequential part: bits 0..4 --------------------------------------
  assign c[0] = g[0];
  assign c[1] = t[1] & (g[1] | g[0]);

  paa_adder3 u_low3 (
    .a   (a[2:0]),
    .b   (b[2:0]),
    .s   (s[2:0]),
    .cout(c[2])
  );

  paa_full_adder #(.MUX_CARRY(1'b0)) u_bit3 (
    .a     (a[3]),
    .b     (b[3]),
    .cin   (c[2]),
    .s     (s[3]),
    .cout  (c[3]),
    .g     (fa_g),
    .p     (fa_p),
    .k     (fa_k),
    .status(fa_status)
  );

  paa_xor2 u_bit4 (.a(h[4]), .b(c[3]), .y(s[4]));

  // ---- parallel part: anchor carry c4 from a lookahead tree -------------
  logic anc_t;
  paa_group_gen #(.N(ANCHOR + 1)) u_anchor (
    .g (g[ANCHOR:0]),
    .t (t[ANCHOR:0]),
    .gg(c[ANCHOR]),
    .tt(anc_t)
  );

  // ---- parallel part: carries c5..c12 joined to the anchor c4 ------------
  for (genvar k = ANCHOR + 1; k < IV_LO; k++) begin : g_join
    localparam int unsigned SPAN = k - ANCHOR;
    logic grp_g, grp_t;
    paa_group_gen #(.N(SPAN)) u_grp (
      .g (g[k:ANCHOR+1]),
      .t (t[k:ANCHOR+1]),
      .gg(grp_g),
      .tt(grp_t)
    );
    paa_carry_andor u_join (.g(grp_g), .p(grp_t), .c_in(c[ANCHOR]), .c_out(c[k]));
  end

  // ---- parallel part: bits 5..12, XOR in the last level ---------------
  for (genvar i = MID_LO; i < IV_LO; i++) begin : g_mid
    paa_xor2 u_sum (.a(h[i]), .b(c[i-1]), .y(s[i]));
  end

  // ---- parallel part: interval of bits 13..15 -----------------------
  paa_interval #(.N(IV_BITS)) u_iv (
    .g   (g[IV_LO +: IV_BITS]),
    .t   (t[IV_LO +: IV_BITS]),
    .h   (h[IV_LO +: IV_BITS]),
    .c_in(c[IV_LO-1]),
    .s   (s[IV_LO +: IV_BITS])
  );

  // ---- carry out ----------------------------------------------------
  logic top_g, top_t;
  paa_group_gen #(.N(IV_BITS)) u_top_grp (
    .g (g[PAA_WIDTH-1:IV_LO]),
    .t (t[PAA_WIDTH-1:IV_LO]),
    .gg(top_g),
    .tt(top_t)
  );
  paa_carry_andor u_cout (.g(top_g), .p(top_t), .c_in(c[IV_LO-1]), .c_out(c[PAA_WIDTH-1]));
  assign cout = c[PAA_WIDTH-1];

  // The partition must tile the word and match the depth rule.
  initial begin
    assert (SEQ_BITS == MID_LO && ANCHOR < MID_LO &&
            IV_LO + IV_BITS == PAA_WIDTH)
      else $error("bit partition does not cover the word");
    assert (paa_depth_protocol(PAA_WIDTH) == PAA_DEPTH)
      else $error("depth budget differs from the depth protocol");
  end
endmodule
