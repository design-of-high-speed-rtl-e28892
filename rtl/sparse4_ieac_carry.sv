// Sparse-4 inverted-end-around-carry (IEAC) computation unit for n = 16.
//
// A diminished-1 modulo 2^16+1 addition of two non-zero operands is an IEAC
// addition: S* = A* + B* + cin mod 2^16, where the carry into bit 0 is the
// inverse of the carry out. Feeding the carry out back through an inverter
// would form a combinational loop; instead the carries are resolved as
//   c(-1) = ~G(15:0)
//   c(i)  = G(i:0) | T(i:0) & ~G(15:i+1)        (i = 3, 7, 11)
// with G the group generate and T = ~K the group transmit. The second form
// follows from the inverted circular idempotency of the prefix operator:
// the end-around term needs only the generate of the bits above i. It is
// evaluated inside the ordinary log2(16) prefix levels by letting the
// higher groups "wrap around" below bit 0 with inverted operands. For
// inverted operands the transmit of a group is Gbar and its generate is
// ~(G | T) = Gbar & K, both formed from the signals the even stage already
// produces. Only the four carries at the 4-bit
// group boundaries are formed (sparse-4); the carry-select blocks do the rest.
//
// Stages (stage 0 is the preprocessing, outside this module):
//   1 (odd):  odd_dot at every odd bit, pairs of bits        -> (G, Kbar)
//   2 (even): even_dot at bits 3, 7, 11, 15, 4-bit groups    -> (Gbar, K)
//   3 (odd):  odd_dot, group j with group j-1 (group 0 takes
//             group 3 wrapped around); one odd_semidot for the
//             end-around term needed by group 3                -> (G, Kbar)
//   4 (even): even_semidot, forms the four group carries    -> inverted
// Odd and even cells alternate, so an edge between consecutive stages needs
// no inverter. The edges that break the alternation (the wrapped group 3
// in stage 3, the inverted-generate terms in stage 4) carry an inverter;
// the wrapped generate of group 3 needs a NAND2 in place of one of them.
// The alternation rule, the four cell types and the five stages follow the
// design; the exact wiring of the wrap-around terms is this implementation's
// own derivation, checked against the carry equations above.
//
// Outputs: carry0 is the true carry into bit 0; carry_n[j] is the inverted
// carry into group j (bit 4j), j = 1..3, as the even semi-dot cells give it.
// Purely combinational; depth is one prefix level per stage.
module sparse4_ieac_carry
  import mod2n1_pkg::*;
(
  input  logic [N-1:0]        gn,       // inverted bit generates  ~(a&b)
  input  logic [N-1:0]        k,        // bit kills               ~(a|b)
  output logic                carry0,   // carry into group 0 (true polarity)
  output logic [NGROUP-1:1]   carry_n   // carries into groups 1..3, inverted
);

  // Stage 1: two-bit spans at the odd bit positions, true polarity.
  logic [N/2-1:0]    g1, kn1;
  // Stage 2: four-bit group terms, complemented polarity.
  logic [NGROUP-1:0] gn2, k2;
  // Stage 3: eight-bit circular spans, true polarity.
  logic [NGROUP-1:0] g3, kn3;
  logic              x3;      // G(3:0) | T(3:0) & ~G(15:12)
  // Inverters on the edges that join stages of the same parity.
  logic              gt2_3, g2_3;         // G3 | T3, G3
  logic              g3n_2, g3n_3;        // ~g3[2], ~g3[3]

  for (genvar i = 0; i < N/2; i++) begin : g_stage1
    odd_dot u_dot (
      .gn_hi(gn[2*i+1]), .k_hi(k[2*i+1]),
      .gn_lo(gn[2*i]),   .k_lo(k[2*i]),
      .g(g1[i]), .kn(kn1[i])
    );
  end

  for (genvar j = 0; j < NGROUP; j++) begin : g_stage2
    even_dot u_dot (
      .g_hi(g1[2*j+1]), .kn_hi(kn1[2*j+1]),
      .g_lo(g1[2*j]),   .kn_lo(kn1[2*j]),
      .gn(gn2[j]), .k(k2[j])
    );
  end

  // Group 3 wrapped around below bit 0 acts with inverted operands, whose
  // (generate, transmit) pair is (Gbar3 & K3, Gbar3); the odd cell wants it
  // complemented, i.e. (G3 | T3, G3).
  always_comb begin
    gt2_3 = ~(gn2[3] & k2[3]);
    g2_3  = ~gn2[3];
  end

  odd_dot u_s3_wrap (
    .gn_hi(gn2[0]), .k_hi(k2[0]),
    .gn_lo(gt2_3),  .k_lo(g2_3),
    .g(g3[0]), .kn(kn3[0])
  );

  for (genvar j = 1; j < NGROUP; j++) begin : g_stage3
    odd_dot u_dot (
      .gn_hi(gn2[j]),   .k_hi(k2[j]),
      .gn_lo(gn2[j-1]), .k_lo(k2[j-1]),
      .g(g3[j]), .kn(kn3[j])
    );
  end

  // End-around term for group 3: G0 | T0 & ~G3.
  odd_semidot u_s3_semi (
    .gn_hi(gn2[0]), .k_hi(k2[0]), .gn_lo(g2_3),
    .c(x3)
  );

  always_comb begin
    g3n_2 = ~g3[2];
    g3n_3 = ~g3[3];
  end

  // Stage 4.
  // carry into bit 0: ~G(15:0) = ~(G(15:8) | T(15:8) & G(7:0))
  even_semidot u_s4_c0 (.g_hi(g3[3]), .kn_hi(kn3[3]), .g_lo(g3[1]), .cn(carry0));
  // ~c3  = ~(G(3:0) | T(3:0)Gbar(15:12)K(15:12) | T(3:0)Gbar(15:12) & ~G(11:4))
  even_semidot u_s4_c1 (.g_hi(g3[0]), .kn_hi(kn3[0]), .g_lo(g3n_2), .cn(carry_n[1]));
  // ~c7  = ~(G(7:0) | T(7:0) & ~G(15:8))
  even_semidot u_s4_c2 (.g_hi(g3[1]), .kn_hi(kn3[1]), .g_lo(g3n_3), .cn(carry_n[2]));
  // ~c11 = ~(G(11:4) | T(11:4) & (G(3:0) | T(3:0) & ~G(15:12)))
  even_semidot u_s4_c3 (.g_hi(g3[2]), .kn_hi(kn3[2]), .g_lo(x3),    .cn(carry_n[3]));

endmodule
