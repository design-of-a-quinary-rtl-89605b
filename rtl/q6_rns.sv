// q6_rns: 6-digit quinary to RNS {23, 24, 25} converter (top level).
//
// Input: N = 3125*n6 + 625*n5 + 125*n4 + 25*n3 + 5*n2 + n1, six quinary
// digits. The RNS {23, 24, 25} represents 0..13799 (quinary 000000..420144)
// uniquely; larger inputs (up to 444444 = 15624) are still converted to their
// correct residues, which then repeat those of N - 13800.
// Output: x2 x1 = N mod 25, x4 x3 = N mod 24, x6 x5 = N mod 23, two quinary
// digits per residue, high digit first.
//
// Multi-level conversion: the number is split as n6 00000 + n5 0000 + n4 n3 n2 n1.
//   level 1: q4_rns converts the low four digits (itself q3_rns + qdigit4_rns
//            + one modular adder per channel);
//   level 2: qdigit_rns (POS = 4) converts n5*625 and two modular adders add
//            it in the mod-24 and mod-23 channels;
//   level 3: qdigit_rns (POS = 5) converts n6*3125 and two more modular
//            adders add it.
// 625 and 3125 are multiples of 25, so the mod-25 channel is the two lowest
// input digits throughout. No carry crosses between channels.
// Purely combinational: the converter holds no state, needs no clock, and its
// outputs settle one combinational delay after the inputs change.
module q6_rns
  import quin_pkg::*;
(
  input  qdig_t n1, n2, n3, n4, n5, n6,  // quinary digits, n1 least significant
  output qdig_t x1, x2,                  // N mod 25 = 5*x2 + x1
  output qdig_t x3, x4,                  // N mod 24 = 5*x4 + x3
  output qdig_t x5, x6                   // N mod 23 = 5*x6 + x5
);
  qdig_t a3, a4, a5, a6;   // level 1: residues of the low four digits
  qdig_t d3, d4, d5, d6;   // residues of n5*625
  qdig_t e3, e4, e5, e6;   // residues of n6*3125
  qdig_t b3, b4, b5, b6;   // level 2 sums
  logic  w24_l2_unused, w23_l2_unused, w24_l3_unused, w23_l3_unused;

  // Level 1.
  q4_rns u_q4 (
    .n1(n1), .n2(n2), .n3(n3), .n4(n4),
    .x1(x1), .x2(x2), .x3(a3), .x4(a4), .x5(a5), .x6(a6)
  );

  // Level 2: fifth digit.
  qdigit_rns #(.POS(4)) u_d5 (.n(n5), .x3(d3), .x4(d4), .x5(d5), .x6(d6));
  qmod_add #(.M(MOD_B)) u_add24_l2 (
    .a_hi(a4), .a_lo(a3), .b_hi(d4), .b_lo(d3),
    .s_hi(b4), .s_lo(b3), .wrap(w24_l2_unused)
  );
  qmod_add #(.M(MOD_A)) u_add23_l2 (
    .a_hi(a6), .a_lo(a5), .b_hi(d6), .b_lo(d5),
    .s_hi(b6), .s_lo(b5), .wrap(w23_l2_unused)
  );

  // Level 3: sixth digit.
  qdigit_rns #(.POS(5)) u_d6 (.n(n6), .x3(e3), .x4(e4), .x5(e5), .x6(e6));
  qmod_add #(.M(MOD_B)) u_add24_l3 (
    .a_hi(b4), .a_lo(b3), .b_hi(e4), .b_lo(e3),
    .s_hi(x4), .s_lo(x3), .wrap(w24_l3_unused)
  );
  qmod_add #(.M(MOD_A)) u_add23_l3 (
    .a_hi(b6), .a_lo(b5), .b_hi(e6), .b_lo(e5),
    .s_hi(x6), .s_lo(x5), .wrap(w23_l3_unused)
  );
endmodule
