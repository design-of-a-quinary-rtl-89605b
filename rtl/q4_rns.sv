// q4_rns: 4-digit quinary to RNS {23, 24, 25} converter.
//
// Input: N = 125*n4 + 25*n3 + 5*n2 + n1 (0..624, quinary 0000..4444).
// Output: x2 x1 = N mod 25, x4 x3 = N mod 24, x6 x5 = N mod 23 (two quinary
// digits per residue, high digit first).
//
// The number is split as n4 000 + 0 n3 n2 n1. The 3-digit converter (q3_rns)
// and the 4th-digit converter (qdigit4_rns) work side by side, and their
// residues are added channel by channel with no carry between channels:
//   modulus 25: the 4th digit contributes 0, so x2 x1 come straight from q3_rns;
//   modulus 24: qmod_add with M = 24 (adds 1 and drops 25 on overflow,
//               the role of Comparator 3);
//   modulus 23: qmod_add with M = 23 (adds 2 and drops 25 on overflow,
//               the role of Comparator 4).
// This is the published 4-digit block diagram; the only difference is that the
// mod-24 adder here is the general one, whose low-digit half adder sees the
// 4th digit's zero low digit and so passes x3 through. Purely combinational.
module q4_rns
  import quin_pkg::*;
(
  input  qdig_t n1, n2, n3, n4,  // quinary digits, n1 least significant
  output qdig_t x1, x2,          // N mod 25 = 5*x2 + x1
  output qdig_t x3, x4,          // N mod 24 = 5*x4 + x3
  output qdig_t x5, x6           // N mod 23 = 5*x6 + x5
);
  qdig_t p3, p4, p5, p6;         // residues of 0 n3 n2 n1
  qdig_t q4, q5, q6;             // residues of n4 0 0 0
  logic  wrap24_unused, wrap23_unused;

  q3_rns u_q3 (
    .n1(n1), .n2(n2), .n3(n3),
    .x1(x1), .x2(x2), .x3(p3), .x4(p4), .x5(p5), .x6(p6)
  );
  qdigit4_rns u_d4 (.n4(n4), .x4(q4), .x5(q5), .x6(q6));

  qmod_add #(.M(MOD_B)) u_add24 (
    .a_hi(p4), .a_lo(p3), .b_hi(q4), .b_lo('0),
    .s_hi(x4), .s_lo(x3), .wrap(wrap24_unused)
  );
  qmod_add #(.M(MOD_A)) u_add23 (
    .a_hi(p6), .a_lo(p5), .b_hi(q6), .b_lo(q5),
    .s_hi(x6), .s_lo(x5), .wrap(wrap23_unused)
  );
endmodule
