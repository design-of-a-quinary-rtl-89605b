// q3_rns: 3-digit quinary to RNS {23, 24, 25} converter.
//
// Input: the quinary number N = 25*n3 + 5*n2 + n1 (0..124, quinary 000..444).
// Output: six quinary digits, two per residue:
//   x2 x1 = N mod 25,  x4 x3 = N mod 24,  x6 x5 = N mod 23   (x_even is the high digit).
//
// How it works. Since 25 = 1 (mod 24) and 25 = 2 (mod 23):
//   N mod 25 = 5*n2 + n1           -> the input digits n2 n1 are x2 x1 unchanged;
//   N mod 24 = (5*n2 + n1 + n3) mod 24;
//   N mod 23 = (5*n2 + n1 + 2*n3) mod 23 = (N mod 24 + n3 + k) mod 23,
// where k = 1 when the mod-24 channel removed 24 (24 = 1 mod 23).
// Comparator 1 (qcmp) folds the pair n2 n1 = 4-4 (24) to 0-0 and raises c1.
// Two quinary half adders add n3 to the folded pair; a modular correction
// (qmod_fix, M = 24) brings sums of 24..27 back into range and reports k24.
// c1 and k24 never fire together (c1 leaves a pair of 0), so k = c1 | k24.
// A quinary full adder then adds n3 and k to the low mod-24 digit and a half
// adder ripples its carry into the high digit; a second modular correction
// (M = 23, the role of Comparator 2) maps sums of 23..28 back into range.
//
// The element chain (comparator, half adders, full adder, comparator) and the
// equations x1 = n1, x2 = n2, x3 = x1 + n3, x4 = x2 + carry follow the
// published 3-digit converter. The two corrections are this design's own:
// without them sums such as 117 (quinary 432) or 120 (quinary 440) leave the
// residue range, and the conversion table those inputs belong to is followed.
// Purely combinational; no clock, no state.
module q3_rns
  import quin_pkg::*;
(
  input  qdig_t n1, n2, n3,          // quinary digits, n1 least significant
  output qdig_t x1, x2,              // N mod 25 = 5*x2 + x1
  output qdig_t x3, x4,              // N mod 24 = 5*x4 + x3
  output qdig_t x5, x6               // N mod 23 = 5*x6 + x5
);
  qdig_t o1, o2;                     // comparator 1 outputs
  logic  c1;                         // comparator 1 fired: 24 removed
  qdig_t w3, w4;                     // raw mod-24 sum digits
  logic  h1, h2;                     // half adder carries
  logic  k24;                        // mod-24 correction fired: 24 removed
  qdig_t v5, v6;                     // raw mod-23 sum digits
  logic  f5, f6;                     // full / half adder carries
  logic  k23_unused;

  // Modulus 25: the two low input digits.
  assign x1 = n1;
  assign x2 = n2;

  // Modulus 24.
  qcmp #(.P_HI(4), .P_LO(4)) u_cmp1 (
    .in_hi(n2), .in_lo(n1), .out_hi(o2), .out_lo(o1), .c(c1)
  );
  qha u_ha3 (.a(o1), .b(n3), .s(w3), .c(h1));
  qha u_ha4 (.a(o2), .b({2'b00, h1}), .s(w4), .c(h2));
  qmod_fix #(.M(MOD_B)) u_fix24 (
    .in_hi(w4), .in_lo(w3), .cin(h2), .out_hi(x4), .out_lo(x3), .fire(k24)
  );

  // Modulus 23: (N mod 24) + n3 + k.
  qfa u_fa5 (.a(x3), .b(n3), .ci(c1 | k24), .s(v5), .co(f5));
  qha u_ha6 (.a(x4), .b({2'b00, f5}), .s(v6), .c(f6));
  qmod_fix #(.M(MOD_A)) u_fix23 (
    .in_hi(v6), .in_lo(v5), .cin(f6), .out_hi(x6), .out_lo(x5), .fire(k23_unused)
  );
endmodule
