// qmod_add: adder of two residues modulo M, each given as two quinary digits.
//
// The low digits go through a quinary half adder, the high digits and its
// carry through a quinary full adder, and the two-digit result with its carry
// (at most 2*(M-1)) through the modular correction qmod_fix, which brings it
// back into 0..M-1. This is the per-channel adder that combines the residues of
// two parts of a quinary number with no carry passed between channels.
// wrap reports that the correction fired. Purely combinational.
module qmod_add
  import quin_pkg::*;
#(
  parameter int unsigned M = 24  // modulus: 23, 24 or 25
) (
  input  qdig_t a_hi, a_lo,  // first residue, 5*a_hi + a_lo < M
  input  qdig_t b_hi, b_lo,  // second residue, 5*b_hi + b_lo < M
  output qdig_t s_hi, s_lo,  // (a + b) mod M
  output logic  wrap         // 1 when a + b >= M
);
  qdig_t lo, hi;
  logic  c_lo, c_hi;

  qha u_ha (.a(a_lo), .b(b_lo), .s(lo), .c(c_lo));
  qfa u_fa (.a(a_hi), .b(b_hi), .ci(c_lo), .s(hi), .co(c_hi));
  qmod_fix #(.M(M)) u_fix (
    .in_hi(hi), .in_lo(lo), .cin(c_hi),
    .out_hi(s_hi), .out_lo(s_lo), .fire(wrap)
  );
endmodule
