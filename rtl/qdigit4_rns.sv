// qdigit4_rns: converter of the 4th quinary digit (weight 125) to RNS {23, 24, 25}.
//
// Input n4 (0..4) stands for the number n4*125 (quinary n4 0 0 0). Its residues:
//   mod 25: 0                    (not an output: all-zero digits)
//   mod 24: 125 = 5*24 + 5       -> 5*n4, digits x4 = n4, x3 = 0 (x3 not an output)
//   mod 23: 125 = 5*23 + 10      -> 10*n4 mod 23, quinary "2*n4 0" folded mod 23
// For the modulus 23 a quinary half adder forms n4 + n4 as digit x6 with carry
// c; the carry stands for 25 = 2 (mod 23), so a second half adder forms c + c as
// the low digit x5. For n4 = 0..4 this gives 00, 20, 40, 12, 32 (x6 x5), that
// is 0, 10, 20, 7, 17. The two-half-adder structure and x4 = n4, x6 = n4 + n4
// follow the published 4th-digit converter; feeding the carry to both inputs
// of the second half adder is read from the conversion table of n4*125.
// Purely combinational.
module qdigit4_rns
  import quin_pkg::*;
(
  input  qdig_t n4,   // 4th quinary digit, 0..4
  output qdig_t x4,   // high digit of n4*125 mod 24 (low digit is 0)
  output qdig_t x5,   // low digit of n4*125 mod 23
  output qdig_t x6    // high digit of n4*125 mod 23
);
  logic c, c_unused;

  assign x4 = n4;
  qha u_ha_hi (.a(n4), .b(n4), .s(x6), .c(c));
  qha u_ha_lo (.a({2'b00, c}), .b({2'b00, c}), .s(x5), .c(c_unused));
endmodule
