// qdigit_rns: converter of one higher-order quinary digit to RNS {23, 24, 25}.
//
// Input n (0..4) stands for the number n * 5^POS, POS >= 2 (POS = 4 for the 5th
// digit, weight 625; POS = 5 for the 6th digit, weight 3125). Because 5^POS is
// a multiple of 25 its residue modulo 25 is always 0 and is not an output. The
// residues modulo 24 and 23 are n * (5^POS mod m) mod m, written as two quinary
// digits each. With only five possible inputs this is a five-entry table per
// modulus, filled at elaboration time from the weights (codes 5..7 read 0).
//   POS = 4: 625 = 1 (mod 24), 4 (mod 23);  POS = 5: 3125 = 5 (mod 24), 20 (mod 23).
// Extending the converter to 5 and 6 digits by adding the residues of
// n5*625 and n6*3125 follows the published scheme; the inside of these two
// digit converters is this design's own (the simplest table that does it).
// Purely combinational.
module qdigit_rns
  import quin_pkg::*;
#(
  parameter int unsigned POS = 4  // digit position: weight 5^POS
) (
  input  qdig_t n,    // quinary digit, 0..4
  output qdig_t x3,   // low digit of n*5^POS mod 24
  output qdig_t x4,   // high digit of n*5^POS mod 24
  output qdig_t x5,   // low digit of n*5^POS mod 23
  output qdig_t x6    // high digit of n*5^POS mod 23
);
  // Five-entry tables, one 5-bit residue per digit value: entry d holds
  // d * (5^POS mod m) mod m.
  function automatic logic [24:0] residue_table(int unsigned m);
    logic [24:0] t;
    int unsigned w;
    w = pow5_mod(POS, m);
    for (int unsigned d = 0; d <= QMAX; d++) t[5*d +: 5] = 5'((d * w) % m);
    return t;
  endfunction

  localparam logic [24:0] T24 = residue_table(MOD_B);
  localparam logic [24:0] T23 = residue_table(MOD_A);

  if (POS < 2) begin : g_bad_pos
    $error("qdigit_rns: POS must be at least 2");
  end

  logic [4:0] r24, r23;  // residues, 0..23 and 0..22

  always_comb begin
    r24 = (n <= 3'(QMAX)) ? T24[5*n +: 5] : '0;
    r23 = (n <= 3'(QMAX)) ? T23[5*n +: 5] : '0;
    x4  = 3'(r24 / 5'(RADIX));
    x3  = 3'(r24 % 5'(RADIX));
    x6  = 3'(r23 / 5'(RADIX));
    x5  = 3'(r23 % 5'(RADIX));
  end
endmodule
