// quin_pkg: types and constants shared by the quinary-to-RNS converter.
//
// A quinary (radix-5) digit takes the values 0..4. The converter is written as
// ordinary two-valued logic, so each quinary digit travels on a 3-bit bus that
// carries the digit value in binary (codes 5..7 never occur on a valid input).
// The residue number system (RNS) used throughout is the moduli set
// {5^n-2, 5^n-1, 5^n} with n = 2, that is {23, 24, 25}. Every residue is below
// 25, so it is written as two quinary digits: residue = 5*hi + lo.
package quin_pkg;

  // One quinary digit, binary coded (0..4).
  typedef logic [2:0] qdig_t;

  // Largest digit value and the radix.
  localparam int unsigned QMAX  = 4;
  localparam int unsigned RADIX = 5;

  // The three moduli, 5^2-2, 5^2-1 and 5^2. Their product, 13800, is the
  // dynamic range: 0..13799, quinary 420144, six quinary digits.
  localparam int unsigned MOD_A = 23;
  localparam int unsigned MOD_B = 24;
  localparam int unsigned MOD_C = 25;

  // 5^pos mod m, evaluated at elaboration time.
  function automatic int unsigned pow5_mod(int unsigned pos, int unsigned m);
    int unsigned r;
    r = 1 % m;
    for (int unsigned i = 0; i < pos; i++) r = (r * RADIX) % m;
    return r;
  endfunction

endpackage
