// qha: quinary half adder.
//
// Adds two quinary digits a and b (0..4 each). The sum digit s is (a+b) mod 5
// and the carry c is 1 when a+b >= 5. Purely combinational, no clock.
// This is the "Quin. H.A" element of the converter schematics; its inside (a
// binary add followed by a subtract-5 when the sum reaches the radix) is this
// design's own choice, since only the element's function is defined.
module qha
  import quin_pkg::*;
(
  input  qdig_t a,  // addend digit, 0..4
  input  qdig_t b,  // addend digit, 0..4
  output qdig_t s,  // sum digit, (a+b) mod 5
  output logic  c   // carry, weight 5
);
  logic [3:0] t;

  always_comb begin
    t = {1'b0, a} + {1'b0, b};
    c = (t >= 4'(RADIX));
    s = c ? 3'(t - 4'(RADIX)) : t[2:0];
  end
endmodule
