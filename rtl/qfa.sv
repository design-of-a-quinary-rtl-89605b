// qfa: quinary full adder.
//
// Adds two quinary digits a and b (0..4) and a carry-in ci (0 or 1). The sum
// digit s is (a+b+ci) mod 5 and the carry-out co is 1 when a+b+ci >= 5 (the
// total never exceeds 9, so one carry bit is enough). Purely combinational.
// This is the "Quin. F.A" element of the converter schematics; the binary-coded
// inside is this design's own choice.
module qfa
  import quin_pkg::*;
(
  input  qdig_t a,   // addend digit, 0..4
  input  qdig_t b,   // addend digit, 0..4
  input  logic  ci,  // carry-in, weight 1
  output qdig_t s,   // sum digit
  output logic  co   // carry-out, weight 5
);
  logic [3:0] t;

  always_comb begin
    t  = {1'b0, a} + {1'b0, b} + {3'b000, ci};
    co = (t >= 4'(RADIX));
    s  = co ? 3'(t - 4'(RADIX)) : t[2:0];
  end
endmodule
