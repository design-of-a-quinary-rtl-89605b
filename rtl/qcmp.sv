// qcmp: two-digit quinary pattern comparator.
//
// Compares the quinary pair (in_hi, in_lo) with the pattern (P_HI, P_LO). On a
// match it outputs the pair 0-0 and raises the carry c; otherwise it passes the
// pair through with c = 0. With the default pattern 4-4 (decimal 24) it folds
// the two low input digits of the 3-digit converter into the range 0..23 and
// hands the removed 24 on as a carry, as the converter's "Comparator 1" does.
// Purely combinational.
module qcmp
  import quin_pkg::*;
#(
  parameter int unsigned P_HI = 4,  // high digit of the pattern
  parameter int unsigned P_LO = 4   // low digit of the pattern
) (
  input  qdig_t in_hi,
  input  qdig_t in_lo,
  output qdig_t out_hi,
  output qdig_t out_lo,
  output logic  c      // 1 when (in_hi, in_lo) == (P_HI, P_LO)
);
  always_comb begin
    c      = (in_hi == 3'(P_HI)) && (in_lo == 3'(P_LO));
    out_hi = c ? '0 : in_hi;
    out_lo = c ? '0 : in_lo;
  end
endmodule
