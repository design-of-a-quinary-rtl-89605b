// qmod_fix: modular correction of a two-digit quinary sum (M = 23, 24 or 25).
//
// The input is a sum S = 25*cin + 5*in_hi + in_lo of two residues modulo M, so
// S <= 2*(M-1). When S >= M the output is S - M, otherwise S. The subtraction
// is done the way the converter's "Comparator 3" (M = 24) and "Comparator 4"
// (M = 23) do it: the sum is detected as too large when the carry cin is set or
// when the two digits read 4-4 (M = 24) or 4-3 / 4-4 (M = 23); the constant
// K = 25 - M is then added to the two digits and the carry out of the high
// digit is dropped, which removes 25 and leaves S + K - 25 = S - M.
// Built from two quinary half adders. Purely combinational. fire reports that
// the correction was applied (S >= M).
module qmod_fix
  import quin_pkg::*;
#(
  parameter int unsigned M = 24  // modulus, 21..25
) (
  input  qdig_t in_hi,   // high digit of the sum
  input  qdig_t in_lo,   // low digit of the sum
  input  logic  cin,     // carry out of the high digit, weight 25
  output qdig_t out_hi,  // high digit of S mod M
  output qdig_t out_lo,  // low digit of S mod M
  output logic  fire     // 1 when S >= M
);
  localparam int unsigned K = MOD_C - M;  // constant added on overflow

  if (M > MOD_C || M < 21) begin : g_bad_m
    $error("qmod_fix: M must lie in 21..25");
  end

  qdig_t k_add;
  logic  c_lo;
  logic  c_hi_unused;

  // Sum reaches M: either it overflowed 44 (carry) or its digits are 4-x with
  // x >= M - 20.
  always_comb begin
    fire  = cin || ((in_hi == 3'(QMAX)) && ({1'b0, in_lo} >= 4'(M - 20)) && (M < MOD_C));
    k_add = fire ? 3'(K) : '0;
  end

  qha u_lo (.a(in_lo), .b(k_add), .s(out_lo), .c(c_lo));
  // The carry out of the high digit is the 25 that the correction removes.
  qha u_hi (.a(in_hi), .b({2'b00, c_lo}), .s(out_hi), .c(c_hi_unused));
endmodule
