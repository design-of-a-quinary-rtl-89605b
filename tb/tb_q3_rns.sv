// tb_q3_rns: self-checking test of the 3-digit quinary to RNS converter.
// Applies all 125 inputs 000..444 and compares the three residues with N mod 25,
// N mod 24 and N mod 23 worked out with integer arithmetic. Then replays the
// rows of the published 3-digit conversion table (decimal value and expected
// x6..x1) and the worked example 86 = quinary 321 -> 32 24 21. Counts how often
// the fold of 4-4 in the low digit pair and a wrap in each channel occur.
module tb_q3_rns;
  import quin_pkg::*;
  qdig_t n1, n2, n3, x1, x2, x3, x4, x5, x6;
  int unsigned checks = 0, failures = 0;
  int unsigned n_fold = 0, n_wrap24 = 0, n_wrap23 = 0;

  // Published table rows: decimal, x6, x5, x4, x3, x2, x1.
  localparam int NROWS = 35;
  int tab[NROWS][7] = '{
    '{0,0,0,0,0,0,0},   '{1,0,1,0,1,0,1},   '{2,0,2,0,2,0,2},   '{3,0,3,0,3,0,3},
    '{4,0,4,0,4,0,4},   '{5,1,0,1,0,1,0},   '{6,1,1,1,1,1,1},   '{7,1,2,1,2,1,2},
    '{8,1,3,1,3,1,3},   '{30,1,2,1,1,1,0},  '{31,1,3,1,2,1,1},  '{32,1,4,1,3,1,2},
    '{33,2,0,1,4,1,3},  '{54,1,3,1,1,0,4},  '{55,1,4,1,2,1,0},  '{56,2,0,1,3,1,1},
    '{57,2,1,1,4,1,2},  '{58,2,2,2,0,1,3},  '{79,2,0,1,2,0,4},  '{80,2,1,1,3,1,0},
    '{81,2,2,1,4,1,1},  '{82,2,3,2,0,1,2},  '{83,2,4,2,1,1,3},  '{84,3,0,2,2,1,4},
    '{85,3,1,2,3,2,0},  '{86,3,2,2,4,2,1},  '{117,0,2,4,1,3,2}, '{118,0,3,4,2,3,3},
    '{119,0,4,4,3,3,4}, '{120,1,0,0,0,4,0}, '{121,1,1,0,1,4,1}, '{122,1,2,0,2,4,2},
    '{123,1,3,0,3,4,3}, '{124,1,4,0,4,4,4}, '{86,3,2,2,4,2,1}
  };

  q3_rns dut (.n1(n1), .n2(n2), .n3(n3), .x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5), .x6(x6));

  task automatic apply(int v);
    n3 = 3'(v / 25); n2 = 3'((v / 5) % 5); n1 = 3'(v % 5);
    #1;
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 125; v++) begin
      int low;
      apply(v);
      low = v % 25;
      if (low == 24) n_fold++;
      if (low % 24 + v / 25 >= 24) n_wrap24++;
      if (v % 24 + v / 25 + ((low + v / 25) >= 24 ? 1 : 0) >= 23) n_wrap23++;
      checks++;
      if (int'(x2) * 5 + int'(x1) != v % 25 ||
          int'(x4) * 5 + int'(x3) != v % 24 ||
          int'(x6) * 5 + int'(x5) != v % 23) begin
        failures++;
        $display("FAIL N=%0d: got %0d%0d %0d%0d %0d%0d", v, x6, x5, x4, x3, x2, x1);
      end
    end
    for (int r = 0; r < NROWS; r++) begin
      apply(tab[r][0]);
      checks++;
      if (int'(x6) != tab[r][1] || int'(x5) != tab[r][2] || int'(x4) != tab[r][3] ||
          int'(x3) != tab[r][4] || int'(x2) != tab[r][5] || int'(x1) != tab[r][6]) begin
        failures++;
        $display("FAIL table row %0d: got %0d%0d %0d%0d %0d%0d", tab[r][0], x6, x5, x4, x3, x2, x1);
      end
    end
    $display("events: fold44=%0d wrap24=%0d wrap23=%0d", n_fold, n_wrap24, n_wrap23);
    checks++;
    if (n_fold == 0 || n_wrap24 == 0 || n_wrap23 == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
