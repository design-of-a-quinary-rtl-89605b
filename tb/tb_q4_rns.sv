// tb_q4_rns: self-checking test of the 4-digit quinary to RNS converter.
// Applies all 625 inputs 0000..4444 and compares with N mod 25, 24 and 23
// worked out with integer arithmetic, then replays the rows of the published
// 4-digit conversion table, including the worked examples 500 = quinary 4000
// -> 32 40 00 and 586 = quinary 4321 -> 21 20 21.
module tb_q4_rns;
  import quin_pkg::*;
  qdig_t n1, n2, n3, n4, x1, x2, x3, x4, x5, x6;
  int unsigned checks = 0, failures = 0;
  int unsigned n_wrap24 = 0, n_wrap23 = 0;

  // Published table rows: decimal, x6, x5, x4, x3, x2, x1.
  localparam int NROWS = 22;
  int tab[NROWS][7] = '{
    '{0,0,0,0,0,0,0},   '{1,0,1,0,1,0,1},   '{2,0,2,0,2,0,2},   '{3,0,3,0,3,0,3},
    '{4,0,4,0,4,0,4},   '{5,1,0,1,0,1,0},   '{6,1,1,1,1,1,1},   '{7,1,2,1,2,1,2},
    '{8,1,3,1,3,1,3},   '{9,1,4,1,4,1,4},   '{10,2,0,2,0,2,0},  '{11,2,1,2,1,2,1},
    '{248,3,3,1,3,4,3}, '{249,3,4,1,4,4,4}, '{250,4,0,2,0,0,0}, '{375,1,2,3,0,0,0},
    '{376,1,3,3,1,0,1}, '{499,3,1,3,4,4,4}, '{500,3,2,4,0,0,0}, '{501,3,3,4,1,0,1},
    '{586,2,1,2,0,2,1}, '{624,0,3,0,0,4,4}
  };

  q4_rns dut (.n1(n1), .n2(n2), .n3(n3), .n4(n4),
              .x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5), .x6(x6));

  task automatic apply(int v);
    n4 = 3'(v / 125); n3 = 3'((v / 25) % 5); n2 = 3'((v / 5) % 5); n1 = 3'(v % 5);
    #1;
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 625; v++) begin
      int lo3, hi;
      apply(v);
      lo3 = v % 125; hi = v - lo3;
      if (lo3 % 24 + hi % 24 >= 24) n_wrap24++;
      if (lo3 % 23 + hi % 23 >= 23) n_wrap23++;
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
    $display("events: level-1 wrap24=%0d wrap23=%0d", n_wrap24, n_wrap23);
    checks++;
    if (n_wrap24 == 0 || n_wrap23 == 0) begin
      failures++;
      $display("FAIL a modular correction was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
