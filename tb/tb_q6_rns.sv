// tb_q6_rns: end-to-end self-checking test of the 6-digit quinary to RNS
// converter, run with the design at its default (and only) configuration.
//
// Applies every 6-digit quinary input 000000..444444 (0..15624) and compares
// the three residues with N mod 25, N mod 24 and N mod 23 worked out with
// integer arithmetic. Over the dynamic range 0..13799 (quinary 000000..420144)
// it also checks that no two inputs give the same residue triple, i.e. that
// the RNS representation produced is unique. Worked examples 86, 500, 586 and
// the range limits are replayed with expected digits written out.
//
// Every mechanism of the converter is counted and must occur at least once:
// the 4-4 fold of comparator 1, the two corrections inside the 3-digit
// converter, the carry of the 4th-digit converter, and the wrap of the mod-24
// and mod-23 adders at each of the three conversion levels. The conditions
// are derived from the input value alone.
module tb_q6_rns;
  import quin_pkg::*;
  qdig_t n1, n2, n3, n4, n5, n6, x1, x2, x3, x4, x5, x6;
  int unsigned checks = 0, failures = 0;
  bit seen[13800];

  typedef enum int {
    EV_FOLD44, EV_Q3_WRAP24, EV_Q3_WRAP23, EV_D4_CARRY,
    EV_L1_WRAP24, EV_L1_WRAP23, EV_L2_WRAP24, EV_L2_WRAP23,
    EV_L3_WRAP24, EV_L3_WRAP23, EV_COUNT
  } event_e;
  int unsigned ev[EV_COUNT];
  string ev_name[EV_COUNT] = '{
    "fold44", "q3_wrap24", "q3_wrap23", "digit4_carry",
    "level1_wrap24", "level1_wrap23", "level2_wrap24", "level2_wrap23",
    "level3_wrap24", "level3_wrap23"
  };

  q6_rns dut (.n1(n1), .n2(n2), .n3(n3), .n4(n4), .n5(n5), .n6(n6),
              .x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5), .x6(x6));

  task automatic apply(int v);
    n6 = 3'(v / 3125); n5 = 3'((v / 625) % 5); n4 = 3'((v / 125) % 5);
    n3 = 3'((v / 25) % 5); n2 = 3'((v / 5) % 5); n1 = 3'(v % 5);
    #1;
  endtask

  // Expect the six output digits, given high to low as x6 x5 x4 x3 x2 x1.
  task automatic expect_digits(int v, int d6, int d5, int d4, int d3, int d2, int d1);
    apply(v);
    checks++;
    if (int'(x6) != d6 || int'(x5) != d5 || int'(x4) != d4 ||
        int'(x3) != d3 || int'(x2) != d2 || int'(x1) != d1) begin
      failures++;
      $display("FAIL example N=%0d: got %0d%0d %0d%0d %0d%0d", v, x6, x5, x4, x3, x2, x1);
    end
  endtask

  // Count the mechanisms that input v exercises.
  function automatic void count_events(int v);
    int low, n3v, v3, v4, v5;
    low = v % 25; n3v = (v / 25) % 5;
    v3 = v % 125; v4 = v % 625; v5 = v % 3125;
    if (low == 24) ev[EV_FOLD44]++;
    if (low % 24 + n3v >= 24) ev[EV_Q3_WRAP24]++;
    if (v3 % 24 + n3v + ((low + n3v) >= 24 ? 1 : 0) >= 23) ev[EV_Q3_WRAP23]++;
    if ((v / 125) % 5 >= 3) ev[EV_D4_CARRY]++;
    if (v3 % 24 + (v4 - v3) % 24 >= 24) ev[EV_L1_WRAP24]++;
    if (v3 % 23 + (v4 - v3) % 23 >= 23) ev[EV_L1_WRAP23]++;
    if (v4 % 24 + (v5 - v4) % 24 >= 24) ev[EV_L2_WRAP24]++;
    if (v4 % 23 + (v5 - v4) % 23 >= 23) ev[EV_L2_WRAP23]++;
    if (v5 % 24 + (v - v5) % 24 >= 24) ev[EV_L3_WRAP24]++;
    if (v5 % 23 + (v - v5) % 23 >= 23) ev[EV_L3_WRAP23]++;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 15625; v++) begin
      int r25, r24, r23, key;
      apply(v);
      count_events(v);
      r25 = int'(x2) * 5 + int'(x1);
      r24 = int'(x4) * 5 + int'(x3);
      r23 = int'(x6) * 5 + int'(x5);
      checks++;
      if (r25 != v % 25 || r24 != v % 24 || r23 != v % 23) begin
        failures++;
        if (failures < 20)
          $display("FAIL N=%0d: got %0d%0d %0d%0d %0d%0d", v, x6, x5, x4, x3, x2, x1);
      end
      if (v < 13800 && r25 < 25 && r24 < 24 && r23 < 23) begin
        key = (r23 * 24 + r24) * 25 + r25;
        checks++;
        if (seen[key]) begin
          failures++;
          $display("FAIL N=%0d repeats an earlier residue triple", v);
        end
        seen[key] = 1'b1;
      end
    end

    // Worked examples and range limits (expected digits x6 x5 x4 x3 x2 x1).
    expect_digits(86,    3, 2, 2, 4, 2, 1);  // quinary 321
    expect_digits(500,   3, 2, 4, 0, 0, 0);  // quinary 4000
    expect_digits(586,   2, 1, 2, 0, 2, 1);  // quinary 4321
    expect_digits(13799, 4, 2, 4, 3, 4, 4);  // quinary 420144, top of the range
    expect_digits(13800, 0, 0, 0, 0, 0, 0);  // quinary 420200 wraps to 0
    expect_digits(15624, 1, 2, 0, 0, 4, 4);  // quinary 444444

    foreach (ev[i]) begin
      $display("event %-14s %0d", ev_name[i], ev[i]);
      checks++;
      if (ev[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", ev_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
