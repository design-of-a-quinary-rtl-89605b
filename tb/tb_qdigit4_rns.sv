// tb_qdigit4_rns: self-checking test of the 4th-digit converter.
// For n4 = 0..4 the outputs must equal the residues of n4*125 modulo 24 (high
// digit; the low digit is 0) and modulo 23, and also the five rows of the
// conversion table of n4 000 (listed below as tab_x6, tab_x5, tab_x4).
module tb_qdigit4_rns;
  import quin_pkg::*;
  qdig_t n4, x4, x5, x6;
  int unsigned checks = 0, failures = 0;
  // Rows of the n4 000 table: {x6, x5, x4} per n4.
  int tab_x6[5] = '{0, 2, 4, 1, 3};
  int tab_x5[5] = '{0, 0, 0, 2, 2};
  int tab_x4[5] = '{0, 1, 2, 3, 4};

  qdigit4_rns dut (.n4(n4), .x4(x4), .x5(x5), .x6(x6));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) begin
      int v;
      n4 = 3'(i);
      #1;
      v = 125 * i;
      checks++;
      if (int'(x4) * 5 != v % 24 || int'(x6) * 5 + int'(x5) != v % 23) begin
        failures++;
        $display("FAIL n4=%0d: got x6x5=%0d%0d x4=%0d", i, x6, x5, x4);
      end
      checks++;
      if (int'(x6) != tab_x6[i] || int'(x5) != tab_x5[i] || int'(x4) != tab_x4[i]) begin
        failures++;
        $display("FAIL table row n4=%0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
