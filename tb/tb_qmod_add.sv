// tb_qmod_add: exhaustive self-checking test of the modular residue adder.
// Instances for M = 23, 24 and 25; every pair of residues a, b < M is added and
// the result compared with (a+b) mod M, and wrap with a+b >= M. Includes the
// two worked additions of the 4-digit example: 32+32 -> 21 (mod 23) and
// 24+40 -> 20 (mod 24), all in quinary.
module tb_qmod_add;
  import quin_pkg::*;
  qdig_t ah, al, bh, bl;
  qdig_t sh[3], sl[3];
  logic  wrap[3];
  int unsigned checks = 0, failures = 0;

  qmod_add #(.M(23)) dut23 (.a_hi(ah), .a_lo(al), .b_hi(bh), .b_lo(bl), .s_hi(sh[0]), .s_lo(sl[0]), .wrap(wrap[0]));
  qmod_add #(.M(24)) dut24 (.a_hi(ah), .a_lo(al), .b_hi(bh), .b_lo(bl), .s_hi(sh[1]), .s_lo(sl[1]), .wrap(wrap[1]));
  qmod_add #(.M(25)) dut25 (.a_hi(ah), .a_lo(al), .b_hi(bh), .b_lo(bl), .s_hi(sh[2]), .s_lo(sl[2]), .wrap(wrap[2]));

  task automatic apply(int a, int b);
    ah = 3'(a / 5); al = 3'(a % 5); bh = 3'(b / 5); bl = 3'(b % 5);
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
    for (int k = 0; k < 3; k++) begin
      int m;
      m = 23 + k;
      for (int a = 0; a < m; a++)
        for (int b = 0; b < m; b++) begin
          apply(a, b);
          checks++;
          if (int'(sh[k]) * 5 + int'(sl[k]) != (a + b) % m || int'(wrap[k]) != int'(a + b >= m)) begin
            failures++;
            $display("FAIL M=%0d %0d+%0d: got %0d%0d wrap=%0d", m, a, b, sh[k], sl[k], wrap[k]);
          end
        end
    end
    // Worked example: quinary 32 + 32 = 21 (mod 23), 24 + 40 = 20 (mod 24).
    apply(17, 17);
    checks++;
    if (!(sh[0] == 3'd2 && sl[0] == 3'd1)) begin failures++; $display("FAIL 32+32 mod 23"); end
    apply(14, 20);
    checks++;
    if (!(sh[1] == 3'd2 && sl[1] == 3'd0)) begin failures++; $display("FAIL 24+40 mod 24"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
