// tb_qcmp: exhaustive self-checking test of the pattern comparator.
// Two instances: the default pattern 4-4 and a 4-3 pattern. Every digit pair
// 0..4 is applied; a match must give 0-0 with carry 1, anything else must pass
// through with carry 0.
module tb_qcmp;
  import quin_pkg::*;
  qdig_t hi, lo, oh44, ol44, oh43, ol43;
  logic  c44, c43;
  int unsigned checks = 0, failures = 0;

  qcmp                       dut44 (.in_hi(hi), .in_lo(lo), .out_hi(oh44), .out_lo(ol44), .c(c44));
  qcmp #(.P_HI(4), .P_LO(3)) dut43 (.in_hi(hi), .in_lo(lo), .out_hi(oh43), .out_lo(ol43), .c(c43));

  task automatic expect_pair(int ph, int pl, qdig_t oh, qdig_t ol, logic c);
    bit m;
    m = (int'(hi) == ph) && (int'(lo) == pl);
    checks++;
    if (c != m || oh != (m ? 3'd0 : hi) || ol != (m ? 3'd0 : lo)) begin
      failures++;
      $display("FAIL pattern %0d%0d input %0d%0d: got %0d%0d c=%0d", ph, pl, hi, lo, oh, ol, c);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) begin
        hi = 3'(i); lo = 3'(j);
        #1;
        expect_pair(4, 4, oh44, ol44, c44);
        expect_pair(4, 3, oh43, ol43, c43);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
