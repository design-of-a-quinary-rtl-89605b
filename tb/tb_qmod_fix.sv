// tb_qmod_fix: exhaustive self-checking test of the modular correction.
// Instances for M = 23, 24 and 25. Every sum S = 0..2*(M-1) is applied as
// carry (weight 25) plus two quinary digits; the output must be S mod M and
// fire must be set exactly when S >= M.
module tb_qmod_fix;
  import quin_pkg::*;
  qdig_t hi, lo;
  logic  cin;
  qdig_t oh[3], ol[3];
  logic  fire[3];
  int unsigned checks = 0, failures = 0;

  qmod_fix #(.M(23)) dut23 (.in_hi(hi), .in_lo(lo), .cin(cin), .out_hi(oh[0]), .out_lo(ol[0]), .fire(fire[0]));
  qmod_fix #(.M(24)) dut24 (.in_hi(hi), .in_lo(lo), .cin(cin), .out_hi(oh[1]), .out_lo(ol[1]), .fire(fire[1]));
  qmod_fix #(.M(25)) dut25 (.in_hi(hi), .in_lo(lo), .cin(cin), .out_hi(oh[2]), .out_lo(ol[2]), .fire(fire[2]));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++) begin
      int m;
      m = 23 + k;
      for (int s = 0; s <= 2 * (m - 1); s++) begin
        int r;
        cin = 1'(s / 25); hi = 3'((s % 25) / 5); lo = 3'(s % 5);
        #1;
        r = s % m;
        checks++;
        if (int'(oh[k]) * 5 + int'(ol[k]) != r || int'(fire[k]) != int'(s >= m)) begin
          failures++;
          $display("FAIL M=%0d S=%0d: got %0d%0d fire=%0d", m, s, oh[k], ol[k], fire[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
