// tb_qdigit_rns: self-checking test of the higher-digit converter.
// Instances for POS = 3 (weight 125), 4 (weight 625) and 5 (weight 3125). For
// every digit 0..4 the outputs must equal n*5^POS mod 24 and mod 23, worked out
// here with integer arithmetic.
module tb_qdigit_rns;
  import quin_pkg::*;
  qdig_t n;
  qdig_t x3[3], x4[3], x5[3], x6[3];
  int unsigned checks = 0, failures = 0;
  int weight[3] = '{125, 625, 3125};

  qdigit_rns #(.POS(3)) dut3 (.n(n), .x3(x3[0]), .x4(x4[0]), .x5(x5[0]), .x6(x6[0]));
  qdigit_rns #(.POS(4)) dut4 (.n(n), .x3(x3[1]), .x4(x4[1]), .x5(x5[1]), .x6(x6[1]));
  qdigit_rns #(.POS(5)) dut5 (.n(n), .x3(x3[2]), .x4(x4[2]), .x5(x5[2]), .x6(x6[2]));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) begin
      n = 3'(i);
      #1;
      for (int k = 0; k < 3; k++) begin
        int v;
        v = weight[k] * i;
        checks++;
        if (int'(x4[k]) * 5 + int'(x3[k]) != v % 24 || int'(x6[k]) * 5 + int'(x5[k]) != v % 23) begin
          failures++;
          $display("FAIL weight %0d n=%0d: got %0d%0d %0d%0d", weight[k], i, x6[k], x5[k], x4[k], x3[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
