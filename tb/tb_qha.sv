// tb_qha: exhaustive self-checking test of the quinary half adder.
// Drives every pair of digits 0..4 and compares sum and carry with (a+b) mod 5
// and (a+b) div 5. Combinational: one vector per time unit.
module tb_qha;
  import quin_pkg::*;
  qdig_t a, b, s;
  logic  c;
  int unsigned checks = 0, failures = 0;

  qha dut (.a(a), .b(b), .s(s), .c(c));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) begin
      for (int j = 0; j < 5; j++) begin
        a = 3'(i); b = 3'(j);
        #1;
        checks++;
        if (int'(s) != (i + j) % 5 || int'(c) != (i + j) / 5) begin
          failures++;
          $display("FAIL %0d+%0d: got s=%0d c=%0d", i, j, s, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
