// tb_qfa: exhaustive self-checking test of the quinary full adder.
// Drives every digit pair 0..4 with carry-in 0 and 1 and compares with the
// integer sum split into a base-5 digit and a carry.
module tb_qfa;
  import quin_pkg::*;
  qdig_t a, b, s;
  logic  ci, co;
  int unsigned checks = 0, failures = 0;

  qfa dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        for (int k = 0; k < 2; k++) begin
          a = 3'(i); b = 3'(j); ci = 1'(k);
          #1;
          checks++;
          if (int'(s) != (i + j + k) % 5 || int'(co) != (i + j + k) / 5) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: got s=%0d co=%0d", i, j, k, s, co);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
