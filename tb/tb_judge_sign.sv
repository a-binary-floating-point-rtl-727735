// tb_judge_sign - exhaustive self-checking test of the result-sign logic.
// Equal operand signs give that sign; different signs give the sign of the
// SD sum (neg).
module tb_judge_sign;
  logic clk = 1'b0;
  logic s1, s2, neg, s;
  int checks = 0, failures = 0;

  judge_sign dut (.s1, .s2, .neg, .s);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s1, s2, neg} = 3'(v);
      @(negedge clk);
      checks++;
      if (s != ((s1 == s2) ? s1 : neg)) begin
        failures++;
        $display("FAIL s1=%b s2=%b neg=%b -> %b", s1, s2, neg, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
