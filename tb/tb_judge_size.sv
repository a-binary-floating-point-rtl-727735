// tb_judge_size - exhaustive self-checking test of the exponent comparison.
// For every pair of 8-bit exponents the smaller-exponent operand must get the
// shift min(|e1-e2|, 26), the other 0, and e_big must be the larger exponent.
module tb_judge_size;
  logic clk = 1'b0;
  logic [7:0] e1, e2, e_big;
  logic [4:0] sh1, sh2;
  int checks = 0, failures = 0;

  judge_size dut (.e1, .e2, .sh1, .sh2, .e_big);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (65536 + 100) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, x1, x2;
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        e1 = 8'(a); e2 = 8'(b);
        @(negedge clk);
        d  = (a > b) ? a - b : b - a;
        if (d > 26) d = 26;
        x1 = (b > a) ? d : 0;
        x2 = (a > b) ? d : 0;
        checks++;
        if (int'(sh1) != x1 || int'(sh2) != x2 || int'(e_big) != ((a > b) ? a : b)) begin
          failures++;
          if (failures < 10) $display("FAIL e1=%0d e2=%0d -> %0d %0d %0d", a, b, sh1, sh2, e_big);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
