// tb_exp_adder - exhaustive self-checking test of the result-exponent adder.
//
// Every larger exponent 0..255, every shift 0..28 and both rounding carries
// are applied; expected e_res = e_big + 1 - sh + rnd_ovf as a signed integer.
module tb_exp_adder;
  logic clk = 1'b0;
  logic [7:0] e_big;
  logic [5:0] sh;
  logic rnd_ovf;
  logic signed [9:0] e_res;
  int checks = 0, failures = 0;

  exp_adder dut (.e_big, .sh, .rnd_ovf, .e_res);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (256 * 29 * 2 + 100) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 256; e++)
      for (int s = 0; s <= 28; s++)
        for (int r = 0; r < 2; r++) begin
          e_big = 8'(e); sh = 6'(s); rnd_ovf = 1'(r);
          @(negedge clk);
          checks++;
          if (int'(e_res) != e + 1 - s + r) begin
            failures++;
            if (failures < 10) $display("FAIL e=%0d sh=%0d r=%0d -> %0d", e, s, r, e_res);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
