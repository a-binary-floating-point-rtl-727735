// tb_r_shifter - self-checking test of the alignment right shifter.
// Random 24-bit significands with every shift 0..26; the expected 50-bit
// output is the significand times 2^(26-sh), computed as an integer.
module tb_r_shifter;
  localparam int NV = 300;
  logic clk = 1'b0;
  logic [23:0] m;
  logic [4:0] sh;
  logic [49:0] q;
  int checks = 0, failures = 0;

  r_shifter dut (.m, .sh, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NV * 27 + 100) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expv;
    for (int n = 0; n < NV; n++)
      for (int s = 0; s <= 26; s++) begin
        m = 24'($urandom) | 24'h800000; sh = 5'(s);
        @(negedge clk);
        expv = longint'(m) * (longint'(1) << (26 - s));
        checks++;
        if (longint'(q) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL m=%h sh=%0d -> %h", m, s, q);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
