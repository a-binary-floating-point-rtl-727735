// tb_unpack - self-checking test of operand unpacking.
// Random single-precision words (a quarter with exponent field 0) and both
// values of sub; expects the fields, the restored hidden 1, zero significand
// for a zero exponent field, and the second sign inverted when sub = 1.
module tb_unpack;
  localparam int NV = 5000;
  logic clk = 1'b0;
  logic [31:0] in1, in2;
  logic sub, s1, s2;
  logic [7:0] e1, e2;
  logic [23:0] m1, m2;
  int checks = 0, failures = 0;

  unpack dut (.in1, .in2, .sub, .s1, .s2, .e1, .e2, .m1, .m2);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NV; n++) begin
      in1 = $urandom; in2 = $urandom; sub = 1'($urandom);
      if ($urandom % 4 == 0) in1[30:23] = '0;
      if ($urandom % 4 == 0) in2[30:23] = '0;
      @(negedge clk);
      checks++;
      if (s1 != in1[31] || s2 != (in2[31] ^ sub) || e1 != in1[30:23] || e2 != in2[30:23] ||
          m1 != ((in1[30:23] == 0) ? 24'd0 : {1'b1, in1[22:0]}) ||
          m2 != ((in2[30:23] == 0) ? 24'd0 : {1'b1, in2[22:0]})) begin
        failures++;
        if (failures < 10) $display("FAIL %h %h sub=%b", in1, in2, sub);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
