// tb_worked_example - the 8-bit-fraction worked example, stage by stage.
//
// sd_fp_adder is built with an 8-bit fraction and adds
//   A =  2^3 x 1.01000001
//   B = -2^1 x 1.11000111.
// Checked at each stage against hand-computed values:
//   aligned A          1.01000001  R=0 S=0
//   aligned B          0.01110001  R=1 S=1   (shifted right by 2)
//   SD sum value       A - B = 00.11001111 01 (in units of the S digit: 829)
//   binary magnitude   00.11001111 01
//   normalization      one place further left than the two-integer-bit frame
//                      allows for, i.e. a shift of 1 in the usual 1.f frame
//   result             2^2 x 1.10011111 (the tie 1.10011110|1 rounds up)
module tb_worked_example;
  localparam int EXP_W = 8;
  localparam int FRAC_W = 8;
  localparam int W = EXP_W + FRAC_W + 1;
  localparam int SUM_W = FRAC_W + 4;

  logic clk = 1'b0;
  logic [W-1:0] in1, in2, out;
  logic sub;
  int checks = 0, failures = 0;

  sd_fp_adder #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) dut (.in1, .in2, .sub, .out);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, want);
    end
  endtask

  function automatic longint sd_value(logic [2*SUM_W-1:0] z);
    longint r = 0;
    for (int i = SUM_W - 1; i >= 0; i--)
      r = 2 * r + ((z[2*i +: 2] == 2'b01) ? 1 : (z[2*i +: 2] == 2'b11) ? -1 : 0);
    return r;
  endfunction

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in1 = {1'b0, 8'(127 + 3), 8'b01000001};
    in2 = {1'b1, 8'(127 + 1), 8'b11000111};
    sub = 1'b0;
    @(negedge clk);
    expect_eq("aligned A",        longint'(dut.a1), longint'(11'b101000001_0_0));
    expect_eq("aligned B",        longint'(dut.a2), longint'(11'b001110001_1_1));
    expect_eq("SD sum value",     sd_value(dut.z), 829);
    expect_eq("SD sum sign",      longint'(dut.neg), 0);
    expect_eq("binary magnitude", longint'(dut.mag), longint'(12'b00_11001111_01));
    expect_eq("shift (1.f frame)", longint'(dut.sh) - 1, 1);
    expect_eq("result",           longint'(out), longint'({1'b0, 8'(127 + 2), 8'b10011111}));
    // the same sum as a subtraction of +B
    in2[W-1] = 1'b0;
    sub = 1'b1;
    @(negedge clk);
    expect_eq("result via sub",   longint'(out), longint'({1'b0, 8'(127 + 2), 8'b10011111}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
