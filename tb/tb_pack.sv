// tb_pack - self-checking test of result packing.
//
// Applies every signed exponent from -40 to 300 with random fractions and
// signs, plus the zero flag, and expects: zero or e_res <= 0 -> signed zero;
// e_res >= 255 -> signed infinity; otherwise {s, e_res[7:0], frac}.
module tb_pack;
  logic clk = 1'b0;
  logic s, zero;
  logic signed [9:0] e_res;
  logic [22:0] frac;
  logic [31:0] out, exp_v;
  int checks = 0, failures = 0;

  pack dut (.s, .e_res, .frac, .zero, .out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (341 * 4 + 100) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = -40; e <= 300; e++)
      for (int k = 0; k < 4; k++) begin
        s = 1'($urandom); frac = 23'($urandom); e_res = 10'(e); zero = (k == 3);
        @(negedge clk);
        if (zero || e <= 0) exp_v = {s, 31'd0};
        else if (e >= 255) exp_v = {s, 8'hff, 23'd0};
        else exp_v = {s, 8'(e), frac};
        checks++;
        if (out !== exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL e=%0d zero=%b -> %h expected %h", e, zero, out, exp_v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
