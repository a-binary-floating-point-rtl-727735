// tb_rs_generator - self-checking test of the guard-digit generator.
// Random 50-bit shifted significands (with sparse low parts so that S = 0
// occurs); expected: top 24 bits, then R = bit 25, then S = OR of bits 24..0.
module tb_rs_generator;
  localparam int NV = 20000;
  logic clk = 1'b0;
  logic [49:0] q;
  logic [25:0] a;
  int checks = 0, failures = 0;

  rs_generator dut (.q, .a);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [25:0] expv;
    for (int n = 0; n < NV; n++) begin
      q = {$urandom, $urandom} & 50'h3ffffffffffff;
      case ($urandom % 4)
        0: q[24:0] = '0;
        1: q[24:0] = 25'(1) << ($urandom % 25);
        default: ;
      endcase
      @(negedge clk);
      expv = {q[49:26], q[25], (q[24:0] != 0)};
      checks++;
      if (a !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h -> %h expected %h", q, a, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
