// tb_sd_adder - self-checking test of the P-digit signed-digit adder.
//
// Random SD operands (digit mixes from sparse to dense, and the all-ones /
// all-minus-ones extremes) are added; the checker evaluates operands and sum
// as integers, requires value(z) = value(x) + value(y), and requires every sum
// digit to use a valid code. Default P = 26, the width used in the
// single-precision adder. One vector per clock cycle.
module tb_sd_adder;
  localparam int P = 26;
  localparam int N = 30000;

  logic clk = 1'b0;
  logic [2*P-1:0] x, y;
  logic [2*(P+1)-1:0] z;
  int checks = 0, failures = 0;

  sd_adder dut (.x, .y, .z);

  always #5 clk = ~clk;

  function automatic longint val(logic [2*(P+1)-1:0] v, int nd);
    longint r = 0;
    for (int i = nd - 1; i >= 0; i--)
      r = 2 * r + ((v[2*i+1 -: 2] == 2'b01) ? 1 : (v[2*i+1 -: 2] == 2'b11) ? -1 : 0);
    return r;
  endfunction

  function automatic logic [2*P-1:0] rnd_sd(int density);
    logic [2*P-1:0] r;
    for (int i = 0; i < P; i++) begin
      if (int'($urandom % 8) < density) r[2*i +: 2] = ($urandom % 2) ? 2'b01 : 2'b11;
      else r[2*i +: 2] = 2'b00;
    end
    return r;
  endfunction

  task automatic check();
    logic ok;
    @(negedge clk);
    ok = (val(z, P + 1) == val({2'b00, x}, P) + val({2'b00, y}, P));
    for (int i = 0; i <= P; i++) if (z[2*i +: 2] == 2'b10) ok = 1'b0;
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h y=%h z=%h", x, y, z);
    end
  endtask

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = {P{2'b01}}; y = {P{2'b01}}; check();
    x = {P{2'b11}}; y = {P{2'b11}}; check();
    x = {P{2'b01}}; y = {P{2'b11}}; check();
    for (int n = 0; n < N; n++) begin
      x = rnd_sd(int'($urandom % 9));
      y = rnd_sd(int'($urandom % 9));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
