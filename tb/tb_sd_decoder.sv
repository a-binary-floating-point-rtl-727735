// tb_sd_decoder - self-checking test of the SD-to-binary converter.
//
// Random N-digit SD numbers (N = 27, the sum width of the single-precision
// adder) and the extremes are converted; the checker evaluates the digits as
// an integer and expects mag = |value| and neg = (value < 0), including
// neg = 0 for zero. One vector per clock cycle.
module tb_sd_decoder;
  localparam int N = 27;
  localparam int NV = 30000;

  logic clk = 1'b0;
  logic [2*N-1:0] z;
  logic [N-1:0] mag;
  logic neg;
  int checks = 0, failures = 0;

  sd_decoder dut (.z, .mag, .neg);

  always #5 clk = ~clk;

  task automatic check();
    longint v = 0;
    @(negedge clk);
    for (int i = N - 1; i >= 0; i--)
      v = 2 * v + ((z[2*i +: 2] == 2'b01) ? 1 : (z[2*i +: 2] == 2'b11) ? -1 : 0);
    checks++;
    if (longint'(mag) != ((v < 0) ? -v : v) || neg != (v < 0)) begin
      failures++;
      if (failures < 10) $display("FAIL z=%h value=%0d mag=%0d neg=%b", z, v, mag, neg);
    end
  endtask

  initial begin : watchdog
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dens;
    z = '0; check();
    z = {N{2'b01}}; check();
    z = {N{2'b11}}; check();
    z = {2'b01, {(N-1){2'b11}}}; check();   // value 1
    for (int n = 0; n < NV; n++) begin
      dens = int'($urandom % 9);
      for (int i = 0; i < N; i++)
        z[2*i +: 2] = (int'($urandom % 8) < dens) ? (($urandom % 2) ? 2'b01 : 2'b11) : 2'b00;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
