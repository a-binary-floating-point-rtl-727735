// tb_shift_amount - self-checking test of the SD leading-one anticipator.
//
// For random N-digit SD numbers (N = 27) the expected count is computed two
// ways. First the rule itself, in index form: find the leading nonzero digit
// at position i, then the length k of the run of opposite-sign digits after
// it; t = (N-1-i) + k. Second a bound from the value: t must equal the number
// of leading zeros of |value| in N bits, or be one less. zero must be set only
// for the all-zero number. One vector per clock cycle.
module tb_shift_amount;
  localparam int N = 27;
  localparam int NV = 30000;

  logic clk = 1'b0;
  logic [2*N-1:0] z;
  logic [$clog2(N+1)-1:0] t;
  logic zero;
  int checks = 0, failures = 0;

  shift_amount dut (.z, .t, .zero);

  always #5 clk = ~clk;

  function automatic int dv(int i);
    return (z[2*i +: 2] == 2'b01) ? 1 : (z[2*i +: 2] == 2'b11) ? -1 : 0;
  endfunction

  task automatic check();
    longint v = 0, m;
    int lead = -1, k = 0, t_exp, lz;
    @(negedge clk);
    for (int i = N - 1; i >= 0; i--) v = 2 * v + dv(i);
    for (int i = N - 1; i >= 0 && lead < 0; i--) if (dv(i) != 0) lead = i;
    if (lead >= 0) begin
      while (lead - 1 - k >= 0 && dv(lead - 1 - k) == -dv(lead)) k++;
      t_exp = (N - 1 - lead) + k;
    end else t_exp = N;
    m = (v < 0) ? -v : v;
    lz = N;
    for (int i = 0; i < N; i++) if ((m >> i) & 1) lz = N - 1 - i;
    checks++;
    if (int'(t) != t_exp || zero != (v == 0) || !(int'(t) == lz || int'(t) == lz - 1)) begin
      failures++;
      if (failures < 10) $display("FAIL z=%h t=%0d expected %0d (lz %0d) zero=%b", z, t, t_exp, lz, zero);
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
    int dens, top;
    z = '0; check();
    z = {2'b01, {(N-1){2'b11}}}; check();
    for (int n = 0; n < NV; n++) begin
      dens = 1 + int'($urandom % 7);
      top  = int'($urandom % N);
      for (int i = 0; i < N; i++)
        if (i > top) z[2*i +: 2] = 2'b00;
        else if (i == top) z[2*i +: 2] = ($urandom % 2) ? 2'b01 : 2'b11;
        else if ($urandom % 2 && i == top - 1) z[2*i +: 2] = {~z[2*top+1], 1'b1};
        else z[2*i +: 2] = (int'($urandom % 8) < dens) ? (($urandom % 2) ? 2'b01 : 2'b11) : 2'b00;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
