// tb_lshift_round - self-checking test of postnormalization and rounding.
//
// Random nonzero magnitudes in the 27-bit two-integer-bit frame are applied
// with the anticipated count t equal to the true number of leading zeros or
// one less (the two cases shift_amount can deliver). The reference normalizes
// with integer arithmetic, rounds the 24-bit significand to nearest with ties
// up, and expects the fraction, the total shift (the true leading-zero count)
// and the rounding carry. One vector per clock cycle.
module tb_lshift_round;
  localparam int FRAC_W = 23;
  localparam int SUM_W  = FRAC_W + 4;
  localparam int NV     = 30000;

  logic clk = 1'b0;
  logic [SUM_W-1:0] mag;
  logic [$clog2(SUM_W+1)-1:0] t;
  logic [FRAC_W-1:0] frac;
  logic [$clog2(SUM_W+1):0] sh;
  logic rnd_ovf;
  int checks = 0, failures = 0, n_ovf = 0, n_fix = 0;

  lshift_round dut (.mag, .t, .frac, .sh, .rnd_ovf);

  always #5 clk = ~clk;

  task automatic check(longint m, bit one_short);
    int lz = 0;
    longint y, sig, rb;
    logic ovf_exp;
    for (int i = 0; i < SUM_W; i++) if ((m >> i) & 1) lz = SUM_W - 1 - i;
    if (lz == 0) one_short = 0;
    mag = SUM_W'(m);
    t   = ($clog2(SUM_W+1))'(one_short ? lz - 1 : lz);
    @(negedge clk);
    y   = (m << lz) & ((longint'(1) << SUM_W) - 1);
    sig = y >> (SUM_W - FRAC_W - 1);
    rb  = (y >> (SUM_W - FRAC_W - 2)) & 1;
    sig = sig + rb;
    ovf_exp = (sig >> (FRAC_W + 1)) != 0;
    checks++;
    if (frac != FRAC_W'(sig) || int'(sh) != lz || rnd_ovf != ovf_exp) begin
      failures++;
      if (failures < 10) $display("FAIL mag=%h t=%0d: frac=%h sh=%0d ovf=%b", mag, t, frac, sh, rnd_ovf);
    end
    if (rnd_ovf) n_ovf++;
    if (one_short) n_fix++;
  endtask

  initial begin : watchdog
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint m;
    check((longint'(1) << SUM_W) - 1, 0);            // 11.11..1 rounds to 100.0
    check((longint'(1) << (SUM_W - 1)) - 1, 1);      // 01.11..1 with t one short
    check(longint'(1), 1);
    for (int n = 0; n < NV; n++) begin
      m = (longint'($urandom) << 32 | longint'($urandom)) & ((longint'(1) << SUM_W) - 1);
      m = m >> ($urandom % SUM_W);
      if ($urandom % 8 == 0) m = m | ((longint'(1) << ($urandom % SUM_W)) - 1);
      if (m == 0) m = 1;
      check(m, 1'($urandom % 2));
    end
    checks++;
    if (n_ovf == 0 || n_fix == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
