// tb_sd_fp_adder - end-to-end self-checking test of sd_fp_adder at its default
// (single-precision) parameters.
//
// A reference model written with plain integer arithmetic computes every
// expected result: it aligns the smaller operand with a right shift, keeps the
// first shifted-out bit (R) and the OR of the rest (S), adds the two signed
// magnitudes exactly, normalizes, and rounds to nearest with ties rounded up in
// magnitude. Overflow gives infinity, underflow and exact zero give zero.
// Stimulus: a fixed list of corner cases (including the worked example
// 2^3 x 1.01000001 - 2^1 x 1.11000111), then random operands whose exponent
// difference is biased towards small values so that cancellation and all
// alignment distances occur. Each mechanism of the datapath is counted through
// hierarchical references; one that never occurs is a failure. A second,
// exact IEEE round-to-nearest-even model is run alongside, and the number of
// results that differ from it is printed (not counted as failures).
// One operand pair is applied per clock cycle; the design is combinational and
// is sampled half a cycle after the inputs change.
module tb_sd_fp_adder;

  localparam int EXP_W  = 8;
  localparam int FRAC_W = 23;
  localparam int W      = EXP_W + FRAC_W + 1;
  localparam int NRAND  = 200000;

  logic         clk = 1'b0;
  logic [W-1:0] in1, in2, out;
  logic         sub;
  int           checks = 0, failures = 0;

  sd_fp_adder dut (.in1, .in2, .sub, .out);

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  function automatic logic [W-1:0] ref_add(logic [W-1:0] a, logic [W-1:0] b, logic op_sub);
    logic        sa, sb, s;
    longint      ea, eb, ebig, d, e, l;
    longint      ma, mb, va, vb, x, mag, sig, rb, lost, tr;
    sa = a[W-1];
    sb = b[W-1] ^ op_sub;
    ea = longint'(a[W-2 -: EXP_W]);
    eb = longint'(b[W-2 -: EXP_W]);
    ma = (ea != 0) ? ((longint'(1) << FRAC_W) | longint'(a[FRAC_W-1:0])) : 0;
    mb = (eb != 0) ? ((longint'(1) << FRAC_W) | longint'(b[FRAC_W-1:0])) : 0;
    ebig = (ea > eb) ? ea : eb;
    va = ma << 2;
    vb = mb << 2;
    d  = (ea > eb) ? ea - eb : eb - ea;
    if (d > 40) d = 40;
    if (ea > eb) begin
      tr = vb >> d; lost = vb & ((longint'(1) << d) - 1);
      vb = (tr & ~longint'(1)) | ((tr & 1) | (lost != 0 ? 1 : 0));
    end else if (eb > ea) begin
      tr = va >> d; lost = va & ((longint'(1) << d) - 1);
      va = (tr & ~longint'(1)) | ((tr & 1) | (lost != 0 ? 1 : 0));
    end
    x = (sa ? -va : va) + (sb ? -vb : vb);
    if (x == 0) return {(sa & sb), {(W-1){1'b0}}};
    s   = (sa == sb) ? sa : (x < 0);
    mag = (x < 0) ? -x : x;
    l = 0;
    for (int i = 0; i < 62; i++) if ((mag >> i) & 1) l = i;
    // mag / 2^(FRAC_W+2) is the significand; leading one at l
    e = ebig + (l - (FRAC_W + 2));
    if (l >= FRAC_W) begin
      sig = mag >> (l - FRAC_W);
      rb  = (l > FRAC_W) ? ((mag >> (l - FRAC_W - 1)) & 1) : 0;
    end else begin
      sig = mag << (FRAC_W - l);
      rb  = 0;
    end
    sig = sig + rb;
    if (sig >> (FRAC_W + 1) != 0) begin
      sig = sig >> 1;
      e   = e + 1;
    end
    if (e <= 0)                   return {s, {(W-1){1'b0}}};
    if (e >= (1 << EXP_W) - 1)    return {s, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    return {s, EXP_W'(e), sig[FRAC_W-1:0]};
  endfunction


  // IEEE round-to-nearest-even with three guard bits (G, R, sticky), which is
  // exact; used only to report how often the adder's rounding differs. With
  // ties_away set, a tie rounds up in magnitude instead of to even.
  function automatic logic [W-1:0] ieee_add(logic [W-1:0] a, logic [W-1:0] b, logic op_sub,
                                            bit ties_away);
    logic        sa, sb, s;
    longint      ea, eb, ebig, d, e, l;
    longint      ma, mb, va, vb, x, mag, sig, rb, st, lost, tr;
    sa = a[W-1];
    sb = b[W-1] ^ op_sub;
    ea = longint'(a[W-2 -: EXP_W]);
    eb = longint'(b[W-2 -: EXP_W]);
    ma = (ea != 0) ? ((longint'(1) << FRAC_W) | longint'(a[FRAC_W-1:0])) : 0;
    mb = (eb != 0) ? ((longint'(1) << FRAC_W) | longint'(b[FRAC_W-1:0])) : 0;
    ebig = (ea > eb) ? ea : eb;
    va = ma << 3;
    vb = mb << 3;
    d  = (ea > eb) ? ea - eb : eb - ea;
    if (d > 40) d = 40;
    if (ea > eb) begin
      tr = vb >> d; lost = vb & ((longint'(1) << d) - 1);
      vb = tr | (lost != 0 ? 1 : 0);
    end else if (eb > ea) begin
      tr = va >> d; lost = va & ((longint'(1) << d) - 1);
      va = tr | (lost != 0 ? 1 : 0);
    end
    x = (sa ? -va : va) + (sb ? -vb : vb);
    if (x == 0) return {(sa & sb), {(W-1){1'b0}}};
    s   = (sa == sb) ? sa : (x < 0);
    mag = (x < 0) ? -x : x;
    l = 0;
    for (int i = 0; i < 62; i++) if ((mag >> i) & 1) l = i;
    e = ebig + (l - (FRAC_W + 3));
    if (l > FRAC_W) begin
      sig = mag >> (l - FRAC_W);
      rb  = (mag >> (l - FRAC_W - 1)) & 1;
      st  = ((mag & ((longint'(1) << (l - FRAC_W - 1)) - 1)) != 0) ? 1 : 0;
    end else begin
      sig = mag << (FRAC_W - l);
      rb  = 0;
      st  = 0;
    end
    if (rb == 1 && (ties_away || st == 1 || (sig & 1) == 1)) sig = sig + 1;
    if (sig >> (FRAC_W + 1) != 0) begin
      sig = sig >> 1;
      e   = e + 1;
    end
    if (e <= 0)                   return {s, {(W-1){1'b0}}};
    if (e >= (1 << EXP_W) - 1)    return {s, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    return {s, EXP_W'(e), sig[FRAC_W-1:0]};
  endfunction

  // ---------------- mechanism counters ----------------
  int n_same_carry, n_diff_neg, n_eq_exp_smaller_first, n_lza_fix, n_big_cancel,
      n_rnd_ovf, n_sticky_only, n_ovf_inf, n_underflow, n_zero, n_sub, n_e2_bigger,
      n_round_up, n_ieee_diff, n_sticky_diff, n_ieee_far;

  task automatic apply(logic [W-1:0] a, logic [W-1:0] b, logic op);
    logic [W-1:0] exp_v, ieee_v;
    in1 = a; in2 = b; sub = op;
    @(negedge clk);
    exp_v = ref_add(a, b, op);
    checks++;
    if (out !== exp_v) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH %h %s %h : got %h expected %h", a, op ? "-" : "+", b, out, exp_v);
    end
    ieee_v = ieee_add(a, b, op, 0);
    if (out !== ieee_v) begin
      n_ieee_diff++;
      if (out[W-1] != ieee_v[W-1] || (out[W-2:0] - ieee_v[W-2:0] != 1 && ieee_v[W-2:0] - out[W-2:0] != 1))
        n_ieee_far++;
    end
    if (out !== ieee_add(a, b, op, 1)) n_sticky_diff++;
    // mechanisms, seen through the datapath's internal nets
    if (dut.s1 == dut.s2 && dut.mag[FRAC_W+3] && !dut.zero) n_same_carry++;
    if (dut.s1 != dut.s2 && dut.neg) n_diff_neg++;
    if (dut.e1 == dut.e2 && dut.m1 < dut.m2 && dut.s1 != dut.s2) n_eq_exp_smaller_first++;
    if (!dut.zero && dut.sh != {1'b0, dut.t}) n_lza_fix++;
    if (!dut.zero && dut.sh >= 4) n_big_cancel++;
    if (!dut.zero && dut.rnd_ovf) n_rnd_ovf++;
    if (!dut.zero && dut.frac != dut.u_lshift_round.y[FRAC_W+2 -: FRAC_W]) n_round_up++;
    if ((dut.sh1 >= FRAC_W + 2 && dut.m1 != 0) || (dut.sh2 >= FRAC_W + 2 && dut.m2 != 0)) n_sticky_only++;
    if (!dut.zero && out[W-2 -: EXP_W] == '1) n_ovf_inf++;
    if (!dut.zero && dut.e_res <= 0) n_underflow++;
    if (dut.zero) n_zero++;
    if (op) n_sub++;
    if (dut.e2 > dut.e1) n_e2_bigger++;
  endtask

  function automatic logic [W-1:0] mk(logic s, int e, int f);
    return {s, EXP_W'(e), FRAC_W'(f)};
  endfunction

  task automatic need(string name, int n);
    checks++;
    $display("  %-34s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("MECHANISM NEVER SEEN: %s", name);
    end
  endtask

  initial begin : watchdog
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("WATCHDOG: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic [W-1:0] a, b;
    int ea, d;
    n_same_carry = 0; n_diff_neg = 0; n_eq_exp_smaller_first = 0; n_lza_fix = 0;
    n_big_cancel = 0; n_rnd_ovf = 0; n_sticky_only = 0; n_ovf_inf = 0; n_underflow = 0;
    n_zero = 0; n_sub = 0; n_e2_bigger = 0; n_round_up = 0; n_ieee_diff = 0; n_sticky_diff = 0; n_ieee_far = 0;
    in1 = '0; in2 = '0; sub = 1'b0;

    // worked example: 2^3 x 1.01000001 + (-2^1 x 1.11000111) = 2^2 x 1.100111101
    apply(mk(0, 127 + 3, 23'b01000001_000000000000000), mk(1, 127 + 1, 23'b11000111_000000000000000), 0);
    checks++;
    if (out !== mk(0, 127 + 2, 23'b10011110_100000000000000)) begin
      failures++;
      $display("worked example wrong: %h", out);
    end
    // 1.0 + 1.0 = 2.0, 1.5 - 1.5 = +0, 1.0 - 2^-24 style cancellation
    apply(32'h3f800000, 32'h3f800000, 0);
    checks++; if (out !== 32'h40000000) begin failures++; $display("1+1 wrong %h", out); end
    apply(32'h3fc00000, 32'h3fc00000, 1);
    checks++; if (out !== 32'h00000000) begin failures++; $display("1.5-1.5 wrong %h", out); end
    apply(32'h3f800000, 32'h3f7fffff, 1);   // 1 - (1 - 2^-24) = 2^-24
    checks++; if (out !== 32'h33800000) begin failures++; $display("cancel wrong %h", out); end
    apply(32'h3f7fffff, 32'h3f800000, 1);   // = -2^-24, no swap needed
    checks++; if (out !== 32'hb3800000) begin failures++; $display("cancel neg wrong %h", out); end
    apply(32'h7f7fffff, 32'h7f7fffff, 0);   // overflow -> +inf
    checks++; if (out !== 32'h7f800000) begin failures++; $display("overflow wrong %h", out); end
    apply(32'h00800001, 32'h00800000, 1);   // underflow -> +0
    apply(32'h3fffffff, 32'h33800000, 0);   // round carry into new integer bit
    apply(32'h4b800000, 32'h3f800000, 0);   // far alignment
    apply(32'h3f800000, 32'h4b800000, 1);   // e2 > e1
    apply(32'h80000000, 32'h80000000, 0);   // -0 + -0 = -0
    checks++; if (out !== 32'h80000000) begin failures++; $display("-0 wrong %h", out); end

    for (int n = 0; n < NRAND; n++) begin
      a = $urandom;
      b = $urandom;
      ea = int'(a[W-2 -: EXP_W]);
      case ($urandom % 4)
        0: d = 0;
        1: d = int'($urandom % 4);
        2: d = int'($urandom % 32);
        default: d = 999;
      endcase
      if (d != 999) begin
        if ($urandom % 2) d = -d;
        if (ea + d < 0 || ea + d > 254) d = 0;
        b[W-2 -: EXP_W] = EXP_W'(ea + d);
      end
      if ($urandom % 8 == 0) b[FRAC_W-1:0] = a[FRAC_W-1:0] ^ FRAC_W'($urandom % 8);
      apply(a, b, 1'($urandom % 2));
    end

    $display("results differing from IEEE round-to-nearest-even: %0d of %0d", n_ieee_diff, checks);
    $display("  of which by more than one unit in the last place: %0d", n_ieee_far);
    $display("results differing from exact round-to-nearest with ties away: %0d of %0d", n_sticky_diff, checks);
    $display("mechanism counts:");
    need("same-sign carry into bit 2^1",       n_same_carry);
    need("negative SD sum (no swap)",          n_diff_neg);
    need("equal exponents, |x1| < |x2|",       n_eq_exp_smaller_first);
    need("shift-amount one-place correction",  n_lza_fix);
    need("cancellation, shift >= 4",           n_big_cancel);
    need("rounding carry-out",                 n_rnd_ovf);
    need("rounded up",                         n_round_up);
    need("operand entirely in sticky digit",   n_sticky_only);
    need("exponent overflow to infinity",      n_ovf_inf);
    need("exponent underflow to zero",         n_underflow);
    need("exact zero sum",                     n_zero);
    need("subtraction",                        n_sub);
    need("second exponent larger",             n_e2_bigger);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
