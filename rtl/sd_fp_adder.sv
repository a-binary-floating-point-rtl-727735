// sd_fp_adder - IEEE-754 floating-point adder with a signed-digit significand path.
//
// Computes out = in1 + in2 (sub = 0) or in1 - in2 (sub = 1) for words in the
// {sign, EXP_W-bit biased exponent, FRAC_W-bit fraction} format; the defaults
// give single precision. The idea: a conventional adder must swap the operands
// so that it always subtracts the smaller magnitude, and its significand adder
// has a full carry chain. Here each significand is merely aligned (the one with
// the smaller exponent is shifted right), given guard digits R and S, and turned
// into a radix-2 signed-digit (SD) number carrying its operand's sign. Two SD
// numbers add without carry propagation and in either order, so no swap is
// needed. The only carry chain left is the SD-to-binary conversion, and the
// normalization shift count is worked out from the SD sum at the same time.
//
// Dataflow: unpack -> judge_size -> 2x (r_shifter -> rs_generator) -> sd_coder
// -> sd_adder -> { sd_decoder | shift_amount } -> lshift_round -> exp_adder
// -> pack, with judge_sign choosing the result sign.
//
// Rounding is to nearest with ties rounded up in magnitude, decided from the
// R and S guard digits only; results that overflow become infinity, results
// that underflow become zero, zero exponent fields read as zero. These, and the
// sub input, are choices of this design. Fully combinational: no clock, the
// result follows the inputs.
//
// The block structure and its connections follow the original architecture.
module sd_fp_adder #(
  parameter int EXP_W  = 8,
  parameter int FRAC_W = 23,
  localparam int W      = EXP_W + FRAC_W + 1,
  localparam int SIG_W  = FRAC_W + 1,
  localparam int MAX_SH = FRAC_W + 3,
  localparam int SH_W   = $clog2(MAX_SH + 1),
  localparam int OP_W   = FRAC_W + 3,
  localparam int SUM_W  = OP_W + 1,
  localparam int T_W    = $clog2(SUM_W + 1)
) (
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic         sub,
  output logic [W-1:0] out
);

  logic                    s1, s2, s_res;
  logic [EXP_W-1:0]        e1, e2, e_big;
  logic [SIG_W-1:0]        m1, m2;
  logic [SH_W-1:0]         sh1, sh2;
  logic [SIG_W+MAX_SH-1:0] q1, q2;
  logic [OP_W-1:0]         a1, a2;
  logic [2*OP_W-1:0]       x, y;
  logic [2*SUM_W-1:0]      z;
  logic [SUM_W-1:0]        mag;
  logic                    neg, zero;
  logic [T_W-1:0]          t;
  logic [T_W:0]            sh;
  logic [FRAC_W-1:0]       frac;
  logic                    rnd_ovf;
  logic signed [EXP_W+1:0] e_res;

  unpack #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_unpack (
    .in1, .in2, .sub, .s1, .s2, .e1, .e2, .m1, .m2
  );

  judge_size #(.EXP_W(EXP_W), .MAX_SH(MAX_SH)) u_judge_size (
    .e1, .e2, .sh1, .sh2, .e_big
  );

  r_shifter #(.FRAC_W(FRAC_W), .MAX_SH(MAX_SH)) u_rsh1 (.m(m1), .sh(sh1), .q(q1));
  r_shifter #(.FRAC_W(FRAC_W), .MAX_SH(MAX_SH)) u_rsh2 (.m(m2), .sh(sh2), .q(q2));

  rs_generator #(.FRAC_W(FRAC_W), .MAX_SH(MAX_SH)) u_rs1 (.q(q1), .a(a1));
  rs_generator #(.FRAC_W(FRAC_W), .MAX_SH(MAX_SH)) u_rs2 (.q(q2), .a(a2));

  sd_coder #(.FRAC_W(FRAC_W)) u_sd_coder (.s1, .s2, .a1, .a2, .x, .y);

  sd_adder #(.P(OP_W)) u_sd_adder (.x, .y, .z);

  sd_decoder #(.N(SUM_W)) u_sd_decoder (.z, .mag, .neg);

  shift_amount #(.N(SUM_W)) u_shift_amount (.z, .t, .zero);

  judge_sign u_judge_sign (.s1, .s2, .neg, .s(s_res));

  lshift_round #(.FRAC_W(FRAC_W)) u_lshift_round (.mag, .t, .frac, .sh, .rnd_ovf);

  exp_adder #(.EXP_W(EXP_W), .SH_W(T_W + 1)) u_exp_adder (.e_big, .sh, .rnd_ovf, .e_res);

  pack #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_pack (.s(s_res), .e_res, .frac, .zero, .out);

endmodule
