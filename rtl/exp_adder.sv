// exp_adder - result exponent of the floating-point sum.
//
// e_res = e_big + 1 - sh + rnd_ovf, where e_big is the larger operand
// exponent, the +1 accounts for the two integer bits of the sum frame (see
// lshift_round), sh is the total normalization left shift and rnd_ovf the
// rounding carry. The result is a signed EXP_W+2-bit number so that pack can
// see overflow (>= 2^EXP_W - 1) and underflow (<= 0). Purely combinational.
//
// An exponent adder after normalization is part of the original architecture;
// the single formula with the +1 frame offset is this implementation's.
module exp_adder #(
  parameter int EXP_W = 8,
  parameter int SH_W  = 6
) (
  input  logic [EXP_W-1:0]        e_big,
  input  logic [SH_W-1:0]         sh,
  input  logic                    rnd_ovf,
  output logic signed [EXP_W+1:0] e_res
);

  always_comb
    e_res = $signed({2'b00, e_big}) + (EXP_W+2)'(1) - $signed((EXP_W+2)'(sh))
          + $signed((EXP_W+2)'(rnd_ovf));

endmodule
