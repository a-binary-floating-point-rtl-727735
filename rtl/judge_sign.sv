// judge_sign - sign of the floating-point sum.
//
// When both operands have the same sign, the result has that sign. When they
// differ, the sign comes from the SD sum, whose sign sd_decoder reports as neg:
// the adder never swaps operands, so the SD sum itself carries the sign of the
// result. An exact zero from operands of different sign therefore gives +0.
// Purely combinational.
//
// Follows the original architecture; +0 for an exact zero is a choice of this
// implementation.
module judge_sign (
  input  logic s1,
  input  logic s2,
  input  logic neg,
  output logic s
);

  always_comb s = (s1 == s2) ? s1 : neg;

endmodule
