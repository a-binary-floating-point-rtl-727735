// judge_size - exponent comparison for the signed-digit floating-point adder.
//
// Computes d = e1 - e2 and from it the right shift of each significand: the
// operand with the smaller exponent is shifted by |d|, the other by 0. No
// operand swap is needed, because the signed-digit adder that follows accepts
// its operands in either order. Shifts are clamped to MAX_SH: past FRAC_W+2
// positions the whole significand already lies below the guard digit R and only
// contributes to the sticky digit S, so a larger shift cannot change the result.
// Also outputs the larger exponent, the base of the result exponent.
// Purely combinational.
//
// Shifting only the smaller-exponent operand, with no swap, is the original
// architecture; the clamp at MAX_SH is a choice of this implementation.
module judge_size #(
  parameter int EXP_W  = 8,
  parameter int MAX_SH = 26,
  localparam int SH_W  = $clog2(MAX_SH + 1)
) (
  input  logic [EXP_W-1:0] e1,
  input  logic [EXP_W-1:0] e2,
  output logic [SH_W-1:0]  sh1,
  output logic [SH_W-1:0]  sh2,
  output logic [EXP_W-1:0] e_big
);

  logic [EXP_W:0]   d;      // e1 - e2, two's complement, one extra bit
  logic [EXP_W-1:0] dabs;
  logic [SH_W-1:0]  dclamp;
  logic             e2_big;

  always_comb begin
    d      = {1'b0, e1} - {1'b0, e2};
    e2_big = d[EXP_W];
    dabs   = e2_big ? EXP_W'(-d) : d[EXP_W-1:0];
    dclamp = (dabs > EXP_W'(MAX_SH)) ? SH_W'(MAX_SH) : SH_W'(dabs);
    sh1    = e2_big ? dclamp : '0;
    sh2    = e2_big ? '0 : dclamp;
    e_big  = e2_big ? e2 : e1;
  end

endmodule
