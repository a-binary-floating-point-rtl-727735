// r_shifter - alignment right shifter for one significand.
//
// Shifts the unsigned SIG_W-bit significand m right by sh (0..MAX_SH)
// positions. The output is SIG_W+MAX_SH bits wide, with m placed at the top for
// a shift of 0, so every bit shifted out of the significand is kept for the
// RS generator that follows. Purely combinational barrel shifter.
//
// One such shifter per operand, as in the original architecture; writing it
// as a single shift operator is a choice of this implementation.
module r_shifter #(
  parameter int FRAC_W = 23,
  parameter int MAX_SH = 26,
  localparam int SIG_W = FRAC_W + 1,
  localparam int SH_W  = $clog2(MAX_SH + 1)
) (
  input  logic [SIG_W-1:0]        m,
  input  logic [SH_W-1:0]         sh,
  output logic [SIG_W+MAX_SH-1:0] q
);

  always_comb q = {m, {MAX_SH{1'b0}}} >> sh;

endmodule
