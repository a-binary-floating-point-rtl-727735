// rs_generator - forms the guard digits R and S of an aligned significand.
//
// Input q is the right-shifted significand with all shifted-out bits below it
// (see r_shifter). The output keeps the top SIG_W bits as the aligned
// significand and appends two guard digits: R, the first bit below the
// significand, and S, the OR of every bit below R (the sticky bit). The result,
// SIG_W+2 bits, is the unsigned magnitude the SD coder turns into signed digits.
// Purely combinational.
//
// The two guard digits R and S are those of the original architecture; reading
// S as a sticky OR is the usual meaning and this implementation's reading.
module rs_generator #(
  parameter int FRAC_W = 23,
  parameter int MAX_SH = 26,
  localparam int SIG_W = FRAC_W + 1,
  localparam int QW    = SIG_W + MAX_SH
) (
  input  logic [QW-1:0]      q,
  output logic [SIG_W+1:0]   a
);

  logic r, s;

  always_comb begin
    r = q[QW-SIG_W-1];
    s = |q[QW-SIG_W-2:0];
    a = {q[QW-1 -: SIG_W], r, s};
  end

endmodule
