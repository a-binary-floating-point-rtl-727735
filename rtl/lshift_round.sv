// lshift_round - postnormalization left shift and rounding.
//
// mag is the binary magnitude of the sum in a frame with two integer bits: bit
// SUM_W-1 has weight 2 and bit SUM_W-2 weight 1 (a same-sign sum can reach 2 or
// more; keeping that bit in the frame is the "shift right, exponent + 1" of a
// same-sign addition). mag is shifted left by the anticipated count t from
// shift_amount; if the top bit is still 0 the count was one short and one more
// place is shifted. The FRAC_W bits below the leading 1 are the fraction, and
// the next bit decides the rounding: round to nearest, with a tie rounded up
// in magnitude. Only the guard digits R and S were kept below the significand,
// so after a one-place left shift S is the rounding bit.
// Outputs the fraction, the total shift sh (t or t+1) and rnd_ovf when rounding
// carries into a new integer bit (1.11..1 + ulp = 10.00..0, fraction 0).
// Purely combinational.
//
// Round to nearest from the R/S guard digits follows the original
// architecture, and its worked example rounds a tie up; the one-place
// correction shift is a choice of this implementation. This rounding is not
// IEEE round-to-nearest-even in every case (see the top-level description).
module lshift_round #(
  parameter int FRAC_W = 23,
  localparam int SUM_W = FRAC_W + 4,
  localparam int T_W   = $clog2(SUM_W + 1)
) (
  input  logic [SUM_W-1:0]  mag,
  input  logic [T_W-1:0]    t,
  output logic [FRAC_W-1:0] frac,
  output logic [T_W:0]      sh,
  output logic              rnd_ovf
);

  logic [SUM_W-1:0]  y0, y;
  logic              rbit;
  logic [FRAC_W+1:0] r;      // rounded significand with one carry bit

  always_comb begin
    y0 = mag << t;
    if (y0[SUM_W-1]) begin
      y  = y0;
      sh = {1'b0, t};
    end else begin
      y  = y0 << 1;
      sh = {1'b0, t} + 1'b1;
    end
    rbit    = y[SUM_W-FRAC_W-2];
    r       = {1'b0, y[SUM_W-1 -: FRAC_W+1]} + (FRAC_W+2)'(rbit);
    rnd_ovf = r[FRAC_W+1];
    frac    = r[FRAC_W-1:0];
  end

endmodule
