// pack - assembles the IEEE-754 result word {s, e, f}.
//
// An exact zero sum gives a signed zero. Exponent overflow (e_res >= 2^EXP_W-1)
// gives infinity and underflow (e_res <= 0) gives a signed zero: this design
// does not produce denormals. Otherwise the word is {s, e_res, frac}.
// Purely combinational.
//
// Overflow to infinity and underflow to zero are choices of this
// implementation.
module pack #(
  parameter int EXP_W  = 8,
  parameter int FRAC_W = 23,
  localparam int W     = EXP_W + FRAC_W + 1
) (
  input  logic                    s,
  input  logic signed [EXP_W+1:0] e_res,
  input  logic [FRAC_W-1:0]       frac,
  input  logic                    zero,
  output logic [W-1:0]            out
);

  localparam logic signed [EXP_W+1:0] EMAX = (EXP_W+2)'((1 << EXP_W) - 1);

  always_comb begin
    if (zero || e_res <= 0) out = {s, {EXP_W{1'b0}}, {FRAC_W{1'b0}}};
    else if (e_res >= EMAX) out = {s, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    else                    out = {s, e_res[EXP_W-1:0], frac};
  end

endmodule
