// unpack - splits two IEEE-754 words into sign, biased exponent and significand.
//
// Each word is {s, e[EXP_W-1:0], f[FRAC_W-1:0]}. The significand M = 1.f is
// returned with its hidden leading 1 restored, as an unsigned SIG_W-bit integer
// (bit SIG_W-1 is the integer bit). A word whose exponent field is 0 is taken
// as zero: its significand is returned as 0, so denormals are flushed to zero
// (a choice of this design; the format in use only defines normalized numbers).
// Subtraction is done as in1 + (-in2): with sub = 1 the sign of in2 is inverted
// here, so nothing further down knows about subtraction.
// Purely combinational.
//
// Field layout and hidden 1 follow the IEEE single-precision format of the
// original architecture; the zero/denormal treatment and the sub input are
// choices of this implementation.
module unpack #(
  parameter int EXP_W  = 8,
  parameter int FRAC_W = 23,
  localparam int W     = EXP_W + FRAC_W + 1,
  localparam int SIG_W = FRAC_W + 1
) (
  input  logic [W-1:0]     in1,
  input  logic [W-1:0]     in2,
  input  logic             sub,
  output logic             s1,
  output logic             s2,
  output logic [EXP_W-1:0] e1,
  output logic [EXP_W-1:0] e2,
  output logic [SIG_W-1:0] m1,
  output logic [SIG_W-1:0] m2
);

  always_comb begin
    s1 = in1[W-1];
    s2 = in2[W-1] ^ sub;
    e1 = in1[W-2 -: EXP_W];
    e2 = in2[W-2 -: EXP_W];
    m1 = (e1 != '0) ? {1'b1, in1[FRAC_W-1:0]} : '0;
    m2 = (e2 != '0) ? {1'b1, in2[FRAC_W-1:0]} : '0;
  end

endmodule
