// sd_decoder - converts an N-digit signed-digit number to sign and magnitude.
//
// The SD number z is first split into two unsigned binary vectors: P holds a 1
// where a digit is +1, M a 1 where a digit is -1, so z = P - M. One binary
// addition then gives the value, with M in two's complement, and a negative
// value is turned into its magnitude by complementing every bit. To make that
// exact the adder is a compound adder: it forms s0 = P + ~M = z - 1 once; if s0
// is negative, ~s0 = -z = |z| directly; otherwise s0 + 1 = z. This is the only
// carry-propagating adder of the significand path.
// Outputs: mag = |z| (N bits, |z| < 2^N always fits) and neg = (z < 0); an
// exact zero gives neg = 0. Purely combinational.
//
// Splitting into positive and negative vectors and complementing a negative
// result follow the original architecture; forming z - 1 first, so that the
// complement is exact, is a choice of this implementation.
module sd_decoder #(
  parameter int N = 27
) (
  input  logic [2*N-1:0] z,
  output logic [N-1:0]   mag,
  output logic           neg
);

  logic [N-1:0] pv, mv;
  logic [N:0]   s0;      // z - 1 in N+1-bit two's complement

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pv[i] = z[2*i] & ~z[2*i+1];
      mv[i] = z[2*i] &  z[2*i+1];
    end
    s0  = {1'b0, pv} + {1'b1, ~mv};
    neg = s0[N] & ~(&s0);               // s0 = -1 means z = 0
    mag = s0[N] ? ~s0[N-1:0] : s0[N-1:0] + 1'b1;
  end

endmodule
