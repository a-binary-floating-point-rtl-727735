// sd_coder - attaches the operand signs to the aligned magnitudes.
//
// Each aligned magnitude (significand plus guard digits R and S, OP_W bits)
// becomes an OP_W-digit radix-2 signed-digit number: bit b of an operand with
// sign s becomes the digit +b when s = 0 and -b when s = 1. In the two-wire
// digit code [sign, abs] (see sdfp_pkg) this is simply {s & b, b}, one AND gate
// per digit, which is why the coder is so cheap. Digit i of x is x[2i+1:2i].
// Purely combinational.
//
// The digit code and the sign attachment follow the original architecture.
module sd_coder #(
  parameter int FRAC_W = 23,
  localparam int OP_W  = FRAC_W + 3
) (
  input  logic              s1,
  input  logic              s2,
  input  logic [OP_W-1:0]   a1,
  input  logic [OP_W-1:0]   a2,
  output logic [2*OP_W-1:0] x,
  output logic [2*OP_W-1:0] y
);

  always_comb begin
    for (int i = 0; i < OP_W; i++) begin
      x[2*i +: 2] = {s1 & a1[i], a1[i]};
      y[2*i +: 2] = {s2 & a2[i], a2[i]};
    end
  end

endmodule
