// sdfa - one cell of the carry-free radix-2 signed-digit adder.
//
// Digits are in the two-wire code of sdfp_pkg. The cell works in two steps:
//   ADD1: from x_i, y_i and the neighbour pair x_{i-1}, y_{i-1} form an
//         intermediate sum w_i and carry c_i with 2*c_i + w_i = x_i + y_i:
//           |x_i| == |y_i| : (w_i, c_i) = (0, (x_i + y_i) / 2)
//           otherwise, with u = x_i + y_i (which is +1 or -1):
//             (w_i, c_i) = (-u, u)  if u and x_{i-1} + y_{i-1} have the same
//                                   (strict) sign,
//             (w_i, c_i) = (u, 0)   otherwise.
//   ADD2: z_i = w_i + c_{i-1}.
// Looking at the neighbour pair guarantees that w_i and c_{i-1} never have
// the same sign, so z_i stays in {-1, 0, +1}: a carry moves at most one digit
// and the adder has no carry chain. Purely combinational.
//
// The ADD1/ADD2 rule and the cell structure follow the original architecture;
// 'same sign' is taken strictly (a zero neighbour sum does not count).
module sdfa
  import sdfp_pkg::*;
(
  input  sd_digit_t xi,   // x_i
  input  sd_digit_t yi,   // y_i
  input  sd_digit_t xl,   // x_{i-1}
  input  sd_digit_t yl,   // y_{i-1}
  input  sd_digit_t cl,   // c_{i-1}, from the cell below
  output sd_digit_t ci,   // c_i, to the cell above
  output sd_digit_t zi    // z_i
);

  logic signed [2:0] u, ul, w, c;

  // ADD1
  always_comb begin
    u  = 3'(sd_val(xi)) + 3'(sd_val(yi));
    ul = 3'(sd_val(xl)) + 3'(sd_val(yl));
    if (xi[0] == yi[0]) begin
      w = 3'sd0;
      c = u >>> 1;
    end else if ((u > 0 && ul > 0) || (u < 0 && ul < 0)) begin
      w = -u;
      c = u;
    end else begin
      w = u;
      c = 3'sd0;
    end
    ci = sd_enc(c);
  end

  // ADD2
  always_comb zi = sd_enc(w + 3'(sd_val(cl)));

endmodule
