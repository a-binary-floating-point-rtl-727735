// shift_amount - postnormalization shift count taken directly from an SD number.
//
// Works on the N-digit SD sum in parallel with sd_decoder, so the shift count is
// ready when the binary magnitude is. Scanning from the top digit:
//   - every 0 digit above the leading nonzero digit d adds one to t;
//   - after d, every digit equal to -d adds one more, since (d, -d) has the
//     value of (0, d): the leading one moves down one place;
//   - the first digit that is neither stops the count (a digit equal to d
//     stops it at once).
// The result is the number of leading zeros of |z|, or one less when the
// digits after the stop are zeros followed by a digit of sign -d (then |z| is
// just below the anticipated power of two). lshift_round removes that
// remaining one-place error by looking at the top bit after shifting.
// zero = 1 when every digit is 0 (t is then N). Purely combinational.
//
// The scanning rule follows the original architecture; the statement of when
// it is one short, and the correction in lshift_round, are this
// implementation's.
module shift_amount
  import sdfp_pkg::*;
#(
  parameter int N = 27,
  localparam int T_W = $clog2(N + 1)
) (
  input  logic [2*N-1:0] z,
  output logic [T_W-1:0] t,
  output logic           zero
);

  typedef enum logic [1:0] {SCAN_ZEROS, SCAN_RUN, SCAN_DONE} scan_t;

  scan_t     st;
  sd_digit_t d;
  logic      lead_neg;   // sign wire of the leading nonzero digit

  always_comb begin
    st   = SCAN_ZEROS;
    t    = '0;
    lead_neg = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      d = z[2*i +: 2];
      unique case (st)
        SCAN_ZEROS:
          if (!d[0]) t = t + 1'b1;
          else begin
            lead_neg = d[1];
            st   = SCAN_RUN;
          end
        SCAN_RUN:
          if (d[0] && (d[1] != lead_neg)) t = t + 1'b1;
          else st = SCAN_DONE;
        default: ;
      endcase
    end
    zero = (st == SCAN_ZEROS);
  end

endmodule
