// sd_adder - P-digit carry-free radix-2 signed-digit adder.
//
// A row of P sdfa cells. Cell i sees its own digit pair, the pair below it and
// the carry of the cell below; below digit 0 all of these are 0. The sum has
// P+1 digits: z_P is the carry out of the top cell. Every sum digit depends on
// at most three digit positions of the operands, so the delay does not grow
// with P. Operands and sum use the two-wire digit code of sdfp_pkg, digit i in
// bits [2i+1:2i]. Purely combinational.
//
// Follows the original architecture; the zero inputs below digit 0 are this
// implementation's reading of what feeds the lowest cell.
module sd_adder
  import sdfp_pkg::*;
#(
  parameter int P = 26
) (
  input  logic [2*P-1:0]     x,
  input  logic [2*P-1:0]     y,
  output logic [2*(P+1)-1:0] z
);

  sd_digit_t xd [-1:P-1];
  sd_digit_t yd [-1:P-1];
  sd_digit_t c  [-1:P-1];

  always_comb begin
    xd[-1] = SD_ZERO;
    yd[-1] = SD_ZERO;
    for (int i = 0; i < P; i++) begin
      xd[i] = x[2*i +: 2];
      yd[i] = y[2*i +: 2];
    end
  end

  assign c[-1] = SD_ZERO;

  for (genvar i = 0; i < P; i++) begin : g_cell
    sdfa u_sdfa (
      .xi(xd[i]), .yi(yd[i]), .xl(xd[i-1]), .yl(yd[i-1]),
      .cl(c[i-1]), .ci(c[i]), .zi(z[2*i +: 2])
    );
  end

  assign z[2*P +: 2] = c[P-1];

endmodule
