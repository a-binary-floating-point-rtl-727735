// sdfp_pkg - shared types and helpers for the signed-digit floating-point adder.
//
// A radix-2 signed digit takes a value in {-1, 0, +1}. It is carried on two
// wires [sign, abs]: 2'b00 is 0, 2'b01 is +1, 2'b11 is -1. The code 2'b10
// ("negative zero") is never produced by any block and is read as 0. This
// two-wire code is the one the design is built around; a p-digit SD number is
// therefore a 2p-bit vector with digit i in bits [2i+1:2i].
package sdfp_pkg;

  typedef logic [1:0] sd_digit_t;

  localparam sd_digit_t SD_ZERO = 2'b00;
  localparam sd_digit_t SD_POS  = 2'b01;
  localparam sd_digit_t SD_NEG  = 2'b11;

  // Digit value as a 2-bit signed integer (-1, 0 or +1).
  function automatic logic signed [1:0] sd_val(sd_digit_t d);
    if (!d[0])     return 2'sd0;
    else if (d[1]) return -2'sd1;
    else           return 2'sd1;
  endfunction

  // Encode a value in -1..+1 as a digit.
  function automatic sd_digit_t sd_enc(logic signed [2:0] v);
    if (v > 0)      return SD_POS;
    else if (v < 0) return SD_NEG;
    else            return SD_ZERO;
  endfunction

endpackage
