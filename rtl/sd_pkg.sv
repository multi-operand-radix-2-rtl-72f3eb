// sd_pkg: shared types and helpers for the radix-2 signed-digit (SD) adders.
//
// A radix-2 SD number X = sum x_i * 2^i has digits x_i in {-1, 0, 1}. Each
// digit is held as a 2-bit two's complement value: 2'b01 = 1, 2'b00 = 0,
// 2'b11 = -1. The code 2'b10 (-2) is not a digit and must never appear on a
// digit wire; the adders assert this. The encoding is this design's choice;
// the circuit it models carries a digit as a bidirectional unit current.
package sd_pkg;

  typedef logic signed [1:0] sd_digit_t;

  localparam sd_digit_t SD_NEG  = 2'sb11;
  localparam sd_digit_t SD_ZERO = 2'sb00;
  localparam sd_digit_t SD_POS  = 2'sb01;

  // Number of operands the multi-operand adder takes (K, L, M, N, O, P).
  localparam int unsigned NUM_OPS = 6;

  // True for the three legal digit codes.
  function automatic logic sd_valid(sd_digit_t d);
    return d != 2'sb10;
  endfunction

endpackage
