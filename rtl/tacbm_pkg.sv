// Shared types and default sizes of the truncated, approximate-carry Booth
// multiplier (TACBM).
//
// A radix-4 Booth digit of the multiplier takes one of the values
// {-2,-1,0,+1,+2}. It is carried between the recoder and the partial-product
// generator as three one-hot-style flags: `one` selects the multiplicand,
// `two` selects the multiplicand shifted left by one, and `neg` asks for the
// row to be inverted with a +1 added at the row's least significant column.
// The 16-bit operand width and the truncation factor Z = 10 are the sizes the
// design is evaluated at; the compensation bias is this design's own choice.
package tacbm_pkg;

  typedef struct packed {
    logic neg;  // digit is negative: row is inverted, +1 added at its LSB column
    logic one;  // |digit| == 1
    logic two;  // |digit| == 2
  } booth_digit_t;

  localparam int unsigned DEF_N    = 16;  // operand width
  localparam int unsigned DEF_Z    = 10;  // truncation factor: product columns dropped
  localparam int unsigned DEF_BIAS = 3;   // rounding bias of the carry estimate

endpackage
