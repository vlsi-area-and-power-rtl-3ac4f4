// Radix-4 Booth partial-product row generator.
//
// Given the N-bit two's-complement multiplicand A and a Booth digit d, it
// produces an (N+1)-bit row R and a separate correction bit `neg` such that
//   signed(R) + neg = d * A.
// The magnitude |d|*A is chosen by a 2:1 selection between A (sign-extended
// to N+1 bits) and A shifted left by one; a negative digit inverts the row and
// leaves the +1 of the two's-complement negation to the `neg` bit, which the
// adder places at the row's least significant column. Keeping the +1 apart
// is what makes -2 * (-2^(N-1)) = 2^N representable.
//
// Purely combinational, no clock.
module booth_pp_gen
  import tacbm_pkg::*;
#(
  parameter int unsigned N = DEF_N  // multiplicand width
) (
  input  logic [N-1:0] a,    // multiplicand, two's complement
  input  booth_digit_t dig,  // Booth digit of this row
  output logic [N:0]   row,  // inverted or plain |d|*A, N+1 bits, two's complement
  output logic         neg   // +1 to add at the row's LSB column
);

  logic [N:0] mag;

  always_comb begin
    unique case (1'b1)
      dig.one: mag = {a[N-1], a};
      dig.two: mag = {a, 1'b0};
      default: mag = '0;
    endcase
    row = mag ^ {(N + 1){dig.neg}};
    neg = dig.neg;
  end

endmodule
