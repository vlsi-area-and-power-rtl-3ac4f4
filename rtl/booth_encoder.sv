// Radix-4 Booth recoder for one overlapping group of three multiplier bits.
//
// The multiplier B is extended with a zero below its LSB, and group i is
// {B[2i+1], B[2i], B[2i-1]}. The group maps to the digit
//   d = -2*g[2] + g[1] + g[0]
// so that B = sum_i d_i * 4^i, which halves the number of partial products
// compared with plain shift-and-add. The digit is emitted as sign/magnitude
// flags (see tacbm_pkg): the all-ones group gives +0, never -0, so a zero
// digit always produces an all-zero row.
//
// Purely combinational, no clock.
module booth_encoder
  import tacbm_pkg::*;
(
  input  logic [2:0]   grp,  // {b[2i+1], b[2i], b[2i-1]}
  output booth_digit_t dig
);

  always_comb begin
    dig.one = grp[1] ^ grp[0];
    dig.two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    dig.neg = grp[2] & ~(grp[1] & grp[0]);
  end

endmodule
