// Approximate carry compensation for a truncated multiplier.
//
// Dropping every partial-product bit in the product columns below Z removes a
// value T from the product; exactly, floor(T / 2^Z) carries would have entered
// column Z. Rather than build the adder tree for the dropped columns, this
// block estimates the carry from only the two most significant dropped
// columns, Z-1 and Z-2:
//   carry = (2*ones(col Z-1) + ones(col Z-2) + BIAS) >> 2
// The estimate models each row's remaining lower bits as worth half their
// range on average; BIAS = 3 centres the error of the 16-bit, Z = 10 design
// near zero. Which dropped bits feed the estimate and the bias are this
// design's own choice; the idea of adding an approximate carry from the
// truncated part at column Z is the TACBM method. The carry word is added at
// column Z by the multiplier's adder.
//
// Interface: `col_hi` and `col_lo` hold the bits of columns Z-1 and Z-2 (any
// order, unused positions tied to 0). Purely combinational, no clock.
module approx_carry_comp #(
  parameter int unsigned W_HI = 9,   // bit slots of column Z-1
  parameter int unsigned W_LO = 9,   // bit slots of column Z-2
  parameter int unsigned BIAS = 3,   // rounding bias, in units of 2^(Z-2)
  parameter int unsigned CW   = $clog2((2 * W_HI + W_LO + BIAS) / 4 + 1)  // carry width
) (
  input  logic [W_HI-1:0] col_hi,
  input  logic [W_LO-1:0] col_lo,
  output logic [CW-1:0]   carry   // estimated carry into column Z
);

  localparam int unsigned SW = $clog2(2 * W_HI + W_LO + BIAS + 1);  // weighted-sum width

  logic [SW-1:0] sum_w;

  always_comb begin
    sum_w = SW'(BIAS);
    for (int unsigned i = 0; i < W_HI; i++) sum_w = sum_w + SW'({col_hi[i], 1'b0});
    for (int unsigned i = 0; i < W_LO; i++) sum_w = sum_w + SW'(col_lo[i]);
  end

  assign carry = CW'(sum_w >> 2);

endmodule
