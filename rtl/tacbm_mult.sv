// Truncated and approximate-carry Booth multiplier (TACBM).
//
// Signed N x N multiplication in radix-4 Booth form: the multiplier B is
// recoded into N/2 digits in {-2..+2} (booth_encoder), each digit selects a
// partial-product row of the multiplicand A (booth_pp_gen), and the rows,
// shifted by 2i columns, are added. To save area and power, every
// partial-product bit in the product columns below the truncation factor Z is
// not formed or added at all, including the negation +1 bits that fall there.
// The carry those columns would have produced is replaced by an estimate
// (approx_carry_comp) computed from the bits of columns Z-1 and Z-2 alone and
// added at column Z. Product bits below Z are therefore always zero.
//
// With N = 16 and Z = 10 (the evaluated configuration) the estimate brings the
// mean error close to zero. The row sum here is written as one parallel add
// of sign-extended, masked rows; synthesis builds the compressor tree. How the
// carry is estimated and the parameter limits (N even, 2 <= Z <= N) are this
// design's own choices.
//
// Interface: a, b are two's-complement operands; p is the approximate 2N-bit
// two's-complement product. Purely combinational, no clock.
module tacbm_mult
  import tacbm_pkg::*;
#(
  parameter int unsigned N    = DEF_N,    // operand width (even)
  parameter int unsigned Z    = DEF_Z,    // truncation factor
  parameter int unsigned BIAS = DEF_BIAS  // compensation rounding bias
) (
  input  logic [N-1:0]   a,  // multiplicand
  input  logic [N-1:0]   b,  // multiplier
  output logic [2*N-1:0] p   // approximate product, p[Z-1:0] = 0
);

  localparam int unsigned NR = N / 2;   // partial-product rows
  localparam int unsigned CS = NR + 1;  // bit slots per compensation column
  localparam logic [2*N-1:0] KEEP = ~((2 * N)'((64'd1 << Z) - 64'd1));  // kept columns

  if ((N % 2) != 0 || Z < 2 || Z > N) begin : g_bad_params
    $error("tacbm_mult: need N even and 2 <= Z <= N");
  end

  logic [N:0]   bx;                  // multiplier with a zero below its LSB
  booth_digit_t dig [NR];
  logic [N:0]   row [NR];
  logic [NR-1:0] neg;
  logic [CS-1:0] col_hi, col_lo;    // bits of columns Z-1 and Z-2
  logic [$clog2((3 * CS + BIAS) / 4 + 1)-1:0] carry;

  assign bx = {b, 1'b0};

  for (genvar i = 0; i < NR; i++) begin : g_row
    booth_encoder u_enc (
      .grp(bx[2*i+2 -: 3]),
      .dig(dig[i])
    );
    booth_pp_gen #(.N(N)) u_pp (
      .a  (a),
      .dig(dig[i]),
      .row(row[i]),
      .neg(neg[i])
    );
  end

  // Gather the partial-product bits that sit in columns Z-1 and Z-2. Row i
  // starts at column 2i; its negation bit sits at column 2i.
  always_comb begin
    col_hi = '0;
    col_lo = '0;
    for (int unsigned i = 0; i < NR; i++) begin
      if (2 * i <= Z - 1) col_hi[i] = row[i][Z-1-2*i];
      if (2 * i <= Z - 2) col_lo[i] = row[i][Z-2-2*i];
      if (2 * i == Z - 1) col_hi[NR] = neg[i];
      if (2 * i == Z - 2) col_lo[NR] = neg[i];
    end
  end

  approx_carry_comp #(
    .W_HI(CS),
    .W_LO(CS),
    .BIAS(BIAS)
  ) u_comp (
    .col_hi(col_hi),
    .col_lo(col_lo),
    .carry (carry)
  );

  // Add the kept part of every row, the negation bits at or above column Z,
  // and the estimated carry at column Z.
  always_comb begin
    logic [2*N-1:0] acc;
    acc = (2 * N)'(carry) << Z;
    for (int unsigned i = 0; i < NR; i++) begin
      acc = acc + (((2 * N)'($signed(row[i])) << (2 * i)) & KEEP);
      if (2 * i >= Z) acc = acc + ((2 * N)'(neg[i]) << (2 * i));
    end
    p = acc;
  end

endmodule
