// Registered TACBM multiplier: the design's top level.
//
// The operands are captured in input registers, multiplied by the
// combinational truncated, approximate-carry Booth multiplier (tacbm_mult),
// and the product is captured in an output register, so the multiplier sits
// alone between two register stages. A valid flag travels alongside the data.
// The register wrapper and its valid flag are this design's own choice.
//
// Timing: a pair driven with in_valid in cycle k is sampled by the input
// registers at the end of that cycle and its product is on p, with
// out_valid high, after the second rising edge, in cycle k+2 (latency 2,
// one result per cycle). rst_n is an
// active-low synchronous reset that clears the valid flags and the data
// registers.
module tacbm_top
  import tacbm_pkg::*;
#(
  parameter int unsigned N    = DEF_N,    // operand width
  parameter int unsigned Z    = DEF_Z,    // truncation factor
  parameter int unsigned BIAS = DEF_BIAS  // compensation rounding bias
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,          // multiplicand, two's complement
  input  logic [N-1:0]   b,          // multiplier, two's complement
  output logic           out_valid,
  output logic [2*N-1:0] p           // approximate product
);

  logic [N-1:0]   a_q, b_q;
  logic           v_q;
  logic [2*N-1:0] p_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q       <= '0;
      b_q       <= '0;
      v_q       <= 1'b0;
      p         <= '0;
      out_valid <= 1'b0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
      if (in_valid) begin
        a_q <= a;
        b_q <= b;
      end
      if (v_q) p <= p_d;
    end
  end

  tacbm_mult #(
    .N   (N),
    .Z   (Z),
    .BIAS(BIAS)
  ) u_mult (
    .a(a_q),
    .b(b_q),
    .p(p_d)
  );

endmodule
