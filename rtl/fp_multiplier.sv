// fp_multiplier: IEEE 754 single-precision multiplication, result = x * y,
// with the 24 x 24-bit significand product formed by a radix-2 Booth
// multiplier.
//
// Purely combinational, in the order of the multiplication flow:
//   1. If either operand is zero (zero exponent) the result is +0.
//   2. Sign = sign(x) XOR sign(y).
//   3. The significands, hidden bit included, are multiplied by
//      booth_multiplier (unsigned mode) into a 48-bit product in [1, 4).
//   4. Exponent = biased exp(x) + biased exp(y) - 127.
//   5. Normalise: a product of 2 or more is shifted right by one and the
//      exponent incremented. The product is then cut to 24 bits: the lower
//      bits are dropped (truncation, no rounding).
//   6. Check: overflow returns +/- infinity and raises overflow; underflow
//      returns a denormal (exponent 0, hidden bit 0) or zero and raises
//      underflow (see fp_pkg::fp_pack).
//
// Ports: x, y operands; result; overflow and underflow flags for the
// exception/error exit of the flow. Delay: one combinational path through
// the Booth array.
//
// Steps 1-6, truncation to 24 bits, infinity on overflow and the denormal on
// underflow follow the described design. This design's own choices: denormal
// inputs count as zero, exponent 255 inputs are not treated as NaN or
// infinity, the zero result is +0, and the 24 kept bits are the 24 below the
// leading one (so no bit is lost when the product is below 2).
module fp_multiplier
  import fp_pkg::*;
(
  input  fp32_t x,
  input  fp32_t y,
  output fp32_t result,
  output logic  overflow,
  output logic  underflow
);

  logic [MANT_W-1:0]   mx, my;
  logic [2*MANT_W-1:0] prod;
  // The Booth block's step count is only of interest when observing it.
  logic [$clog2(MANT_W+2)-1:0] booth_ops;
  logic                is_zero, sign;
  exp_wide_t           exp_sum, exp_n;
  logic [MANT_W-1:0]   mant_n;
  fp_result_t          packed_r;

  assign mx = {1'b1, x.frac};
  assign my = {1'b1, y.frac};

  booth_multiplier #(
    .WIDTH      (MANT_W),
    .SIGNED_OPS (1'b0)
  ) u_booth (
    .a        (mx),
    .b        (my),
    .product  (prod),
    .op_count (booth_ops)
  );

  always_comb begin
    is_zero = (x.exp == '0) || (y.exp == '0);
    sign    = x.sign ^ y.sign;
    exp_sum = exp_wide_t'(x.exp) + exp_wide_t'(y.exp) - exp_wide_t'(BIAS);
    if (prod[2*MANT_W-1]) begin
      mant_n = prod[2*MANT_W-1:MANT_W];
      exp_n  = exp_sum + exp_wide_t'(1);
    end else begin
      mant_n = prod[2*MANT_W-2:MANT_W-1];
      exp_n  = exp_sum;
    end
    packed_r  = is_zero ? '0 : fp_pack(sign, exp_n, mant_n);
    result    = packed_r.value;
    overflow  = packed_r.overflow;
    underflow = packed_r.underflow;
  end

endmodule
