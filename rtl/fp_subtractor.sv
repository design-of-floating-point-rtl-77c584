// fp_subtractor: IEEE 754 single-precision subtraction, result = x - y.
//
// Purely combinational, in the order of the usual floating-point add/subtract
// flow:
//   1. Align: the larger exponent is the initial result exponent; the
//      significand of the operand with the smaller exponent is shifted right
//      by the exponent difference. Bits shifted out are dropped, so a
//      difference of 24 or more leaves that operand as zero and the result
//      equals the larger operand.
//   2. Subtract: both aligned significands are given their signs (y's sign
//      inverted) as 26-bit two's complement numbers and added. The sum is
//      turned back into sign and magnitude.
//   3. Normalise: a carry out of the 24-bit significand shifts the magnitude
//      right by one and increments the exponent; leading zeros (cancellation)
//      shift it left and decrement the exponent by their number.
//   4. Check: overflow returns infinity and raises overflow, underflow
//      returns a denormal or zero and raises underflow, and a zero magnitude
//      returns +0 with its exponent cleared (see fp_pkg::fp_pack).
//
// Ports: x, y operands; result; overflow and underflow flags for the
// exception/error exit of the flow. Delay: one combinational path.
//
// The four steps, the truncating alignment and the two's complement handling
// of negative significands follow the described design. This design's own
// choices: operands with a zero exponent are read as zero (denormal inputs
// are flushed), exponent 255 is treated like any other exponent (no NaN or
// infinity input handling), normalisation truncates, and an exact zero is +0.
module fp_subtractor
  import fp_pkg::*;
(
  input  fp32_t x,
  input  fp32_t y,
  output fp32_t result,
  output logic  overflow,
  output logic  underflow
);

  logic [MANT_W-1:0]     mx, my;        // significands with hidden bit
  logic                  x_big;         // x has the larger (or equal) exponent
  logic [EXP_W-1:0]      exp_big, exp_diff;
  logic [MANT_W-1:0]     mx_al, my_al;  // aligned significands
  logic signed [MANT_W+1:0] vx, vy, sum;
  logic                  res_sign;
  logic [MANT_W:0]       mag;           // magnitude incl. carry bit
  logic [4:0]            lz;
  logic [MANT_W-1:0]     mant_n;
  exp_wide_t             exp_n;
  fp_result_t            packed_r;

  always_comb begin
    mx = {x.exp != '0, x.frac} & {MANT_W{x.exp != '0}};
    my = {y.exp != '0, y.frac} & {MANT_W{y.exp != '0}};

    // 1. align
    x_big    = x.exp >= y.exp;
    exp_big  = x_big ? x.exp : y.exp;
    exp_diff = x_big ? (x.exp - y.exp) : (y.exp - x.exp);
    if (x_big) begin
      mx_al = mx;
      my_al = (exp_diff >= EXP_W'(MANT_W)) ? '0 : (my >> exp_diff);
    end else begin
      mx_al = (exp_diff >= EXP_W'(MANT_W)) ? '0 : (mx >> exp_diff);
      my_al = my;
    end

    // 2. subtract in two's complement, back to sign-magnitude
    vx  = x.sign ? -$signed({2'b00, mx_al}) : $signed({2'b00, mx_al});
    vy  = y.sign ? $signed({2'b00, my_al}) : -$signed({2'b00, my_al});
    sum = vx + vy;
    res_sign = sum[MANT_W+1];
    mag      = res_sign ? MANT_W'(0) - sum[MANT_W:0] : sum[MANT_W:0];
    // (|sum| <= 2^25 - 2, so the magnitude always fits in MANT_W+1 bits)

    // 3. normalise
    lz = lzc24(mag[MANT_W-1:0]);
    if (mag[MANT_W]) begin
      mant_n = mag[MANT_W:1];
      exp_n  = exp_wide_t'(exp_big) + exp_wide_t'(1);
    end else begin
      mant_n = mag[MANT_W-1:0] << lz;
      exp_n  = exp_wide_t'(exp_big) - exp_wide_t'(lz);
    end

    // 4. range check and packing
    packed_r  = fp_pack(res_sign, exp_n, mant_n);
    result    = packed_r.value;
    overflow  = packed_r.overflow;
    underflow = packed_r.underflow;
  end

endmodule
