// fp_pkg: types and helpers shared by the IEEE 754 single-precision
// subtractor and multiplier.
//
// fp32_t is the 32-bit word split into its sign, biased exponent (bias 127)
// and 23-bit fraction. Both arithmetic units finish the same way: they hold a
// sign, a signed biased exponent that may have left the 1..254 range, and a
// 24-bit significand that is either zero or has its leading one at bit 23.
// fp_pack turns that into the output word and the two exception flags:
//   * significand zero           -> +0 (exponent forced to zero)
//   * exponent >= 255            -> overflow, +/- infinity (exponent 255,
//                                   fraction zero)
//   * exponent <= 0              -> underflow, exponent 0 and the significand
//                                   shifted right into a denormal (truncated;
//                                   zero once all bits are shifted out)
//   * otherwise                  -> normal number, hidden bit dropped
// Overflow to infinity, the zero exponent of a zero result and the denormal
// encoding on underflow follow the described behaviour; the sign of a zero
// result and truncation (not rounding) of denormals are this design's choices.
package fp_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned MANT_W = FRAC_W + 1;  // significand with hidden bit
  localparam int          BIAS   = 127;
  localparam int          EXP_INF = 255;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  // Signed exponent wide enough for 255 + 255 - 127 + 1 and 1 - 127 - 23.
  typedef logic signed [10:0] exp_wide_t;

  typedef struct packed {
    fp32_t value;
    logic  overflow;
    logic  underflow;
  } fp_result_t;

  // Number of leading zeros of a 24-bit significand (24 when it is zero).
  function automatic logic [4:0] lzc24(input logic [MANT_W-1:0] v);
    logic [4:0] n;
    logic       found;
    n = 5'd0;
    found = 1'b0;
    for (int i = MANT_W - 1; i >= 0; i--) begin
      if (!found && v[i]) found = 1'b1;
      else if (!found) n = n + 5'd1;
    end
    return n;
  endfunction

  // Pack sign, unbounded biased exponent and normalised significand.
  function automatic fp_result_t fp_pack(input logic sign, input exp_wide_t exp,
                                         input logic [MANT_W-1:0] mant);
    fp_result_t r;
    exp_wide_t  shift;
    logic [FRAC_W-1:0] den;
    r = '0;
    if (mant == '0) begin
      r.value = '0;
    end else if (exp >= exp_wide_t'(EXP_INF)) begin
      r.overflow   = 1'b1;
      r.value.sign = sign;
      r.value.exp  = EXP_W'(EXP_INF);
      r.value.frac = '0;
    end else if (exp <= 0) begin
      r.underflow  = 1'b1;
      shift        = exp_wide_t'(1) - exp;
      den          = (shift >= exp_wide_t'(MANT_W)) ? '0 : FRAC_W'(mant >> shift);
      r.value.sign = sign;
      r.value.exp  = '0;
      r.value.frac = den;
    end else begin
      r.value.sign = sign;
      r.value.exp  = exp[EXP_W-1:0];
      r.value.frac = mant[FRAC_W-1:0];
    end
    return r;
  endfunction

endpackage
