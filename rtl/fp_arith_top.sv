// fp_arith_top: the single-precision floating-point subtractor and the
// floating-point multiplier (with its Booth significand multiplier) side by
// side. Each unit has its own operands, result and overflow/underflow flags;
// both are combinational, so results follow their operands after one
// propagation delay and there is no clock or reset.
//
// The set of units follows the described design; giving each unit its own
// operand ports rather than sharing one operand pair is this design's choice.
module fp_arith_top
  import fp_pkg::*;
(
  input  fp32_t sub_x,
  input  fp32_t sub_y,
  output fp32_t sub_result,
  output logic  sub_overflow,
  output logic  sub_underflow,
  input  fp32_t mul_x,
  input  fp32_t mul_y,
  output fp32_t mul_result,
  output logic  mul_overflow,
  output logic  mul_underflow
);

  fp_subtractor u_fps (
    .x         (sub_x),
    .y         (sub_y),
    .result    (sub_result),
    .overflow  (sub_overflow),
    .underflow (sub_underflow)
  );

  fp_multiplier u_fpm (
    .x         (mul_x),
    .y         (mul_y),
    .result    (mul_result),
    .overflow  (mul_overflow),
    .underflow (mul_underflow)
  );

endmodule
