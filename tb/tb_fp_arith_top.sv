// tb_fp_arith_top: end-to-end test of fp_arith_top at its default (and
// only) configuration.
//
// Both units are driven at once with independent operands and compared
// with the double-precision reference models of fp_ref_pkg. It first runs
// the worked example through both units (2345.125 - 0.75 = 2344.375 and
// 2345.125 * 0.75 = 1758.84375), then random and directed operands. It
// counts each mechanism of the design and fails if one never occurred:
// subtractor alignment, shift-out, carry and left normalisation, overflow
// and underflow; multiplier zero operand, renormalisation, overflow and
// underflow; and the Booth multiplier's operand exchange (taking the
// operand with fewer bit changes as the multiplier) both taken and not
// taken. The design is combinational: outputs are sampled 1 ns after the
// operands change.
module tb_fp_arith_top;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  int n_align = 0, n_shift_out = 0, n_carry = 0, n_left = 0, n_sub_ovf = 0,
      n_sub_unf = 0, n_zero_in = 0, n_norm = 0, n_mul_ovf = 0, n_mul_unf = 0,
      n_swap = 0, n_no_swap = 0;

  fp32_t sub_x, sub_y, sub_result, mul_x, mul_y, mul_result;
  logic  sub_overflow, sub_underflow, mul_overflow, mul_underflow;

  fp_arith_top dut (.*);

  // Changes of a 25-bit zero-extended significand, counted from bit 0 up.
  function automatic int changes25(input logic [23:0] v);
    logic [25:0] vv = {1'b0, v, 1'b0};
    int n = 0;
    for (int i = 0; i < 25; i++) n += int'(vv[i+1] != vv[i]);
    return n;
  endfunction

  task automatic apply(input logic [31:0] sx, input logic [31:0] sy,
                       input logic [31:0] mx, input logic [31:0] my);
    ref_t   rs, rm;
    longint mag;
    sub_x = sx; sub_y = sy; mul_x = mx; mul_y = my;
    #1;
    rs = ref_sub(sx, sy, mag);
    rm = ref_mul(mx, my);
    checks++;
    if (sub_result !== rs.word || sub_overflow !== rs.overflow ||
        sub_underflow !== rs.underflow) begin
      failures++;
      $display("FAIL sub %h - %h: got %h expected %h", sx, sy, sub_result, rs.word);
    end
    checks++;
    if (mul_result !== rm.word || mul_overflow !== rm.overflow ||
        mul_underflow !== rm.underflow) begin
      failures++;
      $display("FAIL mul %h * %h: got %h expected %h", mx, my, mul_result, rm.word);
    end
    if (sx[30:23] != 0 && sy[30:23] != 0 && sx[30:23] != sy[30:23]) n_align++;
    if (sx[30:23] != 0 && sy[30:23] != 0 &&
        (int'(sx[30:23]) - int'(sy[30:23]) >= 24 || int'(sy[30:23]) - int'(sx[30:23]) >= 24))
      n_shift_out++;
    if (mag >= 64'sd16777216) n_carry++;
    if (mag != 0 && mag < 64'sd8388608) n_left++;
    if (rs.overflow) n_sub_ovf++;
    if (rs.underflow) n_sub_unf++;
    if (mx[30:23] == 0 || my[30:23] == 0) n_zero_in++;
    else if (sig(mx) * sig(my) >= 64'sd140737488355328) n_norm++;
    if (rm.overflow) n_mul_ovf++;
    if (rm.underflow) n_mul_unf++;
    if (changes25({1'b1, my[22:0]}) > changes25({1'b1, mx[22:0]})) n_swap++;
    else n_no_swap++;
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-22s %0d", what, n);
  endtask

  function automatic logic [31:0] rand_fp();
    logic [31:0] w;
    w = $urandom;
    if (w[30:23] == 8'd0 || w[30:23] == 8'd255) w[22:0] = '0;
    if (w[30:23] == 8'd255) w[30:23] = 8'd254;
    return w;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the worked example through both units at once
    sub_x = 32'h45129200; sub_y = 32'h3F400000;
    mul_x = 32'h45129200; mul_y = 32'h3F400000;
    #1;
    checks++;
    if (sub_result !== 32'h45128600 || mul_result !== 32'h44DBDB00) begin
      failures++;
      $display("FAIL worked example: %h %h", sub_result, mul_result);
    end
    apply(32'h45129200, 32'h3F400000, 32'h45129200, 32'h3F400000);
    apply(32'h7F7FFFFF, 32'hFF7FFFFF, 32'h7F000000, 32'h40000000);
    apply(32'h00C00000, 32'h00800000, 32'h00800000, 32'h3F000000);
    apply(32'h3F800001, 32'h3F800000, 32'h00000000, 32'h3F800000);
    for (int k = 0; k < 10000; k++) begin
      apply(rand_fp(), rand_fp(), rand_fp(), rand_fp());
    end

    need("sub align", n_align);
    need("sub shift out", n_shift_out);
    need("sub carry normalise", n_carry);
    need("sub left normalise", n_left);
    need("sub overflow", n_sub_ovf);
    need("sub underflow", n_sub_unf);
    need("mul zero operand", n_zero_in);
    need("mul product >= 2", n_norm);
    need("mul overflow", n_mul_ovf);
    need("mul underflow", n_mul_unf);
    need("booth operand swap", n_swap);
    need("booth no swap", n_no_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
