// tb_fp_subtractor: self-checking test of the single-precision subtractor.
//
// Every result word and both flags are compared with fp_ref_pkg::ref_sub, a
// double-precision model of the same truncating flow. Each finite result is
// also compared with the true difference x - y: truncation at alignment and
// normalisation may cost under three units in the last place of the larger
// operand, never more. Directed cases cover the worked example
// 2345.125 - 0.75 = 2344.375, signs, large exponent gaps, cancellation to
// zero, overflow and underflow; random cases follow. The test counts how
// often each mechanism occurred (alignment of either operand, shift-out,
// carry and left normalisation, zero result, overflow, underflow) and counts
// a failure for any that never did. The unit is combinational; outputs are
// sampled 1 ns after the operands change.
module tb_fp_subtractor;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  int n_align_x = 0, n_align_y = 0, n_shift_out = 0, n_carry = 0,
      n_left = 0, n_zero = 0, n_ovf = 0, n_unf = 0;

  fp32_t x, y, result;
  logic  overflow, underflow;

  fp_subtractor dut (.x, .y, .result, .overflow, .underflow);

  task automatic check(input logic [31:0] xi, input logic [31:0] yi);
    ref_t   r;
    longint mag;
    int     ex, ey, eb;
    real    err, bound;
    x = xi;
    y = yi;
    #1;
    r = ref_sub(xi, yi, mag);
    checks++;
    if (result !== r.word || overflow !== r.overflow || underflow !== r.underflow) begin
      failures++;
      $display("FAIL %h - %h: got %h o%b u%b expected %h o%b u%b", xi, yi,
               result, overflow, underflow, r.word, r.overflow, r.underflow);
    end
    ex = int'(xi[30:23]);
    ey = int'(yi[30:23]);
    eb = (ex >= ey) ? ex : ey;
    if (!overflow) begin
      err = decode(result) - ((xi[30:23] == 0 ? 0.0 : decode(xi)) -
                              (yi[30:23] == 0 ? 0.0 : decode(yi)));
      if (err < 0.0) err = -err;
      bound = 3.0 * pow2(eb - 150);
      checks++;
      if (err >= bound) begin
        failures++;
        $display("FAIL %h - %h = %h is %g from the true difference", xi, yi, result, err);
      end
    end
    if (ex != 0 && ey != 0) begin
      if (ex > ey) n_align_y++;
      if (ey > ex) n_align_x++;
      if (ex - ey >= 24 || ey - ex >= 24) n_shift_out++;
    end
    if (mag >= 64'sd16777216) n_carry++;
    if (mag != 0 && mag < 64'sd8388608) n_left++;
    if (mag == 0) n_zero++;
    if (r.overflow) n_ovf++;
    if (r.underflow) n_unf++;
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-22s %0d", what, n);
  endtask

  function automatic logic [31:0] rand_fp(input int exp_lo, input int exp_hi);
    logic [31:0] w;
    w = $urandom;
    w[30:23] = 8'(exp_lo + int'($urandom % unsigned'(exp_hi - exp_lo + 1)));
    if (w[30:23] == 8'd0) w[22:0] = '0;
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
    // worked example: 2345.125 - 0.75 = 2344.375
    x = 32'h45129200; y = 32'h3F400000; #1;
    checks++;
    if (result !== 32'h45128600 || overflow || underflow) begin
      failures++;
      $display("FAIL 2345.125 - 0.75 = %h, expected 45128600", result);
    end
    check(32'h45129200, 32'h3F400000);
    check(32'h3F400000, 32'h45129200);       // 0.75 - 2345.125
    check(32'hC5129200, 32'h3F400000);       // -2345.125 - 0.75
    check(32'h45129200, 32'hBF400000);       // 2345.125 + 0.75
    check(32'h3F800000, 32'h3F800000);       // 1 - 1 = 0
    check(32'h3F800000, 32'h33800000);       // 1 - 2^-24: shifted out
    check(32'h4B800000, 32'h3F800000);       // 2^24 - 1
    check(32'h3F800000, 32'hBF800000);       // 1 + 1: carry
    check(32'h3FFFFFFF, 32'hBFFFFFFF);       // carry with truncation
    check(32'h3F800001, 32'h3F800000);       // deep cancellation
    check(32'h00000000, 32'h40490FDB);       // 0 - pi
    check(32'h40490FDB, 32'h00000000);       // pi - 0
    check(32'h00000000, 32'h00000000);       // 0 - 0
    check(32'h7F7FFFFF, 32'hFF7FFFFF);       // overflow
    check(32'hFF000000, 32'h7F000000);       // overflow, negative
    check(32'h00C00000, 32'h00800000);       // 1.5*2^-126 - 2^-126: underflow
    check(32'h00800001, 32'h00800000);       // 2^-149
    check(32'h00400000, 32'h00800000);       // denormal input reads as zero
    for (int k = 0; k < 20000; k++) begin
      unique case (k % 4)
        0: check(rand_fp(0, 254), rand_fp(0, 254));
        1: begin                             // close exponents
          logic [31:0] a;
          a = rand_fp(1, 254);
          check(a, {1'($urandom), 8'(int'(a[30:23]) - 1 + int'($urandom % 3)), 23'($urandom)});
        end
        2: check(rand_fp(1, 4), rand_fp(1, 4));
        default: check(rand_fp(250, 254), rand_fp(250, 254));
      endcase
    end

    need("align x", n_align_x);
    need("align y", n_align_y);
    need("shift out", n_shift_out);
    need("carry normalise", n_carry);
    need("left normalise", n_left);
    need("zero result", n_zero);
    need("overflow", n_ovf);
    need("underflow", n_unf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
