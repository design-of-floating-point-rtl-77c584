// tb_fp_multiplier: self-checking test of the single-precision multiplier.
//
// Every result word and both flags are compared with fp_ref_pkg::ref_mul,
// which forms the exact product in double precision (24 x 24 significand
// bits fit) and truncates it toward zero: the multiplier's truncation of the
// 48-bit product makes its result exactly that. Directed cases cover the
// worked example 2345.125 * 0.75 = 1758.84375, zero operands, signs,
// overflow to infinity and underflow to denormals and to zero; random
// cases follow. The test counts how often each mechanism occurred (zero
// operand, product >= 2 renormalised, product < 2, negative result,
// overflow, underflow to a denormal, underflow to zero) and counts a failure
// for any that never did. The unit is combinational; outputs are sampled
// 1 ns after the operands change.
module tb_fp_multiplier;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  int n_zero_in = 0, n_norm = 0, n_no_norm = 0, n_neg = 0, n_ovf = 0,
      n_denorm = 0, n_flush = 0;

  fp32_t x, y, result;
  logic  overflow, underflow;

  fp_multiplier dut (.x, .y, .result, .overflow, .underflow);

  task automatic check(input logic [31:0] xi, input logic [31:0] yi);
    ref_t r;
    x = xi;
    y = yi;
    #1;
    r = ref_mul(xi, yi);
    checks++;
    if (result !== r.word || overflow !== r.overflow || underflow !== r.underflow) begin
      failures++;
      $display("FAIL %h * %h: got %h o%b u%b expected %h o%b u%b", xi, yi,
               result, overflow, underflow, r.word, r.overflow, r.underflow);
    end
    if (xi[30:23] == 0 || yi[30:23] == 0) n_zero_in++;
    else begin
      if (sig(xi) * sig(yi) >= 64'sd140737488355328) n_norm++;   // >= 2^47
      else n_no_norm++;
      if (r.word[31]) n_neg++;
    end
    if (r.overflow) n_ovf++;
    if (r.underflow && r.word[30:0] != 0) n_denorm++;
    if (r.underflow && r.word[30:0] == 0) n_flush++;
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
    // worked example: 2345.125 * 0.75 = 1758.84375
    x = 32'h45129200; y = 32'h3F400000; #1;
    checks++;
    if (result !== 32'h44DBDB00 || overflow || underflow) begin
      failures++;
      $display("FAIL 2345.125 * 0.75 = %h, expected 44dbdb00", result);
    end
    check(32'h45129200, 32'h3F400000);
    check(32'hC5129200, 32'h3F400000);       // negative
    check(32'h3FC00000, 32'h3FC00000);       // 1.5 * 1.5 = 2.25: renormalise
    check(32'h3F800000, 32'h3F800000);       // 1 * 1
    check(32'h3FFFFFFF, 32'h3FFFFFFF);       // truncation
    check(32'h00000000, 32'h40490FDB);       // 0 * pi
    check(32'hC0490FDB, 32'h80000000);       // -pi * -0
    check(32'h00400000, 32'h3F800000);       // denormal input reads as zero
    check(32'h7F000000, 32'h40000000);       // 2^127 * 2 -> overflow
    check(32'h7F7FFFFF, 32'h3F800001);       // just over
    check(32'h7F7FFFFF, 32'h3F800000);       // just fits
    check(32'h00800000, 32'h3F000000);       // 2^-127: denormal
    check(32'h00800000, 32'h34000000);       // 2^-149
    check(32'h00800000, 32'h33800000);       // 2^-150: flushes to zero
    check(32'h0DA24260, 32'h3210D2E4);       // deep underflow
    for (int k = 0; k < 20000; k++) begin
      unique case (k % 4)
        0: check(rand_fp(0, 254), rand_fp(0, 254));
        1: check(rand_fp(100, 154), rand_fp(100, 154));
        2: check(rand_fp(1, 110), rand_fp(1, 110));
        default: check(rand_fp(150, 254), rand_fp(150, 254));
      endcase
    end

    need("zero operand", n_zero_in);
    need("product >= 2", n_norm);
    need("product < 2", n_no_norm);
    need("negative result", n_neg);
    need("overflow", n_ovf);
    need("underflow denormal", n_denorm);
    need("underflow to zero", n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
