// tb_booth_multiplier: self-checking test of the radix-2 Booth multiplier.
//
// Four instances are checked against the simulator's own '*':
//   * 24-bit signed (the default), with corner values (0, +-1, the most
//     negative and most positive numbers) and random operands;
//   * 24-bit unsigned, as used for floating-point significands;
//   * 4-bit signed with 4 * 4 = 16 and 5-bit signed with 14 * -5 = -70
//     (product 11101 11010), the two hand-worked examples of the algorithm.
// op_count is checked against an independent count of bit changes of the
// operand that has fewer of them. The multiplier is combinational: each
// check samples the outputs 1 ns after the operands are applied.
module tb_booth_multiplier;

  int checks = 0;
  int failures = 0;

  logic [23:0] s_a, s_b, u_a, u_b;
  logic [47:0] s_p, u_p;
  logic [4:0]  s_ops, u_ops;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [2:0]  ops4;
  logic [4:0]  a5, b5;
  logic [9:0]  p5;
  logic [2:0]  ops5;

  booth_multiplier dut_s (.a(s_a), .b(s_b), .product(s_p), .op_count(s_ops));
  booth_multiplier #(.WIDTH(24), .SIGNED_OPS(1'b0))
    dut_u (.a(u_a), .b(u_b), .product(u_p), .op_count(u_ops));
  booth_multiplier #(.WIDTH(4)) dut_4 (.a(a4), .b(b4), .product(p4), .op_count(ops4));
  booth_multiplier #(.WIDTH(5)) dut_5 (.a(a5), .b(b5), .product(p5), .op_count(ops5));

  // Bit changes of v read from bit 0 upwards, starting from a 0 below bit 0;
  // n_bits = number of bits the multiplier scans.
  function automatic int changes(input longint unsigned v, input int n_bits);
    int n = 0;
    int prev = 0;
    for (int i = 0; i < n_bits; i++) begin
      if (int'(v[i]) != prev) n++;
      prev = int'(v[i]);
    end
    return n;
  endfunction

  function automatic int min2(input int p, input int q);
    return (p < q) ? p : q;
  endfunction

  task automatic check_signed(input logic [23:0] a, input logic [23:0] b);
    longint expect_p;
    s_a = a;
    s_b = b;
    #1;
    expect_p = longint'($signed(a)) * longint'($signed(b));
    checks++;
    if (s_p !== expect_p[47:0]) begin
      failures++;
      $display("FAIL signed %0d * %0d: got %0d expected %0d",
               $signed(a), $signed(b), $signed(s_p), expect_p);
    end
    checks++;
    if (int'(s_ops) != min2(changes(longint'(a), 24), changes(longint'(b), 24))) begin
      failures++;
      $display("FAIL signed op_count %0d for %h, %h", s_ops, a, b);
    end
  endtask

  task automatic check_unsigned(input logic [23:0] a, input logic [23:0] b);
    longint unsigned expect_p;
    u_a = a;
    u_b = b;
    #1;
    expect_p = longint'(a) * longint'(b);
    checks++;
    if (u_p !== expect_p[47:0]) begin
      failures++;
      $display("FAIL unsigned %0d * %0d: got %0d expected %0d", a, b, u_p, expect_p);
    end
    checks++;
    // unsigned operands are scanned with one extra (zero) bit on top
    if (int'(u_ops) != min2(changes(longint'(a), 25), changes(longint'(b), 25))) begin
      failures++;
      $display("FAIL unsigned op_count %0d for %h, %h", u_ops, a, b);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] corner[6];
    corner = '{24'h000000, 24'h000001, 24'hFFFFFF, 24'h800000, 24'h7FFFFF, 24'h555555};

    // worked example 1: 4 * 4 = 16 with 4-bit operands
    a4 = 4'd4; b4 = 4'd4; #1;
    checks++;
    if (p4 !== 8'd16) begin failures++; $display("FAIL 4*4 = %0d", p4); end
    // worked example 2: 14 * -5 = -70 = 11101 11010 with 5-bit operands
    a5 = 5'd14; b5 = 5'b11011; #1;
    checks++;
    if (p5 !== 10'b11101_11010) begin failures++; $display("FAIL 14*-5 = %b", p5); end
    // exhaustive 4-bit and 5-bit signed
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        checks++;
        if ($signed(p4) != 8'(int'($signed(4'(i))) * int'($signed(4'(j))))) begin
          failures++; $display("FAIL 4-bit %0d * %0d = %0d", $signed(a4), $signed(b4), $signed(p4));
        end
      end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j); #1;
        checks++;
        if (p5 != 10'(int'($signed(5'(i))) * int'($signed(5'(j))))) begin
          failures++; $display("FAIL 5-bit %0d * %0d = %0d", $signed(a5), $signed(b5), $signed(p5));
        end
      end

    foreach (corner[i])
      foreach (corner[j]) begin
        check_signed(corner[i], corner[j]);
        check_unsigned(corner[i], corner[j]);
      end
    for (int k = 0; k < 3000; k++) begin
      check_signed(24'($urandom), 24'($urandom));
      check_unsigned(24'($urandom) | 24'h800000, 24'($urandom) | 24'h800000);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
