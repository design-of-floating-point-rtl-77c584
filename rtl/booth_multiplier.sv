// booth_multiplier: radix-2 Booth multiplier, WIDTH x WIDTH -> 2*WIDTH bits.
//
// The product register P holds {A, Q, q_-1}: an accumulator A, the
// multiplier Q and one extra bit to its right, with A and q_-1 cleared at the
// start. Each of the multiplier's bits takes one step: the two lowest bits of
// P are inspected, "01" adds the multiplicand to A, "10" subtracts it, "00"
// and "11" leave A alone, and P is then shifted right arithmetically. After
// WIDTH steps P (without q_-1) is the two's complement product. All steps are
// unrolled into one combinational array, so the product is valid one
// propagation delay after the operands change; there is no clock.
//
// Before multiplying, the operand whose bit pattern has fewer 0/1 changes
// (counted from an implicit 0 right of bit 0) is taken as the multiplier, as
// that operand needs fewer add/subtract steps. op_count reports how many steps
// did add or subtract. On a tie b stays the multiplier.
//
// SIGNED_OPS = 1 treats a and b as two's complement numbers. With
// SIGNED_OPS = 0 they are unsigned (as the significands of the floating-point
// multiplier are): both are zero-extended by one bit and one more step is run.
//
// The step rules and the operand choice follow the described algorithm. The
// accumulator is one bit wider than the multiplicand so that subtracting the
// most negative multiplicand cannot overflow; that, the operand-choice tie
// rule and the unsigned mode are this design's own.
module booth_multiplier #(
  parameter int unsigned WIDTH      = 24,
  parameter bit          SIGNED_OPS = 1'b1
) (
  input  logic [WIDTH-1:0]             a,
  input  logic [WIDTH-1:0]             b,
  output logic [2*WIDTH-1:0]           product,
  output logic [$clog2(WIDTH+2)-1:0]   op_count
);

  localparam int unsigned W  = SIGNED_OPS ? WIDTH : WIDTH + 1;  // step count
  localparam int unsigned CW = $clog2(WIDTH + 2);

  // Number of add/subtract steps a value would need as the multiplier.
  function automatic logic [CW-1:0] transitions(input logic [W-1:0] v);
    logic [W:0]    vv;
    logic [CW-1:0] n;
    vv = {v, 1'b0};
    n  = '0;
    for (int i = 0; i < W; i++) n = n + CW'(vv[i+1] ^ vv[i]);
    return n;
  endfunction

  logic [W-1:0]   a_ext, b_ext, mcand, mplier;
  logic [CW-1:0]  trans_a, trans_b;
  logic           swap;
  logic [W:0]     mcand_sx;     // multiplicand, sign-extended to A's width
  logic [2*W+1:0] p;            // {A[W:0], Q[W-1:0], q_-1}

  always_comb begin
    a_ext   = W'(a);
    b_ext   = W'(b);
    trans_a = transitions(a_ext);
    trans_b = transitions(b_ext);
    swap    = trans_b > trans_a;
    mcand   = swap ? b_ext : a_ext;
    mplier  = swap ? a_ext : b_ext;
    op_count = swap ? trans_a : trans_b;
    mcand_sx = {mcand[W-1], mcand};

    p = {(W + 1)'(0), mplier, 1'b0};
    for (int step = 0; step < W; step++) begin
      unique case (p[1:0])
        2'b01:   p[2*W+1:W+1] = p[2*W+1:W+1] + mcand_sx;
        2'b10:   p[2*W+1:W+1] = p[2*W+1:W+1] - mcand_sx;
        default: ;
      endcase
      p = {p[2*W+1], p[2*W+1:1]};
    end
    product = p[2*WIDTH:1];
  end

endmodule
