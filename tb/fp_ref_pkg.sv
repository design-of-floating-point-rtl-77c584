// fp_ref_pkg: reference models for the floating-point testbenches, written
// with real (double precision) arithmetic instead of bit manipulation.
//
// Single-precision values are turned into doubles, which hold every product
// of two 24-bit significands and every aligned difference exactly. The
// expected result word is then found by searching for the binade of the
// exact value and truncating it to 24 significant bits (round toward zero),
// with infinity at or above 2^128 and truncated denormals below 2^-126.
package fp_ref_pkg;

  typedef struct {
    logic [31:0] word;
    bit          overflow;
    bit          underflow;
  } ref_t;

  function automatic real pow2(input int k);
    real r = 1.0;
    if (k >= 0) for (int i = 0; i < k; i++) r = r * 2.0;
    else        for (int i = 0; i < -k; i++) r = r / 2.0;
    return r;
  endfunction

  // Value of a result word (exponent 255 is not decoded).
  function automatic real decode(input logic [31:0] w);
    real m;
    if (w[30:23] == 8'd0) m = real'(w[22:0]) * pow2(-149);
    else m = real'({1'b1, w[22:0]}) * pow2(int'(w[30:23]) - 150);
    return w[31] ? -m : m;
  endfunction

  // Integer significand of an operand; a zero exponent reads as zero.
  function automatic longint sig(input logic [31:0] w);
    return (w[30:23] == 8'd0) ? 64'sd0 : longint'({1'b1, w[22:0]});
  endfunction

  // Round a magnitude toward zero into single precision.
  function automatic ref_t encode_rz(input bit sign, input real mag);
    ref_t r;
    int   e;
    longint m;
    r.overflow = 0;
    r.underflow = 0;
    if (mag == 0.0) begin
      r.word = 32'd0;
    end else if (mag >= pow2(128)) begin
      r.overflow = 1;
      r.word = {sign, 8'hFF, 23'd0};
    end else if (mag < pow2(-126)) begin
      r.underflow = 1;
      m = longint'($floor(mag / pow2(-149)));
      r.word = {sign, 8'd0, m[22:0]};
    end else begin
      e = -126;
      while (mag >= pow2(e + 1)) e++;
      m = longint'($floor(mag / pow2(e - 23)));
      r.word = {sign, 8'(e + 127), m[22:0]};
    end
    return r;
  endfunction

  // x * y: exact product, truncated.
  function automatic ref_t ref_mul(input logic [31:0] x, input logic [31:0] y);
    real exact;
    if (x[30:23] == 8'd0 || y[30:23] == 8'd0) return encode_rz(1'b0, 0.0);
    exact = real'(sig(x)) * real'(sig(y))
          * pow2(int'(x[30:23]) + int'(y[30:23]) - 300);
    return encode_rz(x[31] ^ y[31], exact);
  endfunction

  // x - y with the smaller operand truncated at alignment, then the exact
  // difference of the aligned significands truncated to 24 bits.
  // mag_out returns the aligned difference in units of the larger
  // operand's last significand bit, for coverage counting.
  function automatic ref_t ref_sub(input logic [31:0] x, input logic [31:0] y,
                                   output longint mag_out);
    int     ex, ey, eb, d;
    longint ax, ay, s;
    ex = int'(x[30:23]);
    ey = int'(y[30:23]);
    eb = (ex >= ey) ? ex : ey;
    ax = sig(x);
    ay = sig(y);
    d = eb - ex; ax = longint'($floor(real'(ax) / pow2(d)));
    d = eb - ey; ay = longint'($floor(real'(ay) / pow2(d)));
    s = (x[31] ? -ax : ax) - (y[31] ? -ay : ay);
    mag_out = (s < 0) ? -s : s;
    return encode_rz(s < 0, real'(mag_out) * pow2(eb - 150));
  endfunction

endpackage
