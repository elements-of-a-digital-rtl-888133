// fp64_pkg - word-level IEEE 754 binary64 arithmetic used inside the functional devices.
//
// Add/subtract, multiply and divide with round-to-nearest-even. Subnormal operands are read as
// zero and subnormal results are flushed to zero (with the sign kept); an exponent overflow gives
// infinity; NaN operands give the default quiet NaN, and inf - inf, 0 * inf, 0 / 0 and inf / inf
// give NaN. These simplifications are this design's choice: the architecture only asks for
// FP64-standard adders, multipliers and dividers.
package fp64_pkg;

  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  function automatic logic is_nan(input logic [62:0] v);
    return (v[62:52] == 11'h7FF) && (v[51:0] != '0);
  endfunction

  function automatic logic is_inf(input logic [62:0] v);
    return (v[62:52] == 11'h7FF) && (v[51:0] == '0);
  endfunction

  function automatic logic is_zero(input logic [10:0] v);
    return v == '0;  // exponent field: zero or subnormal, both read as zero
  endfunction

  // Round and pack. sig[55] is the leading one, sig[54:3] the fraction, sig[2:0] guard, round and
  // sticky; e is the biased exponent of sig[55].
  function automatic logic [63:0] pack_round(input logic s, input int e, input logic [55:0] sig);
    logic [53:0] m;
    logic        inc;
    int          ee;
    inc = sig[2] & (sig[1] | sig[0] | sig[3]);
    m   = {1'b0, sig[55:3]} + 54'(inc);
    ee  = e;
    if (m[53]) begin
      m  = m >> 1;
      ee = ee + 1;
    end
    if (ee >= 2047) return {s, 11'h7FF, 52'd0};
    if (ee <= 0)    return {s, 63'd0};
    return {s, 11'(ee), m[51:0]};
  endfunction

  function automatic logic [63:0] fp_add(input logic [63:0] a, input logic [63:0] b);
    logic [63:0] x, y;
    logic [55:0] wx, wy, sig;
    logic [56:0] sum;
    logic        st;
    int          d, e, lz;
    if (is_nan(a[62:0]) || is_nan(b[62:0])) return QNAN;
    if (is_inf(a[62:0]) && is_inf(b[62:0])) return (a[63] == b[63]) ? a : QNAN;
    if (is_inf(a[62:0])) return a;
    if (is_inf(b[62:0])) return b;
    if (is_zero(a[62:52]) && is_zero(b[62:52])) return {a[63] & b[63], 63'd0};
    if (is_zero(a[62:52])) return b;
    if (is_zero(b[62:52])) return a;
    // x: operand of larger magnitude
    x = (a[62:0] >= b[62:0]) ? a : b;
    y = (a[62:0] >= b[62:0]) ? b : a;
    wx = {1'b1, x[51:0], 3'b000};
    wy = {1'b1, y[51:0], 3'b000};
    d  = int'(x[62:52]) - int'(y[62:52]);
    if (d >= 56) begin
      wy = 56'd1;  // only the sticky bit is left
    end else if (d > 0) begin
      st = |(wy & ((56'd1 << d) - 56'd1));
      wy = (wy >> d) | 56'(st);
    end
    e = int'(x[62:52]);
    if (x[63] == y[63]) begin
      sum = {1'b0, wx} + {1'b0, wy};
      if (sum[56]) begin
        sig = sum[56:1] | 56'(sum[0]);
        e   = e + 1;
      end else begin
        sig = sum[55:0];
      end
    end else begin
      sum = {1'b0, wx} - {1'b0, wy};
      if (sum == '0) return 64'd0;
      lz = 0;
      for (int i = 55; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sig = sum[55:0] << lz;
      e   = e - lz;
    end
    return pack_round(x[63], e, sig);
  endfunction

  function automatic logic [63:0] fp_mul(input logic [63:0] a, input logic [63:0] b);
    logic         s;
    logic [105:0] p;
    logic [55:0]  sig;
    int           e;
    s = a[63] ^ b[63];
    if (is_nan(a[62:0]) || is_nan(b[62:0])) return QNAN;
    if ((is_inf(a[62:0]) && is_zero(b[62:52])) || (is_zero(a[62:52]) && is_inf(b[62:0]))) return QNAN;
    if (is_inf(a[62:0]) || is_inf(b[62:0])) return {s, 11'h7FF, 52'd0};
    if (is_zero(a[62:52]) || is_zero(b[62:52])) return {s, 63'd0};
    p = {53'd0, 1'b1, a[51:0]} * {53'd0, 1'b1, b[51:0]};
    e = int'(a[62:52]) + int'(b[62:52]) - 1023;
    if (p[105]) begin
      sig = {p[105:51], |p[50:0]};
      e   = e + 1;
    end else begin
      sig = {p[104:50], |p[49:0]};
    end
    return pack_round(s, e, sig);
  endfunction

  function automatic logic [63:0] fp_div(input logic [63:0] a, input logic [63:0] b);
    logic         s;
    logic [110:0] num;
    logic [58:0]  q;
    logic [110:0] r;
    logic [55:0]  sig;
    int           e;
    s = a[63] ^ b[63];
    if (is_nan(a[62:0]) || is_nan(b[62:0])) return QNAN;
    if ((is_inf(a[62:0]) && is_inf(b[62:0])) || (is_zero(a[62:52]) && is_zero(b[62:52]))) return QNAN;
    if (is_inf(a[62:0]) || is_zero(b[62:52])) return {s, 11'h7FF, 52'd0};
    if (is_zero(a[62:52]) || is_inf(b[62:0])) return {s, 63'd0};
    num = {1'b1, a[51:0], 58'd0};
    q   = 59'(num / {58'd0, 1'b1, b[51:0]});  // below 2^59, as the divisor is at least 2^52
    r   = num % {58'd0, 1'b1, b[51:0]};
    e   = int'(a[62:52]) - int'(b[62:52]) + 1023;
    if (q[58]) begin
      sig = {q[58:4], |q[3:0] | (r != '0)};
    end else begin
      sig = {q[57:3], |q[2:0] | (r != '0)};
      e   = e - 1;
    end
    return pack_round(s, e, sig);
  endfunction

endpackage
