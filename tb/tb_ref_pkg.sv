// tb_ref_pkg: reference arithmetic for the testbenches.
//
// Plain integer and real-number models of the accelerator's number
// handling, written independently of the RTL (integer division, $floor,
// $exp) so that the testbenches can compute expected results on their own.
// Fixed-point values are carried as ints holding value * 64.
package tb_ref_pkg;

  // Wrap an int into the signed range of an n-bit word.
  function automatic int wrap(int v, int n);
    int m, r;
    m = 1 << n;
    r = v % m;
    if (r < 0) r += m;
    if (r >= m / 2) r -= m;
    return r;
  endfunction

  // floor(a / b) for b > 0
  function automatic int floordiv(int a, int b);
    return int'($floor(real'(a) / real'(b)));
  endfunction

  // Product of two Q2.6 ints reduced to Q6.6 by each scheme; mode 0 =
  // round toward zero, 1 = floor plus a carry of one when negative,
  // 2 = floor. The result of mode 1 already includes its carry.
  function automatic int ref_reduce(int a, int b, int mode);
    int p, fl;
    p  = a * b;                       // Q4.12
    fl = floordiv(p, 64);
    case (mode)
      0:       return p / 64;         // SystemVerilog '/' truncates toward 0
      1:       return fl + ((wrap(fl, 12) < 0) ? 1 : 0);
      default: return fl;
    endcase
  endfunction

  // round(64 * tanh(x / 64)) through the exponential form of tanh
  function automatic int ref_tanh(int x);
    real v, e, t;
    v = real'(x) / 64.0;
    e = $exp(2.0 * v);
    t = (e - 1.0) / (e + 1.0);
    return int'($floor(t * 64.0 + 0.5));
  endfunction

  // floor(r * 64) saturated to the 8-bit range
  function automatic int ref_to_q26(real r);
    real s;
    s = $floor(r * 64.0);
    if (s > 127.0)  return 127;
    if (s < -128.0) return -128;
    return int'(s);
  endfunction

  // real -> IEEE-754 single bit pattern (significand truncated; the value
  // is assumed to be inside the normal single range or zero)
  function automatic logic [31:0] real_to_bits(real r);
    logic [63:0] d;
    d = $realtobits(r);
    if (d[62:0] == '0) return {d[63], 31'd0};
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  // IEEE-754 single bit pattern -> real (normal and subnormal numbers)
  function automatic real bits_to_real(logic [31:0] b);
    real m, v;
    int  e;
    e = int'(b[30:23]);
    m = real'(b[22:0]) / 8388608.0;
    if (e == 0) v = m * (2.0 ** -126);
    else        v = (1.0 + m) * (2.0 ** (e - 127));
    return b[31] ? -v : v;
  endfunction

endpackage
