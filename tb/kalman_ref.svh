// kalman_ref.svh: integer reference model of one adaptive scalar Kalman
// filter step, written directly from the filter equations with plain
// integer arithmetic (floor division instead of shifts, explicit clamps).
// Included inside the testbench modules that predict filter outputs.
//
// The equations and constants follow the filter description; the same
// rounding rules as the RTL (arithmetic shifts, truncating division,
// saturation) are written out here independently with integer arithmetic.

  typedef struct {
    int x, p, avg, count;
    bit init, conv, is_hard, is_soft;
  } kstate_t;

  function automatic int sat(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic longint fdiv(longint a, longint b);   // floor(a / b), b > 0
    if (a >= 0) return a / b;
    return -((-a + b - 1) / b);
  endfunction

  function automatic int mul(int a, int b);
    return sat(fdiv(longint'(a) * longint'(b), 128));
  endfunction

  function automatic int gain(int n, int d);
    if (n < 0 || d <= 0) return 0;
    if (n >= d) return 128;
    return int'((longint'(n) * 128) / d);
  endfunction

  function automatic int clamp180(int v);
    return (v < 0) ? 0 : (v > 23040) ? 23040 : v;
  endfunction

  function automatic void reset_state(ref kstate_t s);
    s.x = 0; s.p = 256; s.avg = 128; s.count = 0;
    s.init = 0; s.conv = 0; s.is_hard = 0; s.is_soft = 0;
  endfunction

  // one sample; returns the estimate
  function automatic int step(ref kstate_t s, input int z, input int q, input int r, input bit en);
    int p_pred, innov, a, excess, scaled, scale, reff, den, k, p_new;
    if (!en) return clamp180(z);
    if (!s.init) begin
      s.x = z; s.p = 256; s.init = 1; s.count = 1; s.is_hard = 0; s.is_soft = 0;
      return clamp180(s.x);
    end
    p_pred = sat(s.p + q);
    innov  = sat(z - s.x);
    a      = (innov < 0) ? ((innov == -32768) ? 32767 : -innov) : innov;
    excess = (a > s.avg) ? a - s.avg : 0;
    scaled = (excess * 35) / 256;
    scale  = mul(scaled, scaled);
    s.is_hard = excess > 480;
    s.is_soft = (excess > 0) && !s.is_hard;
    reff   = s.is_hard ? sat(longint'(r) * 640) : mul(r, sat(128 + scale));
    den    = sat(p_pred + reff);
    if (2 * a < 3 * s.avg) begin
      s.avg = s.avg + int'(fdiv(a - s.avg, 64));
      if (s.avg < 16) s.avg = 16;
    end
    k      = gain(p_pred, den);
    s.x    = clamp180(sat(s.x + mul(k, innov)));
    p_new  = sat(p_pred - mul(k, p_pred));
    s.p    = (p_new < 1) ? 1 : p_new;
    s.conv = (s.count + 1 >= 10) && (p_new <= 64);
    if (s.count < 65535) s.count++;
    return clamp180(s.x);
  endfunction

