// Testbench helpers: conversions between IEEE half/single bit patterns and
// real numbers, written independently of the design's arithmetic. Used only
// to compute reference results.
//
// Interface: functions only, no state or timing. The formulas are standard
// IEEE-754 conversions written for checking; they are this testbench's own
// and do not come from the design.
package tb_fp_pkg;

  function automatic real pow2(int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real fp16_to_real(logic [15:0] h);
    real v;
    if (h[14:10] == 0) v = real'(h[9:0]) * pow2(-24);
    else v = (1.0 + real'(h[9:0]) / 1024.0) * pow2(int'(h[14:10]) - 15);
    return h[15] ? -v : v;
  endfunction

  function automatic real fp32_to_real(logic [31:0] x);
    real v;
    if (x[30:23] == 0) v = real'(x[22:0]) * pow2(-149);
    else v = (1.0 + real'(x[22:0]) / 8388608.0) * pow2(int'(x[30:23]) - 127);
    return x[31] ? -v : v;
  endfunction

  // Round a real to the nearest single (ties to even); subnormal results
  // are flushed to zero, overflow gives infinity.
  function automatic logic [31:0] real_to_fp32(real x);
    logic s;
    real  a, f, rem;
    int   e;
    longint unsigned mi;
    s = (x < 0.0);
    a = s ? -x : x;
    if (a == 0.0) return {s, 31'd0};
    e = 0;
    while (a >= pow2(e + 1)) e++;
    while (a < pow2(e)) e--;
    f   = a / pow2(e) * 8388608.0;
    mi  = longint'(f);
    if (real'(mi) > f) mi = mi - 1;
    rem = f - real'(mi);
    if (rem > 0.5 || (rem == 0.5 && mi[0])) mi = mi + 1;
    if (mi == 64'd16777216) begin
      mi = 64'd8388608;
      e  = e + 1;
    end
    if (e + 127 <= 0)   return {s, 31'd0};
    if (e + 127 >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e + 127), mi[22:0]};
  endfunction

  // A random normal single with an exponent in [emin, emax].
  function automatic logic [31:0] rand_fp32(int emin, int emax);
    logic [31:0] r;
    r        = $urandom;
    r[30:23] = 8'(emin + int'($urandom % 32'(emax - emin + 1)));
    return r;
  endfunction

  function automatic logic [15:0] rand_fp16(int emin, int emax);
    logic [15:0] r;
    r        = 16'($urandom);
    r[14:10] = 5'(emin + int'($urandom % 32'(emax - emin + 1)));
    return r;
  endfunction

  // Equal bit patterns, or two zeros of any sign.
  function automatic logic fp_same(logic [31:0] x, logic [31:0] y);
    return (x == y) || (x[30:0] == 31'd0 && y[30:0] == 31'd0);
  endfunction

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

endpackage
