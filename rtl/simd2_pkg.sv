// Shared types and arithmetic of the SIMD2 matrix unit.
//
// SIMD2 generalises a matrix-multiply unit to "semiring-like" matrix
// operations D = C (+) (A (x) B), where (x) combines one element of A with one
// element of B and (+) reduces the results along the inner dimension. Inputs
// A and B are IEEE half precision, C and D single precision. This package
// holds the opcodes and the single-precision helpers used by both ALUs.
//
// Arithmetic: additions and multiplications are rounded to nearest even.
// Subnormal results are flushed to zero, overflow gives infinity, infinity
// operands propagate (used as "no path" in shortest-path problems); NaN is
// not produced or recognised. These are choices of this design: the
// document fixes the operand and result formats, not the rounding details.
package simd2_pkg;

  // Arithmetic instructions (one per semiring-like structure).
  typedef enum logic [3:0] {
    OP_MMA     = 4'd0,   // +   ,  *
    OP_MINPLUS = 4'd1,   // min ,  +
    OP_MAXPLUS = 4'd2,   // max ,  +
    OP_MINMUL  = 4'd3,   // min ,  *
    OP_MAXMUL  = 4'd4,   // max ,  *
    OP_MINMAX  = 4'd5,   // min ,  max
    OP_MAXMIN  = 4'd6,   // max ,  min
    OP_ORAND   = 4'd7,   // or  ,  and
    OP_ADDNORM = 4'd8    // +   ,  |a-b|^2
  } simd2_op_e;

  typedef enum logic [2:0] {
    OT_MUL = 3'd0, OT_ADD = 3'd1, OT_MIN = 3'd2, OT_MAX = 3'd3,
    OT_AND = 3'd4, OT_L2  = 3'd5
  } otimes_e;

  typedef enum logic [2:0] {
    OP_ADD = 3'd0, OP_MIN = 3'd1, OP_MAX = 3'd2, OP_OR = 3'd3, OP_SUB = 3'd4
  } oplus_e;

  localparam logic [31:0] FP32_ONE = 32'h3F80_0000;

  // Instruction decode into the two ALU operations.
  function automatic otimes_e otimes_of(simd2_op_e op);
    case (op)
      OP_MINPLUS, OP_MAXPLUS: return OT_ADD;
      OP_MINMAX:              return OT_MAX;
      OP_MAXMIN:              return OT_MIN;
      OP_ORAND:               return OT_AND;
      OP_ADDNORM:             return OT_L2;
      default:                return OT_MUL;
    endcase
  endfunction

  function automatic oplus_e oplus_of(simd2_op_e op);
    case (op)
      OP_MINPLUS, OP_MINMUL, OP_MINMAX: return OP_MIN;
      OP_MAXPLUS, OP_MAXMUL, OP_MAXMIN: return OP_MAX;
      OP_ORAND:                         return OP_OR;
      default:                          return OP_ADD;
    endcase
  endfunction

  function automatic logic is_inf(logic [31:0] x);
    return x[30:23] == 8'hFF;
  endfunction

  function automatic logic is_zero(logic [31:0] x);
    return x[30:23] == 8'h00;
  endfunction

  // Exact conversion of a half to a single.
  function automatic logic [31:0] fp16_to_fp32(logic [15:0] h);
    logic [9:0] m;
    int         e;
    if (h[14:10] == 5'h1F) return {h[15], 8'hFF, 23'd0};
    if (h[14:10] != 5'd0)  return {h[15], 8'(int'(h[14:10]) + 112), h[9:0], 13'd0};
    if (h[9:0] == 10'd0)   return {h[15], 31'd0};
    // subnormal half: normalise
    m = h[9:0];
    e = 113;
    while (!m[9]) begin
      m = m << 1;
      e = e - 1;
    end
    return {h[15], 8'(e - 1), m[8:0], 14'd0};
  endfunction

  // Round a normalised magnitude (msb at bit 79) with unbiased-plus-127
  // exponent e to a single, ties to even.
  function automatic logic [31:0] round_pack(logic s, int e, logic [79:0] m);
    logic [24:0] r;
    logic        g, st;
    r  = {1'b0, m[79:56]};
    g  = m[55];
    st = |m[54:0];
    if (g && (st || r[0])) r = r + 25'd1;
    if (r[24]) begin
      r = r >> 1;
      e = e + 1;
    end
    if (e <= 0)   return {s, 31'd0};
    if (e >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e), r[22:0]};
  endfunction

  function automatic logic [79:0] normalise(logic [79:0] m, output int lz);
    lz = 0;
    for (int i = 79; i >= 0; i--) begin
      if (m[i]) break;
      lz++;
    end
    return m << lz;
  endfunction

  function automatic logic [31:0] fp32_add(logic [31:0] a, logic [31:0] b);
    logic [31:0] x, y;
    logic [79:0] mx, my, sum;
    int          d, lz;
    logic        lost;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    if (is_zero(a)) return is_zero(b) ? {a[31] & b[31], 31'd0} : b;
    if (is_zero(b)) return a;
    // x has the larger magnitude
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    d  = int'(x[30:23]) - int'(y[30:23]);
    mx = {1'b0, 1'b1, x[22:0], 55'd0};
    my = {1'b0, 1'b1, y[22:0], 55'd0};
    if (d > 60) begin
      my = 80'd1;                        // only a sticky bit remains
    end else begin
      lost = (d > 0) && ((my & ((80'd1 << d) - 80'd1)) != 80'd0);
      my   = (my >> d) | 80'(lost);
    end
    if (x[31] == y[31]) sum = mx + my;
    else                sum = mx - my;
    if (sum == 80'd0) return 32'd0;
    sum = normalise(sum, lz);
    // msb of mx is bit 78 for exponent x.exp
    return round_pack(x[31], int'(x[30:23]) + 1 - lz, sum);
  endfunction

  function automatic logic [31:0] fp32_mul(logic [31:0] a, logic [31:0] b);
    logic [47:0] p;
    logic [79:0] m;
    int          lz;
    logic        s;
    s = a[31] ^ b[31];
    if (is_inf(a) || is_inf(b)) return {s, 8'hFF, 23'd0};
    if (is_zero(a) || is_zero(b)) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    m = normalise({p, 32'd0}, lz);
    // product msb at bit 47 (bit 79 of m when lz = 0) means exponent ea+eb-126
    return round_pack(s, int'(a[30:23]) + int'(b[30:23]) - 126 - lz, m);
  endfunction

  // Order key: larger key means larger number (zeros of either sign equal).
  function automatic logic [31:0] order_key(logic [31:0] x);
    if (is_zero(x)) return 32'h8000_0000;
    return x[31] ? ~x : (x | 32'h8000_0000);
  endfunction

  function automatic logic [31:0] fp32_min(logic [31:0] a, logic [31:0] b);
    return (order_key(b) < order_key(a)) ? b : a;
  endfunction

  function automatic logic [31:0] fp32_max(logic [31:0] a, logic [31:0] b);
    return (order_key(b) > order_key(a)) ? b : a;
  endfunction

endpackage
