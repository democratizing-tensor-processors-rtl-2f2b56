// M3XU extended dot-product unit.
//
// Each cycle with step_valid it multiplies K16 pairs of 12-bit mantissas,
// adds the 8-bit exponents, applies the product shift chosen by the
// data-assignment stage (0, 12 or 24 bits) and accumulates all products
// together with the running sum. On "first" the running sum starts from the
// FP32 addend c instead of the accumulator register. On "last" the new sum
// is rounded to FP32 (round to nearest even) and presented on d with
// d_valid one cycle later. Steps of one operation are sent on consecutive
// or separate cycles; the accumulator holds its value in between.
//
// Accumulation: all terms (K16 products of 24 bits, the 24-bit addend or
// the ACC_W-bit accumulator) are aligned to the largest "top" weight in a
// frame of ACC_W+GUARD bits, summed as signed numbers, normalised by a
// leading-zero count and truncated back to the ACC_W-bit sign/magnitude
// accumulator with its top weight. The document specifies the 12-bit
// multipliers, the shifts and 48-bit accumulation registers; the
// block-exponent alignment, the guard bits, the truncation between steps and
// the flush of subnormal results to zero are choices of this design.
// Results that overflow become infinity.
module m3xu_dpu
  import m3xu_pkg::*;
#(
  parameter int unsigned K16   = 8,   // multipliers
  parameter int unsigned ACC_W = 48,  // accumulator magnitude bits
  parameter int unsigned GUARD = 4    // extra alignment bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step_valid,
  input  logic         first,
  input  logic         last,
  input  m3xu_ent_t    a_ent [K16],
  input  m3xu_ent_t    b_ent [K16],
  input  m3xu_shift_e  shift [K16],
  input  logic [31:0]  c,
  output logic [31:0]  d,
  output logic         d_valid
);

  localparam int unsigned FW = ACC_W + GUARD;          // alignment frame
  localparam int unsigned SW = FW + $clog2(K16 + 1) + 1; // signed sum width
  localparam int unsigned NT = K16 + 1;                // terms per step

  typedef logic signed [12:0] wt_t;                    // weights

  logic             acc_sign_q;
  logic [ACC_W-1:0] acc_mag_q;
  wt_t              acc_top_q;

  logic             t_sign [NT];
  logic [ACC_W-1:0] t_mag  [NT];  // magnitudes, msb-aligned at ACC_W-1
  wt_t              t_top  [NT];

  logic             n_sign;
  logic [ACC_W-1:0] n_mag;
  wt_t              n_top;
  logic [31:0]      rounded;

  // Build the terms of this step.
  always_comb begin
    logic c_nz;
    c_nz = (c[30:23] != 8'd0);
    for (int unsigned k = 0; k < K16; k++) begin
      logic [23:0] p;
      p         = a_ent[k].man * b_ent[k].man;
      t_sign[k] = a_ent[k].sign ^ b_ent[k].sign;
      t_mag[k]  = {p, {(ACC_W - 24){1'b0}}};
      t_top[k]  = wt_t'(a_ent[k].exp) + wt_t'(b_ent[k].exp)
                + wt_t'(shift_bits(shift[k])) + wt_t'(24);
    end
    if (first) begin
      t_sign[K16] = c[31];
      t_mag[K16]  = {c_nz, c[22:0], {(ACC_W - 24){1'b0}}};
      t_top[K16]  = wt_t'(c_nz ? c[30:23] : 8'd1) + wt_t'(TOP_C);
    end else begin
      t_sign[K16] = acc_sign_q;
      t_mag[K16]  = acc_mag_q;
      t_top[K16]  = acc_top_q;
    end
  end

  // Align, add, normalise.
  always_comb begin
    wt_t                  rt;
    logic                 any;
    logic signed [SW-1:0] sum;
    logic [SW-2:0]        mag, norm;
    int unsigned          lz;
    rt  = '0;
    any = 1'b0;
    for (int unsigned i = 0; i < NT; i++) begin
      if (t_mag[i] != '0 && (!any || t_top[i] > rt)) begin
        rt  = t_top[i];
        any = 1'b1;
      end
    end
    sum = '0;
    for (int unsigned i = 0; i < NT; i++) begin
      logic [FW-1:0]  al;
      int unsigned    dst;
      dst = (t_mag[i] == '0) ? FW : int'(rt - t_top[i]);
      al   = (dst >= FW) ? '0 : ({t_mag[i], {GUARD{1'b0}}} >> dst);
      if (t_sign[i]) sum = sum - SW'(al);
      else           sum = sum + SW'(al);
    end
    n_sign = sum[SW-1];
    mag    = n_sign ? (SW-1)'(-sum) : sum[SW-2:0];
    lz     = 0;
    for (int i = SW - 2; i >= 0; i--) begin
      if (mag[i]) break;
      lz++;
    end
    norm  = mag << lz;
    n_mag = norm[SW-2 -: ACC_W];
    n_top = (mag == '0) ? wt_t'(0) : rt + wt_t'(SW - 1 - FW) - wt_t'(lz);
    if (mag == '0) n_sign = 1'b0;
  end

  // Round the new sum to FP32.
  always_comb begin
    logic [24:0] m;
    logic        g, s;
    int          e;
    m = {1'b0, n_mag[ACC_W-1 -: 24]};
    g = n_mag[ACC_W-25];
    s = |n_mag[ACC_W-26:0];
    e = int'(n_top) - TOP_C;
    if (g && (s || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (n_mag == '0 || e <= 0) rounded = {n_sign, 31'd0};
    else if (e >= 255)         rounded = {n_sign, 8'hFF, 23'd0};
    else                       rounded = {n_sign, 8'(e), m[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_sign_q <= 1'b0;
      acc_mag_q  <= '0;
      acc_top_q  <= '0;
      d          <= '0;
      d_valid    <= 1'b0;
    end else begin
      d_valid <= step_valid && last;
      if (step_valid) begin
        acc_sign_q <= n_sign;
        acc_mag_q  <= n_mag;
        acc_top_q  <= n_top;
        if (last) d <= rounded;
      end
    end
  end

endmodule
