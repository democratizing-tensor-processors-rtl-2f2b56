// SIMD2 (x) ALU: combines one half-precision element of A with one of B and
// gives a single-precision result. Operations: multiply (exact), add,
// minimum, maximum, logical and (1.0 when both operands are non-zero, else
// 0.0) and the squared distance (a-b)^2, computed as a single-precision
// difference followed by a rounded square. Combinational.
// The operation set follows the document; the encoding of "and" on floating
// point values and the rounding of the distance are choices of this design.
module simd2_otimes_alu
  import simd2_pkg::*;
(
  input  otimes_e      op,
  input  logic [15:0]  a,
  input  logic [15:0]  b,
  output logic [31:0]  y
);
  logic [31:0] a32, b32, diff;

  always_comb begin
    diff = 32'd0;
    a32 = fp16_to_fp32(a);
    b32 = fp16_to_fp32(b);
    case (op)
      OT_ADD:  y = fp32_add(a32, b32);
      OT_MIN:  y = fp32_min(a32, b32);
      OT_MAX:  y = fp32_max(a32, b32);
      OT_AND:  y = (!is_zero(a32) && !is_zero(b32)) ? FP32_ONE : 32'd0;
      OT_L2: begin
        diff = fp32_add(a32, {~b32[31], b32[30:0]});
        y    = fp32_mul(diff, diff);
      end
      default: y = fp32_mul(a32, b32);
    endcase
  end
endmodule
