// SIMD2 (+) ALU: reduces the running single-precision value x with a new
// (x)-ALU result p. Operations: add, minimum, maximum, logical or (1.0 when
// either operand is non-zero) and subtract (x - p). Combinational.
// The operation set follows the document; subtract is decoded by no
// instruction of the set and is kept only because the document lists it.
module simd2_oplus_alu
  import simd2_pkg::*;
(
  input  oplus_e       op,
  input  logic [31:0]  x,
  input  logic [31:0]  p,
  output logic [31:0]  y
);
  always_comb begin
    case (op)
      OP_MIN:  y = fp32_min(x, p);
      OP_MAX:  y = fp32_max(x, p);
      OP_OR:   y = (!is_zero(x) || !is_zero(p)) ? FP32_ONE : 32'd0;
      OP_SUB:  y = fp32_add(x, {~p[31], p[30:0]});
      default: y = fp32_add(x, p);
    endcase
  end
endmodule
