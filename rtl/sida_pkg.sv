// Shared types and operations of SIDA, the sparse inter-operator dataflow
// accelerator.
//
// SIDA fuses two sparse vector-matrix products that read the same matrix
// with an element-wise operation in between (vxm -> e-wise -> vxm). The
// first product runs output-stationary (one output element per matrix
// column), the second input-stationary (one input element scattered over a
// matrix row), so every matrix element loaded for the first product can be
// reused by the second one.
//
// Values are 64-bit two's complement integers; the semiring operators are
// mul-add, and-or and min-add. Addition saturates, so the largest value can
// serve as "infinity" for min-add (shortest paths). The 64-bit word size
// follows the document; integer arithmetic and saturation are choices of
// this design (the document does not give the number format).
package sida_pkg;

  typedef logic signed [63:0] val_t;

  localparam val_t VAL_MAX = 64'sh7FFF_FFFF_FFFF_FFFF;
  localparam val_t VAL_MIN = -64'sh7FFF_FFFF_FFFF_FFFF - 64'sd1;

  // Operations of one processing element.
  typedef enum logic [2:0] {
    ALU_MUL = 3'd0, ALU_ADD = 3'd1, ALU_MIN = 3'd2, ALU_MAX = 3'd3,
    ALU_AND = 3'd4, ALU_OR  = 3'd5, ALU_SEL_A = 3'd6
  } alu_e;

  // Semirings of the vector-matrix products.
  typedef enum logic [1:0] {
    SR_MUL_ADD = 2'd0,
    SR_AND_OR  = 2'd1,
    SR_MIN_ADD = 2'd2
  } semiring_e;

  // Matrix element in the on-chip buffer: row and column coordinates and
  // the value (16 bytes).
  typedef struct packed {
    logic [31:0] row;
    logic [31:0] col;
    val_t        val;
  } elem_t;

  function automatic val_t sat_add(val_t a, val_t b);
    val_t s;
    s = a + b;
    if (!a[63] && !b[63] && s[63]) return VAL_MAX;
    if (a[63] && b[63] && !s[63])  return VAL_MIN;
    return s;
  endfunction

  function automatic val_t alu(alu_e op, val_t a, val_t b);
    case (op)
      ALU_ADD:   return sat_add(a, b);
      ALU_MIN:   return (b < a) ? b : a;
      ALU_MAX:   return (b > a) ? b : a;
      ALU_AND:   return val_t'((a != 0) && (b != 0));
      ALU_OR:    return val_t'((a != 0) || (b != 0));
      ALU_SEL_A: return a;
      default:   return a * b;
    endcase
  endfunction

  function automatic alu_e otimes_of(semiring_e sr);
    case (sr)
      SR_AND_OR:  return ALU_AND;
      SR_MIN_ADD: return ALU_ADD;
      default:    return ALU_MUL;
    endcase
  endfunction

  function automatic alu_e oplus_of(semiring_e sr);
    case (sr)
      SR_AND_OR:  return ALU_OR;
      SR_MIN_ADD: return ALU_MIN;
      default:    return ALU_ADD;
    endcase
  endfunction

  // Identity of the reduction operator.
  function automatic val_t identity_of(semiring_e sr);
    return (sr == SR_MIN_ADD) ? VAL_MAX : val_t'(0);
  endfunction

endpackage
