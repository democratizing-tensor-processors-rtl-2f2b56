// Shared types and constants of the multi-mode matrix unit (M3XU).
//
// The unit extends a 16-bit dot-product matrix unit so that the same 12-bit
// multipliers also execute true FP32 and interleaved complex FP32 (FP32C)
// matrix multiply-accumulate. Every multiplier input is a "buffer entry":
// 1-bit sign, 8-bit exponent and a 12-bit mantissa that includes the hidden
// bit. An FP32 mantissa (hidden bit + 23 bits = 24 bits) is carried as a
// high half H and a low half L, so x = H * 2^12 + L, and each product of two
// halves is weighted by a shift of 24 (H*H), 12 (H*L, L*H) or 0 (L*L) bits.
//
// Weights: a product P = Ma*Mb of two entries with biased exponents Ea, Eb
// and shift code S has the value P * 2^(Ea + Eb + S - W_BASE). A value
// carried as an unsigned magnitude of width w whose most significant
// position is "top" T has the value mag * 2^(T - w - W_BASE).
//
// Follows the document: the 1-bit sign, 8-bit exponent, 12-bit mantissa
// buffer entry and the 0/12/24-bit product weights. The weight bias
// constants are this design's own bookkeeping.
package m3xu_pkg;

  typedef enum logic [1:0] {
    MODE_FP16  = 2'd0,   // FP16 inputs, FP32 accumulate, 1 step
    MODE_FP32  = 2'd1,   // FP32 inputs and outputs, 2 steps
    MODE_FP32C = 2'd2    // interleaved complex FP32, 4 steps
  } m3xu_mode_e;

  typedef enum logic [1:0] {
    SH0  = 2'd0,         // L*L product
    SH12 = 2'd1,         // H*L or L*H cross product
    SH24 = 2'd2          // H*H product, and every FP16 product
  } m3xu_shift_e;

  // Input buffer entry of the data-assignment stage.
  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [11:0] man;
  } m3xu_ent_t;

  localparam int W_BASE = 300;       // weight offset, see above
  localparam int TOP_C  = 174;       // FP32 biased exponent = top - TOP_C

  // Number of steps of one operation in each mode.
  function automatic int unsigned steps_of(m3xu_mode_e m);
    case (m)
      MODE_FP32:  return 2;
      MODE_FP32C: return 4;
      default:    return 1;
    endcase
  endfunction

  function automatic int unsigned shift_bits(m3xu_shift_e s);
    case (s)
      SH12:    return 12;
      SH24:    return 24;
      default: return 0;
    endcase
  endfunction

endpackage
