// M3XU data-assignment stage for one dot-product unit.
//
// Takes one row of A and one column of B as 16-bit register words (the data
// path width of the baseline 16-bit unit is unchanged) and produces, for the
// current step, the entry pair and product shift of each of the K16
// multipliers. Purely combinational; the matrix unit registers its outputs.
//
//  * FP16 (1 step): word k is an FP16 number. The exponent is rebiased to
//    8 bits, the hidden 1 is attached and the unused low mantissa bit is 0.
//    Every product gets shift 24, i.e. all products have the same scale.
//  * FP32 (2 steps): words 2k (low half) and 2k+1 (high half) hold FP32
//    element k. Sign and exponent go to both entries; H = hidden bit, the 7
//    mantissa bits of the high word and the top 4 bits of the low word;
//    L = the low 12 bits. Multipliers 2k and 2k+1 compute H*H (shift 24) and
//    L*L (shift 0) in step 0; in step 1 the B halves are swapped and both
//    products are shifted by 12.
//  * FP32C (4 steps): FP32 elements 2c and 2c+1 are the real and imaginary
//    parts of complex element c, served by multipliers 4c..4c+3. Steps 0-1
//    build the real part Re*Re - Im*Im (the sign of the A entry of every
//    Im*Im product is flipped), steps 2-3 build the imaginary part
//    Re*Im + Im*Re with the B real and imaginary parts swapped. Steps 0 and 2
//    pair equal halves (shifts 24 and 0), steps 1 and 3 pair swapped halves
//    (shift 12).
// Zero and subnormal exponents are read with exponent 1 and no hidden bit,
// so subnormal inputs are exact. Infinity and NaN are not treated specially.
//
// The split of an FP32 number and the per-step swaps follow the document;
// the word order (low half in the lower word) and the order of products in
// the real-part steps are choices of this design.
module m3xu_data_assign
  import m3xu_pkg::*;
#(
  parameter int unsigned K16 = 8     // multipliers per dot-product unit
) (
  input  m3xu_mode_e     mode,
  input  logic [1:0]     step,
  input  logic [15:0]    a_row [K16],
  input  logic [15:0]    b_col [K16],
  output m3xu_ent_t      a_ent [K16],
  output m3xu_ent_t      b_ent [K16],
  output m3xu_shift_e    shift [K16]
);

  typedef struct packed {
    m3xu_ent_t hi;
    m3xu_ent_t lo;
  } split_t;

  function automatic m3xu_ent_t from_fp16(logic [15:0] w);
    m3xu_ent_t e;
    logic      nz;
    nz    = (w[14:10] != 5'd0);
    e.sign = w[15];
    e.exp  = nz ? 8'(w[14:10]) + 8'd112 : 8'd113;
    e.man  = {nz, w[9:0], 1'b0};
    return e;
  endfunction

  function automatic split_t from_fp32(logic [31:0] x);
    split_t r;
    logic   nz;
    nz        = (x[30:23] != 8'd0);
    r.hi.sign = x[31];
    r.lo.sign = x[31];
    r.hi.exp  = nz ? x[30:23] : 8'd1;
    r.lo.exp  = r.hi.exp;
    r.hi.man  = {nz, x[22:12]};
    r.lo.man  = x[11:0];
    return r;
  endfunction

  function automatic m3xu_ent_t neg(m3xu_ent_t e);
    m3xu_ent_t r;
    r      = e;
    r.sign = ~e.sign;
    return r;
  endfunction

  always_comb begin
    for (int unsigned k = 0; k < K16; k++) begin
      a_ent[k] = '0;
      b_ent[k] = '0;
      shift[k] = SH24;
    end
    case (mode)
      MODE_FP32: begin
        for (int unsigned k = 0; k < K16 / 2; k++) begin
          split_t a, b;
          a = from_fp32({a_row[2*k+1], a_row[2*k]});
          b = from_fp32({b_col[2*k+1], b_col[2*k]});
          a_ent[2*k]   = a.hi;
          a_ent[2*k+1] = a.lo;
          if (step[0] == 1'b0) begin
            b_ent[2*k]   = b.hi;  shift[2*k]   = SH24;
            b_ent[2*k+1] = b.lo;  shift[2*k+1] = SH0;
          end else begin
            b_ent[2*k]   = b.lo;  shift[2*k]   = SH12;
            b_ent[2*k+1] = b.hi;  shift[2*k+1] = SH12;
          end
        end
      end
      MODE_FP32C: begin
        for (int unsigned c = 0; c < K16 / 4; c++) begin
          split_t are, aim, bre, bim;
          are = from_fp32({a_row[4*c+1], a_row[4*c]});
          aim = from_fp32({a_row[4*c+3], a_row[4*c+2]});
          bre = from_fp32({b_col[4*c+1], b_col[4*c]});
          bim = from_fp32({b_col[4*c+3], b_col[4*c+2]});
          if (step[1] == 1'b0) begin
            // real part: Re*Re - Im*Im
            a_ent[4*c]   = are.hi;
            a_ent[4*c+1] = are.lo;
            a_ent[4*c+2] = neg(aim.hi);
            a_ent[4*c+3] = neg(aim.lo);
            if (step[0] == 1'b0) begin
              b_ent[4*c] = bre.hi;  b_ent[4*c+1] = bre.lo;
              b_ent[4*c+2] = bim.hi;  b_ent[4*c+3] = bim.lo;
            end else begin
              b_ent[4*c] = bre.lo;  b_ent[4*c+1] = bre.hi;
              b_ent[4*c+2] = bim.lo;  b_ent[4*c+3] = bim.hi;
            end
          end else begin
            // imaginary part: Re*Im + Im*Re
            a_ent[4*c]   = are.hi;
            a_ent[4*c+1] = are.lo;
            a_ent[4*c+2] = aim.hi;
            a_ent[4*c+3] = aim.lo;
            if (step[0] == 1'b0) begin
              b_ent[4*c] = bim.hi;  b_ent[4*c+1] = bim.lo;
              b_ent[4*c+2] = bre.hi;  b_ent[4*c+3] = bre.lo;
            end else begin
              b_ent[4*c] = bim.lo;  b_ent[4*c+1] = bim.hi;
              b_ent[4*c+2] = bre.lo;  b_ent[4*c+3] = bre.hi;
            end
          end
          if (step[0] == 1'b0) begin
            shift[4*c] = SH24;  shift[4*c+1] = SH0;
            shift[4*c+2] = SH24;  shift[4*c+3] = SH0;
          end else begin
            for (int unsigned j = 0; j < 4; j++) shift[4*c+j] = SH12;
          end
        end
      end
      default: begin
        for (int unsigned k = 0; k < K16; k++) begin
          a_ent[k] = from_fp16(a_row[k]);
          b_ent[k] = from_fp16(b_col[k]);
          shift[k] = SH24;
        end
      end
    endcase
  end

endmodule
