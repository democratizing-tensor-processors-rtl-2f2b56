// Reference model of the SIMD2 element operations in real arithmetic,
// rounding every result to single precision (computing in double and
// rounding once is exact for one add or multiply of singles).
//
// Interface: functions only, no state or timing. The formulas are standard
// IEEE-754 conversions written for checking; they are this testbench's own
// and do not come from the design.
package tb_simd2_ref_pkg;
  import tb_fp_pkg::*;

  function automatic logic [31:0] r_add(logic [31:0] x, logic [31:0] y);
    return real_to_fp32(fp32_to_real(x) + fp32_to_real(y));
  endfunction

  function automatic logic [31:0] r_min(logic [31:0] x, logic [31:0] y);
    return (fp32_to_real(y) < fp32_to_real(x)) ? y : x;
  endfunction

  function automatic logic [31:0] r_max(logic [31:0] x, logic [31:0] y);
    return (fp32_to_real(y) > fp32_to_real(x)) ? y : x;
  endfunction

  // (x) of two halves; op numbering: 0 mul 1 add 2 min 3 max 4 and 5 l2
  function automatic logic [31:0] r_otimes(int op, logic [15:0] a, logic [15:0] b);
    real ra, rb;
    logic [31:0] dd;
    ra = fp16_to_real(a);
    rb = fp16_to_real(b);
    case (op)
      1: return real_to_fp32(ra + rb);
      2: return real_to_fp32((rb < ra) ? rb : ra);
      3: return real_to_fp32((rb > ra) ? rb : ra);
      4: return (ra != 0.0 && rb != 0.0) ? 32'h3F80_0000 : 32'd0;
      5: begin
        dd = real_to_fp32(ra - rb);
        return real_to_fp32(fp32_to_real(dd) * fp32_to_real(dd));
      end
      default: return real_to_fp32(ra * rb);
    endcase
  endfunction

  // (+); op numbering: 0 add 1 min 2 max 3 or 4 sub
  function automatic logic [31:0] r_oplus(int op, logic [31:0] x, logic [31:0] p);
    case (op)
      1: return r_min(x, p);
      2: return r_max(x, p);
      3: return (fp32_to_real(x) != 0.0 || fp32_to_real(p) != 0.0) ? 32'h3F80_0000 : 32'd0;
      4: return real_to_fp32(fp32_to_real(x) - fp32_to_real(p));
      default: return r_add(x, p);
    endcase
  endfunction

  // Instruction -> (x) and (+) operation numbers, from the instruction table.
  function automatic int ot_of(int opc);
    case (opc)
      1, 2: return 1;
      5:    return 3;
      6:    return 2;
      7:    return 4;
      8:    return 5;
      default: return 0;
    endcase
  endfunction

  function automatic int pl_of(int opc);
    case (opc)
      1, 3, 5: return 1;
      2, 4, 6: return 2;
      7:       return 3;
      default: return 0;
    endcase
  endfunction
endpackage
