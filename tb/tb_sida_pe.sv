// Self-checking testbench of the SIDA processing element: random operands
// through every (otimes, oplus) pair, including saturation of the min-add
// semiring, compared with an independent reference of y = (a otimes b) oplus c.
//
// Interface and timing: no ports; it drives its own clock (10 time units per
// cycle), prints "TB_RESULT checks=N failures=M" and stops, and a watchdog
// ends a run that hangs as a failure. What it expects follows the published
// behaviour of the block; the stimulus, the reduced sizes and the reference
// model are this testbench's own choices.
module tb_sida_pe;
  import sida_pkg::*;
  alu_e mul_op, add_op;
  val_t a, b, c, y;
  int checks = 0, failures = 0;

  sida_pe dut (.*);

  function automatic val_t r_op(alu_e op, val_t p, val_t q);
    case (op)
      ALU_MUL: return p * q;
      ALU_ADD: begin
        if (p > 0 && q > 0 && p > VAL_MAX - q) return VAL_MAX;
        if (p < 0 && q < 0 && p < VAL_MIN - q) return VAL_MIN;
        return p + q;
      end
      ALU_MIN: return (p < q) ? p : q;
      ALU_MAX: return (p > q) ? p : q;
      ALU_AND: return val_t'((p != 0) && (q != 0));
      ALU_OR:  return val_t'((p != 0) || (q != 0));
      default: return p;
    endcase
  endfunction

  function automatic val_t rnd();
    case ($urandom % 6)
      0: return VAL_MAX - val_t'($urandom % 4);
      1: return VAL_MIN + val_t'($urandom % 4);
      2: return 0;
      3: return val_t'($signed($urandom % 200) - 100);
      default: return val_t'({$urandom, $urandom});
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      mul_op = alu_e'($urandom % 7);
      add_op = alu_e'($urandom % 7);
      a = rnd(); b = rnd(); c = rnd();
      #1;
      checks++;
      if (y != r_op(add_op, r_op(mul_op, a, b), c)) begin
        failures++;
        if (failures < 10) $display("op %0d/%0d a=%0d b=%0d c=%0d y=%0d", mul_op, add_op, a, b, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
