// Self-checking testbench of the SIDA element-wise core: random sub-tensors
// and operator pairs, z = (y op1 scalar) op2 w checked one cycle after
// in_valid, together with out_valid.
//
// Interface and timing: no ports; it drives its own clock (10 time units per
// cycle), prints "TB_RESULT checks=N failures=M" and stops, and a watchdog
// ends a run that hangs as a failure. What it expects follows the published
// behaviour of the block; the stimulus, the reduced sizes and the reference
// model are this testbench's own choices.
module tb_sida_ewise_core;
  import sida_pkg::*;
  localparam int unsigned T = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  alu_e mul_op, add_op;
  val_t scalar;
  logic in_valid, out_valid;
  val_t y [T], w [T], z [T], ez [T];
  int checks = 0, failures = 0;

  sida_ewise_core #(.T(T)) dut (.*);

  function automatic val_t r_op(alu_e op, val_t p, val_t q);
    case (op)
      ALU_MUL: return p * q;
      ALU_ADD: return p + q;
      ALU_MIN: return (p < q) ? p : q;
      ALU_MAX: return (p > q) ? p : q;
      ALU_AND: return val_t'((p != 0) && (q != 0));
      ALU_OR:  return val_t'((p != 0) || (q != 0));
      default: return p;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; mul_op = ALU_MUL; add_op = ALU_ADD; scalar = 0;
    for (int t = 0; t < T; t++) begin y[t] = 0; w[t] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      mul_op = alu_e'($urandom % 7);
      add_op = alu_e'($urandom % 7);
      scalar = val_t'($signed($urandom % 100) - 50);
      in_valid = 1;
      for (int t = 0; t < T; t++) begin
        y[t] = val_t'($signed($urandom % 2000) - 1000);
        w[t] = val_t'($signed($urandom % 2000) - 1000);
        ez[t] = r_op(add_op, r_op(mul_op, y[t], scalar), w[t]);
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int t = 0; t < T; t++) begin
        checks++;
        if (z[t] != ez[t]) begin
          failures++;
          if (failures < 10) $display("ops %0d %0d z[%0d]=%0d exp %0d", mul_op, add_op, t, z[t], ez[t]);
        end
      end
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
