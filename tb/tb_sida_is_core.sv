// Self-checking testbench of the SIDA input-stationary core: random rows
// (a scalar z and up to NPE non-zeros with distinct column indices, as in a
// row of a sparse matrix) are scattered into the output vector, one row per cycle, for
// each semiring; the whole vector is read back and compared with a reference.
//
// Interface and timing: no ports; it drives its own clock (10 time units per
// cycle), prints "TB_RESULT checks=N failures=M" and stops, and a watchdog
// ends a run that hangs as a failure. What it expects follows the published
// behaviour of the block; the stimulus, the reduced sizes and the reference
// model are this testbench's own choices.
module tb_sida_is_core;
  import sida_pkg::*;
  localparam int unsigned NPE = 8, NVEC = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  semiring_e sr;
  logic clear, in_valid;
  val_t z;
  logic lane_valid [NPE];
  logic [$clog2(NVEC)-1:0] lane_col [NPE];
  val_t lane_a [NPE];
  logic [$clog2(NVEC)-1:0] out_raddr;
  val_t out_rdata;
  val_t ref_o [NVEC];
  int checks = 0, failures = 0;

  sida_is_core #(.NPE(NPE), .NVEC(NVEC)) dut (.*);

  function automatic val_t r_op(alu_e op, val_t p, val_t q);
    case (op)
      ALU_MUL: return p * q;
      ALU_ADD: return (p > 0 && q > 0 && p > VAL_MAX - q) ? VAL_MAX : p + q;
      ALU_MIN: return (p < q) ? p : q;
      ALU_AND: return val_t'((p != 0) && (q != 0));
      ALU_OR:  return val_t'((p != 0) || (q != 0));
      default: return p;
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; in_valid = 0; z = 0; sr = SR_MUL_ADD; out_raddr = '0;
    for (int p = 0; p < NPE; p++) begin lane_valid[p] = 0; lane_col[p] = '0; lane_a[p] = 0; end
    for (int job = 0; job < 60; job++) begin
      alu_e om, op;
      int base;
      sr = semiring_e'(job % 3);
      om = (job % 3 == 0) ? ALU_MUL : (job % 3 == 1) ? ALU_AND : ALU_ADD;
      op = (job % 3 == 0) ? ALU_ADD : (job % 3 == 1) ? ALU_OR  : ALU_MIN;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int j = 0; j < NVEC; j++) ref_o[j] = (job % 3 == 2) ? VAL_MAX : 0;
      for (int r = 0; r < 20; r++) begin
        in_valid = ($urandom % 5 != 0);
        z = (job % 3 == 1) ? val_t'($urandom % 2) : val_t'($urandom % 30);
        base = $urandom % NVEC;
        for (int p = 0; p < NPE; p++) begin
          lane_valid[p] = ($urandom % 3 != 0);
          lane_col[p]   = $clog2(NVEC)'((base + p * 3) % NVEC);
          lane_a[p]     = (job % 3 == 1) ? val_t'($urandom % 2) : val_t'($urandom % 30);
          if (in_valid && lane_valid[p])
            ref_o[lane_col[p]] = r_op(op, ref_o[lane_col[p]], r_op(om, z, lane_a[p]));
        end
        @(negedge clk);
      end
      in_valid = 0;
      for (int j = 0; j < NVEC; j++) begin
        out_raddr = $clog2(NVEC)'(j);
        #1;
        checks++;
        if (out_rdata != ref_o[j]) begin
          failures++;
          if (failures < 10) $display("job %0d out[%0d]=%0d exp %0d", job, j, out_rdata, ref_o[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
