// Self-checking testbench of the SIDA output-stationary core: random lane
// batches (column index, non-zero, vector element) are reduced over several
// cycles per sub-tensor for each semiring, and the column outputs are compared
// with a reference accumulation. Checks the one-cycle update per batch.
//
// Interface and timing: no ports; it drives its own clock (10 time units per
// cycle), prints "TB_RESULT checks=N failures=M" and stops, and a watchdog
// ends a run that hangs as a failure. What it expects follows the published
// behaviour of the block; the stimulus, the reduced sizes and the reference
// model are this testbench's own choices.
module tb_sida_os_core;
  import sida_pkg::*;
  localparam int unsigned NPE = 8, T = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  semiring_e sr;
  logic clear, in_valid;
  logic lane_valid [NPE];
  logic [$clog2(T)-1:0] lane_col [NPE];
  val_t lane_a [NPE], lane_x [NPE], y [T];
  val_t ref_y [T];
  int checks = 0, failures = 0;

  sida_os_core #(.NPE(NPE), .T(T)) dut (.*);

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; in_valid = 0; sr = SR_MUL_ADD;
    for (int p = 0; p < NPE; p++) begin lane_valid[p] = 0; lane_col[p] = '0; lane_a[p] = 0; lane_x[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int job = 0; job < 300; job++) begin
      alu_e om, op;
      int nb;
      sr = semiring_e'(job % 3);
      om = (job % 3 == 0) ? ALU_MUL : (job % 3 == 1) ? ALU_AND : ALU_ADD;
      op = (job % 3 == 0) ? ALU_ADD : (job % 3 == 1) ? ALU_OR  : ALU_MIN;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int t = 0; t < T; t++) ref_y[t] = (job % 3 == 2) ? VAL_MAX : 0;
      nb = 1 + $urandom % 4;
      for (int bt = 0; bt < nb; bt++) begin
        in_valid = 1;
        for (int p = 0; p < NPE; p++) begin
          lane_valid[p] = ($urandom % 4 != 0);
          lane_col[p]   = $clog2(T)'($urandom % T);
          lane_a[p]     = (job % 3 == 1) ? val_t'($urandom % 2) : val_t'($urandom % 50);
          lane_x[p]     = (job % 3 == 1) ? val_t'($urandom % 2) : val_t'($urandom % 50);
          if (lane_valid[p])
            ref_y[lane_col[p]] = r_op(op, ref_y[lane_col[p]], r_op(om, lane_a[p], lane_x[p]));
        end
        @(negedge clk);
        in_valid = 0;
        // the batch is visible one edge after it was presented
        for (int t = 0; t < T; t++) begin
          checks++;
          if (y[t] != ref_y[t]) begin
            failures++;
            if (failures < 10) $display("job %0d batch %0d y[%0d]=%0d exp %0d", job, bt, t, y[t], ref_y[t]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
