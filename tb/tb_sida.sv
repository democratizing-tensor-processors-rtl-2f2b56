// Self-checking testbench of the SIDA engine. Random sparse matrices with a
// dense row and a dense column (so that sub-tensors and rows exceed the PE
// count) are placed in a memory model with random back-pressure; for each
// semiring and e-wise instruction the fused vxm -> e-wise -> vxm result is
// compared with a reference computed directly from the dense matrix. It also
// checks that every matrix element is read from memory exactly once, that
// elements reach the IS core both eagerly and through the CSR space, and
// that no conversion was dropped.
//
// Interface and timing: no ports; it drives its own clock (10 time units per
// cycle), prints "TB_RESULT checks=N failures=M" and stops, and a watchdog
// ends a run that hangs as a failure. What it expects follows the published
// behaviour of the block; the stimulus, the reduced sizes and the reference
// model are this testbench's own choices.
module tb_sida;
  import sida_pkg::*;

  localparam int unsigned NPE = 8, T = 16, NVEC = 256;
  localparam int unsigned CSC_DEPTH = 1024, CSR_DEPTH = 4096;
  localparam int unsigned N = 150;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, busy, done, mem_req, mem_gnt, mem_rvalid;
  logic [31:0] n, mem_addr;
  logic [63:0] mem_rdata;
  semiring_e   sr;
  alu_e        ew_mul_op, ew_add_op;
  val_t        ew_scalar, out_rdata;
  logic [31:0] x_base, w_base, rowlen_base, colptr_base, rowidx_base, val_base;
  logic [$clog2(NVEC)-1:0] out_raddr;
  logic [31:0] stat_cycles, stat_steps, stat_mem_words, stat_os_cycles, stat_is_cycles;
  logic [31:0] stat_eager, stat_converted, stat_dropped, stat_est_x;
  int checks = 0, failures = 0;

  sida #(.NPE(NPE), .T(T), .NVEC(NVEC), .CSC_DEPTH(CSC_DEPTH), .CSR_DEPTH(CSR_DEPTH)) dut (.*);
  hbm_model #(.WORDS(8192), .LAT(3), .STALLS(1'b1)) u_mem (
    .clk, .req (mem_req), .addr (mem_addr), .gnt (mem_gnt), .rvalid (mem_rvalid), .rdata (mem_rdata));

  val_t A [N][N];
  val_t x [N];
  val_t w [N];

  function automatic val_t ref_alu(alu_e op, val_t a, val_t b);
    longint s;
    case (op)
      ALU_ADD: begin
        s = a + b;
        if (a > 0 && b > 0 && s < 0) return VAL_MAX;
        if (a < 0 && b < 0 && s >= 0) return VAL_MIN;
        return s;
      end
      ALU_MIN: return (a < b) ? a : b;
      ALU_MAX: return (a > b) ? a : b;
      ALU_AND: return (a != 0 && b != 0) ? 1 : 0;
      ALU_OR:  return (a != 0 || b != 0) ? 1 : 0;
      ALU_SEL_A: return a;
      default: return a * b;
    endcase
  endfunction

  task automatic run_case(int cs);
    int nnz, k;
    val_t y [N];
    val_t z [N];
    val_t o [N];
    alu_e otm, opl;
    sr = semiring_e'(cs % 3);
    case (cs % 3)
      1: begin otm = ALU_AND; opl = ALU_OR;  end
      2: begin otm = ALU_ADD; opl = ALU_MIN; end
      default: begin otm = ALU_MUL; opl = ALU_ADD; end
    endcase
    ew_mul_op = (cs % 3 == 2) ? ALU_ADD : ALU_MUL;
    ew_add_op = (cs % 3 == 2) ? ALU_MIN : ((cs % 3 == 1) ? ALU_OR : ALU_ADD);
    ew_scalar = (cs % 3 == 2) ? 0 : 3;
    // matrix: ~6% density, a dense row and a dense column, one empty column
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        A[i][j] = ($urandom % 100 < 6) ? val_t'(1 + $urandom % 9) : 0;
        if (i == 37 || j == 20 + cs) A[i][j] = val_t'(1 + $urandom % 9);
        if (j == 90) A[i][j] = 0;
      end
    for (int i = 0; i < N; i++) begin
      x[i] = (cs % 3 == 1) ? val_t'($urandom % 5 == 0) : val_t'($urandom % 20);
      w[i] = (cs % 3 == 1) ? val_t'($urandom % 7 == 0) : val_t'($urandom % 20);
    end
    if (cs % 3 == 2) x[5] = VAL_MAX;   // an unreachable source entry
    // memory image
    x_base = 0; w_base = N; rowlen_base = 2 * N; colptr_base = 3 * N;
    nnz = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) if (A[i][j] != 0) nnz++;
    rowidx_base = 4 * N + 1;
    val_base = rowidx_base + nnz;
    k = 0;
    for (int j = 0; j < N; j++) begin
      u_mem.mem[colptr_base + j] = 64'(k);
      for (int i = 0; i < N; i++)
        if (A[i][j] != 0) begin
          u_mem.mem[rowidx_base + k] = 64'(i);
          u_mem.mem[val_base + k]    = A[i][j];
          k++;
        end
    end
    u_mem.mem[colptr_base + N] = 64'(k);
    for (int i = 0; i < N; i++) begin
      int rl;
      rl = 0;
      for (int j = 0; j < N; j++) if (A[i][j] != 0) rl++;
      u_mem.mem[x_base + i] = x[i];
      u_mem.mem[w_base + i] = w[i];
      u_mem.mem[rowlen_base + i] = 64'(rl);
    end
    // reference: only non-zeros take part in the products
    for (int s = 0; s < N; s++) begin
      y[s] = (cs % 3 == 2) ? VAL_MAX : 0;
      for (int r = 0; r < N; r++)
        if (A[r][s] != 0) y[s] = ref_alu(opl, y[s], ref_alu(otm, x[r], A[r][s]));
      z[s] = ref_alu(ew_add_op, ref_alu(ew_mul_op, y[s], ew_scalar), w[s]);
    end
    for (int j = 0; j < N; j++) begin
      o[j] = (cs % 3 == 2) ? VAL_MAX : 0;
      for (int s = 0; s < N; s++)
        if (A[s][j] != 0) o[j] = ref_alu(opl, o[j], ref_alu(otm, z[s], A[s][j]));
    end
    // run
    n = N;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    @(posedge clk iff done);
    #1;
    for (int j = 0; j < N; j++) begin
      out_raddr = $clog2(NVEC)'(j);
      #1;
      checks++;
      if (out_rdata != o[j]) begin
        failures++;
        if (failures < 10) $display("case %0d out[%0d] got %0d exp %0d", cs, j, out_rdata, o[j]);
      end
    end
    checks++;
    if (stat_mem_words != 32'(4 * N + 1 + 2 * nnz)) begin
      failures++;
      $display("memory words %0d, expected %0d (each element once)", stat_mem_words, 4 * N + 1 + 2 * nnz);
    end
    checks++;
    if (stat_eager + stat_converted != 32'(nnz) || stat_eager == 0 || stat_converted == 0 || stat_dropped != 0) begin
      failures++;
      $display("eager %0d converted %0d dropped %0d nnz %0d", stat_eager, stat_converted, stat_dropped, nnz);
    end
    checks++;
    if (stat_steps != 32'((N + T - 1) / T + 2)) begin
      failures++;
      $display("steps %0d", stat_steps);
    end
    $display("case %0d: nnz %0d cycles %0d os %0d is %0d eager %0d est_x %0d", cs, nnz,
             stat_cycles, stat_os_cycles, stat_is_cycles, stat_eager, stat_est_x);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0; n = '0; sr = SR_MUL_ADD; ew_mul_op = ALU_MUL; ew_add_op = ALU_ADD;
    ew_scalar = '0; out_raddr = '0;
    x_base = '0; w_base = '0; rowlen_base = '0; colptr_base = '0; rowidx_base = '0; val_base = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int cs = 0; cs < 6; cs++) run_case(cs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
