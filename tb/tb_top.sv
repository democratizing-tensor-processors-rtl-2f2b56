// End-to-end testbench of the top level at its default parameters: the three
// designs run at the same time, each from its own thread.
//  - M3XU: integer-valued operations (exact in every mode) in FP16, FP32 and
//    FP32 complex, switching mode between back-to-back operations; results
//    and the 1/2/4-cycle issue rates are checked.
//  - SIMD2: A, B and C are loaded from a shared-memory model, every one of
//    the nine opcodes is executed and D stored and compared with an in-order
//    reference.
//  - SIDA: a sparse matrix with a dense row and a dense column sits in an HBM
//    model with random back-pressure; the fused vxm -> e-wise -> vxm job is
//    compared with a dense reference.
// Mechanisms are counted (each mode, each mode switch, each opcode, loads,
// stores, eager IS updates, CSC-to-CSR conversions, OS sub-tensors that need
// several PE passes, memory stalls, the dispatcher's pipeline fill and drain)
// and one that never happened counts as a failure.
//
// Interface and timing: no ports; it drives its own clock (10 time units per
// cycle), prints "TB_RESULT checks=N failures=M" and stops, and a watchdog
// ends a run that hangs as a failure. What it expects follows the published
// behaviour of the block; the stimulus, the reduced sizes and the reference
// model are this testbench's own choices.
module tb_top;
  import tb_fp_pkg::*;
  import tb_simd2_ref_pkg::*;
  import sida_pkg::*;

  localparam int unsigned M = 8, N = 4, K16 = 8;
  localparam int unsigned MAT = 16, AW = 16;
  localparam int unsigned NPE = 1024, T = 64, NVEC = 65536;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- top ports
  logic                    m3_start, m3_ready, m3_done;
  logic [1:0]              m3_mode;
  logic [M*K16*16-1:0]     m3_a;
  logic [K16*N*16-1:0]     m3_b;
  logic [M*N*2*32-1:0]     m3_c, m3_d;
  logic                    s2_instr_valid, s2_instr_ready, s2_busy, s2_smem_req, s2_smem_we;
  logic [1:0]              s2_instr_kind;
  logic [3:0]              s2_instr_op;
  logic [2:0]              s2_instr_rd, s2_instr_ra, s2_instr_rb, s2_instr_rc;
  logic [AW-1:0]           s2_instr_addr, s2_instr_ld, s2_smem_addr;
  logic [MAT*32-1:0]       s2_smem_wdata, s2_smem_rdata;
  logic [31:0]             s2_unit_ops;
  logic                    sd_start, sd_busy, sd_done, sd_mem_req, sd_mem_gnt, sd_mem_rvalid;
  logic [31:0]             sd_n, sd_x_base, sd_w_base, sd_rowlen_base, sd_colptr_base;
  logic [31:0]             sd_rowidx_base, sd_val_base, sd_mem_addr;
  logic [1:0]              sd_sr;
  logic [2:0]              sd_ew_mul_op, sd_ew_add_op;
  logic [63:0]             sd_ew_scalar, sd_mem_rdata, sd_out_rdata;
  logic [$clog2(NVEC)-1:0] sd_out_raddr;
  logic [31:0]             sd_stat_cycles, sd_stat_steps, sd_stat_mem_words, sd_stat_os_cycles;
  logic [31:0]             sd_stat_is_cycles, sd_stat_eager, sd_stat_converted, sd_stat_dropped;
  logic [31:0]             sd_stat_est_x;

  tensor_processors_top dut (.*);

  int checks = 0, failures = 0;

  // mechanism counters
  int n_mode [3];
  int n_mode_switch = 0;
  int n_opcode [9];
  int n_load = 0, n_store = 0;
  int n_eager = 0, n_convert = 0, n_os_multi = 0, n_mem_stall = 0, n_fill = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  // =============================================================== M3XU
  function automatic logic [15:0] ga(int i, int k); return m3_a[(i*K16+k)*16 +: 16]; endfunction
  function automatic logic [15:0] gb(int k, int j); return m3_b[(k*N+j)*16 +: 16]; endfunction
  function automatic logic [31:0] gcd(logic [M*N*2*32-1:0] v, int i, int j, int p);
    return v[((i*N+j)*2+p)*32 +: 32];
  endfunction

  real m3_exp [16][M][N][2];
  int  m3_wr = 0, m3_rd = 0;
  longint m3_done_cyc [$];

  task automatic m3_fill_and_expect(int md);
    real v [M][N][2];
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        for (int p = 0; p < 2; p++)
          m3_c[((i*N+j)*2+p)*32 +: 32] = real_to_fp32(real'(int'($urandom % 64) - 32));
    for (int k = 0; k < K16; k++) begin
      for (int i = 0; i < M; i++) m3_a[(i*K16+k)*16 +: 16] = 16'h0;
      for (int j = 0; j < N; j++) m3_b[(k*N+j)*16 +: 16] = 16'h0;
    end
    if (md == 0) begin
      // FP16 integers: value = 16'h3C00-style via rand from the helper package
      for (int k = 0; k < K16; k++) begin
        for (int i = 0; i < M; i++) m3_a[(i*K16+k)*16 +: 16] = rand_fp16(14, 18);
        for (int j = 0; j < N; j++) m3_b[(k*N+j)*16 +: 16] = rand_fp16(14, 18);
      end
    end else begin
      for (int k = 0; k < K16 / 2; k++) begin
        for (int i = 0; i < M; i++)
          {m3_a[(i*K16+2*k+1)*16 +: 16], m3_a[(i*K16+2*k)*16 +: 16]} = real_to_fp32(real'(int'($urandom % 200) - 100));
        for (int j = 0; j < N; j++)
          {m3_b[((2*k+1)*N+j)*16 +: 16], m3_b[((2*k)*N+j)*16 +: 16]} = real_to_fp32(real'(int'($urandom % 200) - 100));
      end
    end
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        real re, im;
        re = fp32_to_real(gcd(m3_c, i, j, 0));
        im = (md == 2) ? fp32_to_real(gcd(m3_c, i, j, 1)) : 0.0;
        if (md == 0)
          for (int k = 0; k < K16; k++) re += fp16_to_real(ga(i, k)) * fp16_to_real(gb(k, j));
        else if (md == 1)
          for (int k = 0; k < K16 / 2; k++)
            re += fp32_to_real({ga(i, 2*k+1), ga(i, 2*k)}) * fp32_to_real({gb(2*k+1, j), gb(2*k, j)});
        else
          for (int k = 0; k < K16 / 4; k++) begin
            real xr, xi, yr, yi;
            xr = fp32_to_real({ga(i, 4*k+1), ga(i, 4*k)});
            xi = fp32_to_real({ga(i, 4*k+3), ga(i, 4*k+2)});
            yr = fp32_to_real({gb(4*k+1, j), gb(4*k, j)});
            yi = fp32_to_real({gb(4*k+3, j), gb(4*k+2, j)});
            re += xr * yr - xi * yi;
            im += xr * yi + xi * yr;
          end
        v[i][j][0] = re;
        v[i][j][1] = im;
      end
    m3_exp[m3_wr % 16] = v;
    m3_wr++;
  endtask

  always @(posedge clk) begin
    if (rst_n && m3_done) begin
      int e;
      e = m3_rd % 16;
      m3_rd++;
      m3_done_cyc.push_back(cyc);
      for (int i = 0; i < M; i++)
        for (int j = 0; j < N; j++)
          for (int p = 0; p < 2; p++) begin
            real got, ex;
            got = fp32_to_real(gcd(m3_d, i, j, p));
            ex  = m3_exp[e][i][j][p];
            checks++;
            if (fabs(got - ex) > fabs(ex) * pow2(-20)) fail($sformatf("m3xu d[%0d][%0d][%0d] %g vs %g", i, j, p, got, ex));
          end
    end
  end

  task automatic m3_thread();
    int prev;
    prev = -1;
    // mode sequence with switches between back-to-back operations
    for (int q = 0; q < 18; q++) begin
      int md;
      md = (q < 9) ? q / 3 : (q % 3);
      m3_fill_and_expect(md);
      m3_mode  = 2'(md);
      m3_start = 1'b1;
      @(posedge clk iff m3_ready);
      n_mode[md]++;
      if (prev >= 0 && prev != md) n_mode_switch++;
      prev = md;
      #1;
    end
    m3_start = 1'b0;
    repeat (12) @(posedge clk);
    checks++;
    if (m3_rd != 18) fail($sformatf("m3xu completed %0d of 18", m3_rd));
    // issue rate: within the first nine (three of each mode back to back)
    // done pulses come 1, 2 and 4 cycles apart
    for (int q = 1; q < 9; q++) begin
      int s;
      if (q % 3 == 0) continue;
      s = (q < 3) ? 1 : (q < 6) ? 2 : 4;
      checks++;
      if (m3_done_cyc[q] - m3_done_cyc[q-1] != longint'(s))
        fail($sformatf("m3xu rate at %0d: %0d", q, m3_done_cyc[q] - m3_done_cyc[q-1]));
    end
  endtask

  // =============================================================== SIMD2
  localparam int SMEM_WORDS = 4096;
  localparam int A_AT = 0, B_AT = 512, C_AT = 1024, D_AT = 2048, LD = 32;
  logic [31:0] smem [SMEM_WORDS];
  always @(posedge clk) begin
    if (s2_smem_req && s2_smem_we)
      for (int j = 0; j < MAT; j++) smem[int'(s2_smem_addr) + j] = s2_smem_wdata[j*32 +: 32];
    if (s2_smem_req && !s2_smem_we)
      for (int j = 0; j < MAT; j++) s2_smem_rdata[j*32 +: 32] <= smem[int'(s2_smem_addr) + j];
  end

  task automatic s2_issue(logic [1:0] kind, int op, int rd, int ra, int rb, int rc, int addr);
    s2_instr_kind = kind;  s2_instr_op = 4'(op);
    s2_instr_rd = 3'(rd);  s2_instr_ra = 3'(ra);  s2_instr_rb = 3'(rb);  s2_instr_rc = 3'(rc);
    s2_instr_addr = AW'(addr);  s2_instr_ld = AW'(LD);
    s2_instr_valid = 1'b1;
    @(posedge clk iff s2_instr_ready);
    if (kind == 2'd0) n_load++;
    if (kind == 2'd1) n_store++;
    if (kind == 2'd2) n_opcode[op]++;
    #1 s2_instr_valid = 1'b0;
    @(posedge clk iff s2_instr_ready);
    #1;
  endtask

  task automatic s2_thread();
    logic [31:0] expd [MAT][MAT];
    for (int op = 0; op < 9; op++) begin
      for (int i = 0; i < MAT; i++)
        for (int j = 0; j < MAT; j++) begin
          smem[A_AT + i*LD + j] = {16'h0, rand_fp16(8, 20)};
          smem[B_AT + i*LD + j] = {16'h0, rand_fp16(8, 20)};
          if (op == 7 && ($urandom % 2 == 0)) smem[A_AT + i*LD + j][15:0] = 16'h0000;
          smem[C_AT + i*LD + j] = (op == 7) ? 32'd0 : rand_fp32(120, 135);
        end
      for (int i = 0; i < MAT; i++)
        for (int j = 0; j < MAT; j++) begin
          logic [31:0] acc;
          acc = smem[C_AT + i*LD + j];
          for (int k = 0; k < MAT; k++)
            acc = r_oplus(pl_of(op), acc,
                          r_otimes(ot_of(op), smem[A_AT + i*LD + k][15:0], smem[B_AT + k*LD + j][15:0]));
          expd[i][j] = acc;
        end
      s2_issue(2'd0, 0, 1, 0, 0, 0, A_AT);
      s2_issue(2'd0, 0, 2, 0, 0, 0, B_AT);
      s2_issue(2'd0, 0, 3, 0, 0, 0, C_AT);
      s2_issue(2'd2, op, 4, 1, 2, 3, 0);
      s2_issue(2'd1, 0, 0, 4, 0, 0, D_AT);
      for (int i = 0; i < MAT; i++)
        for (int j = 0; j < MAT; j++) begin
          checks++;
          if (!fp_same(smem[D_AT + i*LD + j], expd[i][j]))
            fail($sformatf("simd2 op %0d D[%0d][%0d] %h vs %h", op, i, j, smem[D_AT + i*LD + j], expd[i][j]));
        end
    end
    checks++;
    if (s2_unit_ops != 32'(9 * 64)) fail($sformatf("simd2 unit_ops %0d", s2_unit_ops));
  endtask

  // =============================================================== SIDA
  localparam int unsigned SN = 320;
  logic mem_gnt_q;
  hbm_model #(.WORDS(32768), .LAT(4), .STALLS(1'b1)) u_mem (
    .clk, .req (sd_mem_req), .addr (sd_mem_addr), .gnt (sd_mem_gnt),
    .rvalid (sd_mem_rvalid), .rdata (sd_mem_rdata));

  always @(posedge clk) if (sd_mem_req && !sd_mem_gnt) n_mem_stall++;
  // the dispatcher starts two steps ahead of the first e-wise step
  always @(posedge clk) if (rst_n && dut.u_sida.u_disp.running && !dut.u_sida.u_disp.e_valid
                            && dut.u_sida.u_disp.p_valid) n_fill <= n_fill + 1;

  val_t A [SN][SN];

  task automatic sd_thread();
    val_t x [SN], w [SN], y [SN], z [SN], o [SN];
    int nnz, k;
    for (int i = 0; i < SN; i++)
      for (int j = 0; j < SN; j++) begin
        A[i][j] = ($urandom % 100 < 7) ? val_t'(1 + $urandom % 9) : 0;
        if (i == 100 || j == 40) A[i][j] = val_t'(1 + $urandom % 9);
      end
    for (int i = 0; i < SN; i++) begin
      x[i] = val_t'($urandom % 20);
      w[i] = val_t'($urandom % 20);
    end
    sd_x_base = 0; sd_w_base = SN; sd_rowlen_base = 2 * SN; sd_colptr_base = 3 * SN;
    nnz = 0;
    for (int i = 0; i < SN; i++) for (int j = 0; j < SN; j++) if (A[i][j] != 0) nnz++;
    sd_rowidx_base = 4 * SN + 1;
    sd_val_base = sd_rowidx_base + 32'(nnz);
    k = 0;
    for (int j = 0; j < SN; j++) begin
      u_mem.mem[sd_colptr_base + j] = 64'(k);
      for (int i = 0; i < SN; i++)
        if (A[i][j] != 0) begin
          u_mem.mem[sd_rowidx_base + k] = 64'(i);
          u_mem.mem[sd_val_base + k]    = A[i][j];
          k++;
        end
    end
    u_mem.mem[sd_colptr_base + SN] = 64'(k);
    for (int i = 0; i < SN; i++) begin
      int rl;
      rl = 0;
      for (int j = 0; j < SN; j++) if (A[i][j] != 0) rl++;
      u_mem.mem[sd_x_base + i] = x[i];
      u_mem.mem[sd_w_base + i] = w[i];
      u_mem.mem[sd_rowlen_base + i] = 64'(rl);
    end
    // mul-add semiring, e-wise z = y * 3 + w
    for (int s = 0; s < SN; s++) begin
      y[s] = 0;
      for (int r = 0; r < SN; r++) y[s] += x[r] * A[r][s];
      z[s] = y[s] * 3 + w[s];
    end
    for (int j = 0; j < SN; j++) begin
      o[j] = 0;
      for (int s = 0; s < SN; s++) o[j] += z[s] * A[s][j];
    end
    // OS sub-tensors that need more than one pass over the PEs
    for (int b = 0; b < SN; b += T) begin
      int c;
      c = 0;
      for (int j = b; j < b + T && j < SN; j++) for (int i = 0; i < SN; i++) if (A[i][j] != 0) c++;
      if (c > NPE) n_os_multi++;
    end
    sd_n = SN; sd_sr = 2'd0; sd_ew_mul_op = 3'(ALU_MUL); sd_ew_add_op = 3'(ALU_ADD); sd_ew_scalar = 3;
    sd_start = 1'b1;
    @(posedge clk);
    #1 sd_start = 1'b0;
    @(posedge clk iff sd_done);
    #1;
    for (int j = 0; j < SN; j++) begin
      sd_out_raddr = $clog2(NVEC)'(j);
      #1;
      checks++;
      if (sd_out_rdata != o[j]) fail($sformatf("sida out[%0d] %0d vs %0d", j, sd_out_rdata, o[j]));
    end
    checks++;
    if (sd_stat_mem_words != 32'(4 * SN + 1 + 2 * nnz)) fail("sida memory words");
    checks++;
    if (sd_stat_eager + sd_stat_converted != 32'(nnz) || sd_stat_dropped != 0) fail("sida element accounting");
    checks++;
    if (sd_stat_os_cycles <= sd_stat_steps - 3) fail("sida OS passes");
    n_eager   = int'(sd_stat_eager);
    n_convert = int'(sd_stat_converted);
    $display("sida: n %0d nnz %0d cycles %0d steps %0d os %0d is %0d eager %0d converted %0d",
             SN, nnz, sd_stat_cycles, sd_stat_steps, sd_stat_os_cycles, sd_stat_is_cycles,
             sd_stat_eager, sd_stat_converted);
  endtask

  // =============================================================== control
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(int count, string what);
    checks++;
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) fail($sformatf("mechanism never happened: %s", what));
  endtask

  initial begin
    m3_start = 0; m3_mode = 0; m3_a = '0; m3_b = '0; m3_c = '0;
    s2_instr_valid = 0; s2_instr_kind = 0; s2_instr_op = 0; s2_instr_rd = 0; s2_instr_ra = 0;
    s2_instr_rb = 0; s2_instr_rc = 0; s2_instr_addr = 0; s2_instr_ld = 0; s2_smem_rdata = '0;
    sd_start = 0; sd_n = 0; sd_sr = 0; sd_ew_mul_op = 0; sd_ew_add_op = 0; sd_ew_scalar = 0;
    sd_x_base = 0; sd_w_base = 0; sd_rowlen_base = 0; sd_colptr_base = 0; sd_rowidx_base = 0;
    sd_val_base = 0; sd_out_raddr = 0;
    for (int i = 0; i < SMEM_WORDS; i++) smem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    fork
      m3_thread();
      s2_thread();
      sd_thread();
    join
    need(n_mode[0], "m3xu FP16 operations");
    need(n_mode[1], "m3xu FP32 operations");
    need(n_mode[2], "m3xu FP32C operations");
    need(n_mode_switch, "m3xu mode switches");
    for (int op = 0; op < 9; op++) need(n_opcode[op], $sformatf("simd2 opcode %0d", op));
    need(n_load, "simd2 loads");
    need(n_store, "simd2 stores");
    need(n_eager, "sida eager IS updates");
    need(n_convert, "sida CSC-to-CSR conversions");
    need(n_os_multi, "sida multi-pass OS sub-tensors");
    need(n_mem_stall, "sida memory stalls");
    need(n_fill, "sida pipeline fill cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
