// Top level: the three tensor-processor designs side by side.
//
// What it does: instantiates the M3XU multi-mode matrix unit, the SIMD2
// semiring matrix core and the SIDA sparse vxm -> e-wise -> vxm engine, each
// with its own clock-domain-free port group. The three do not share data;
// a system would put M3XU and SIMD2 inside a GPU SM and SIDA beside its HBM.
//
// Interface: all ports are plain packed vectors so that the top can be driven
// from any environment.
//   m3_*   : M3XU operation port. m3_a packs a[M][K16] row-major (element
//            [i][k] at bits ((i*K16+k)*16) +: 16), m3_b packs b[K16][N]
//            ([k][j] at ((k*N+j)*16)), m3_c/m3_d pack c/d[M][N][2] ([i][j][p]
//            at (((i*N+j)*2+p)*32)), p=0 real/plain word, p=1 imaginary.
//            m3_mode: 0 FP16, 1 FP32, 2 FP32 complex.
//   s2_*   : SIMD2 instruction port and shared-memory port; s2_smem_wdata /
//            s2_smem_rdata pack the MAT words of one matrix row (word c at
//            bits c*32 +: 32). s2_instr_op is the 4-bit SIMD2 opcode.
//   sd_*   : SIDA job, memory read port, result read port and statistics.
//            sd_sr is the semiring (0 mul-add, 1 and-or, 2 min-add), the
//            e-wise operators are sida_pkg::alu_e codes.
//
// Timing: each sub-design keeps its own timing (see the sub-module headers);
// the top adds no registers.
//
// Document versus design choice: the three designs and their parameters are
// from the document; packing the ports into flat vectors and placing the
// three side by side in one top are choices of this design.
module tensor_processors_top
  import m3xu_pkg::*;
  import simd2_pkg::*;
  import sida_pkg::*;
#(
  // M3XU
  parameter int unsigned M3_M      = 8,
  parameter int unsigned M3_N      = 4,
  parameter int unsigned M3_K16    = 8,
  // SIMD2
  parameter int unsigned S2_MAT    = 16,
  parameter int unsigned S2_TILE   = 4,
  parameter int unsigned S2_NREG   = 8,
  parameter int unsigned S2_AW     = 16,
  // SIDA
  parameter int unsigned SD_NPE       = 1024,
  parameter int unsigned SD_T         = 64,
  parameter int unsigned SD_NVEC      = 65536,
  parameter int unsigned SD_CSC_DEPTH = 2097152,
  parameter int unsigned SD_CSR_DEPTH = 2097152
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // ---------------- M3XU
  input  logic                               m3_start,
  output logic                               m3_ready,
  input  logic [1:0]                         m3_mode,
  input  logic [M3_M*M3_K16*16-1:0]          m3_a,
  input  logic [M3_K16*M3_N*16-1:0]          m3_b,
  input  logic [M3_M*M3_N*2*32-1:0]          m3_c,
  output logic [M3_M*M3_N*2*32-1:0]          m3_d,
  output logic                               m3_done,
  // ---------------- SIMD2
  input  logic                               s2_instr_valid,
  output logic                               s2_instr_ready,
  input  logic [1:0]                         s2_instr_kind,
  input  logic [3:0]                         s2_instr_op,
  input  logic [$clog2(S2_NREG)-1:0]         s2_instr_rd,
  input  logic [$clog2(S2_NREG)-1:0]         s2_instr_ra,
  input  logic [$clog2(S2_NREG)-1:0]         s2_instr_rb,
  input  logic [$clog2(S2_NREG)-1:0]         s2_instr_rc,
  input  logic [S2_AW-1:0]                   s2_instr_addr,
  input  logic [S2_AW-1:0]                   s2_instr_ld,
  output logic                               s2_busy,
  output logic                               s2_smem_req,
  output logic                               s2_smem_we,
  output logic [S2_AW-1:0]                   s2_smem_addr,
  output logic [S2_MAT*32-1:0]               s2_smem_wdata,
  input  logic [S2_MAT*32-1:0]               s2_smem_rdata,
  output logic [31:0]                        s2_unit_ops,
  // ---------------- SIDA
  input  logic                               sd_start,
  input  logic [31:0]                        sd_n,
  input  logic [1:0]                         sd_sr,
  input  logic [2:0]                         sd_ew_mul_op,
  input  logic [2:0]                         sd_ew_add_op,
  input  logic [63:0]                        sd_ew_scalar,
  input  logic [31:0]                        sd_x_base,
  input  logic [31:0]                        sd_w_base,
  input  logic [31:0]                        sd_rowlen_base,
  input  logic [31:0]                        sd_colptr_base,
  input  logic [31:0]                        sd_rowidx_base,
  input  logic [31:0]                        sd_val_base,
  output logic                               sd_busy,
  output logic                               sd_done,
  output logic                               sd_mem_req,
  output logic [31:0]                        sd_mem_addr,
  input  logic                               sd_mem_gnt,
  input  logic                               sd_mem_rvalid,
  input  logic [63:0]                        sd_mem_rdata,
  input  logic [$clog2(SD_NVEC)-1:0]         sd_out_raddr,
  output logic [63:0]                        sd_out_rdata,
  output logic [31:0]                        sd_stat_cycles,
  output logic [31:0]                        sd_stat_steps,
  output logic [31:0]                        sd_stat_mem_words,
  output logic [31:0]                        sd_stat_os_cycles,
  output logic [31:0]                        sd_stat_is_cycles,
  output logic [31:0]                        sd_stat_eager,
  output logic [31:0]                        sd_stat_converted,
  output logic [31:0]                        sd_stat_dropped,
  output logic [31:0]                        sd_stat_est_x
);

  // ---------------------------------------------------------------- M3XU
  logic [15:0] m3_a_u [M3_M][M3_K16];
  logic [15:0] m3_b_u [M3_K16][M3_N];
  logic [31:0] m3_c_u [M3_M][M3_N][2];
  logic [31:0] m3_d_u [M3_M][M3_N][2];

  for (genvar i = 0; i < M3_M; i++) begin : g_m3_a
    for (genvar k = 0; k < M3_K16; k++) begin : g_k
      assign m3_a_u[i][k] = m3_a[(i*M3_K16+k)*16 +: 16];
    end
  end
  for (genvar k = 0; k < M3_K16; k++) begin : g_m3_b
    for (genvar j = 0; j < M3_N; j++) begin : g_j
      assign m3_b_u[k][j] = m3_b[(k*M3_N+j)*16 +: 16];
    end
  end
  for (genvar i = 0; i < M3_M; i++) begin : g_m3_cd
    for (genvar j = 0; j < M3_N; j++) begin : g_j
      for (genvar p = 0; p < 2; p++) begin : g_p
        assign m3_c_u[i][j][p] = m3_c[((i*M3_N+j)*2+p)*32 +: 32];
        assign m3_d[((i*M3_N+j)*2+p)*32 +: 32] = m3_d_u[i][j][p];
      end
    end
  end

  m3xu #(.M(M3_M), .N(M3_N), .K16(M3_K16)) u_m3xu (
    .clk, .rst_n,
    .start (m3_start),
    .ready (m3_ready),
    .mode  (m3xu_mode_e'(m3_mode)),
    .a     (m3_a_u),
    .b     (m3_b_u),
    .c     (m3_c_u),
    .d     (m3_d_u),
    .done  (m3_done)
  );

  // ---------------------------------------------------------------- SIMD2
  logic [31:0] s2_wdata_u [S2_MAT];
  logic [31:0] s2_rdata_u [S2_MAT];

  for (genvar c = 0; c < S2_MAT; c++) begin : g_s2_row
    assign s2_smem_wdata[c*32 +: 32] = s2_wdata_u[c];
    assign s2_rdata_u[c]             = s2_smem_rdata[c*32 +: 32];
  end

  simd2_core #(.MAT(S2_MAT), .TILE(S2_TILE), .NREG(S2_NREG), .AW(S2_AW)) u_simd2 (
    .clk, .rst_n,
    .instr_valid (s2_instr_valid),
    .instr_ready (s2_instr_ready),
    .instr_kind  (s2_instr_kind),
    .instr_op    (simd2_op_e'(s2_instr_op)),
    .instr_rd    (s2_instr_rd),
    .instr_ra    (s2_instr_ra),
    .instr_rb    (s2_instr_rb),
    .instr_rc    (s2_instr_rc),
    .instr_addr  (s2_instr_addr),
    .instr_ld    (s2_instr_ld),
    .busy        (s2_busy),
    .smem_req    (s2_smem_req),
    .smem_we     (s2_smem_we),
    .smem_addr   (s2_smem_addr),
    .smem_wdata  (s2_wdata_u),
    .smem_rdata  (s2_rdata_u),
    .unit_ops    (s2_unit_ops)
  );

  // ---------------------------------------------------------------- SIDA
  val_t sd_out_rdata_v;
  assign sd_out_rdata = sd_out_rdata_v;

  sida #(.NPE(SD_NPE), .T(SD_T), .NVEC(SD_NVEC),
         .CSC_DEPTH(SD_CSC_DEPTH), .CSR_DEPTH(SD_CSR_DEPTH)) u_sida (
    .clk, .rst_n,
    .start          (sd_start),
    .n              (sd_n),
    .sr             (semiring_e'(sd_sr)),
    .ew_mul_op      (alu_e'(sd_ew_mul_op)),
    .ew_add_op      (alu_e'(sd_ew_add_op)),
    .ew_scalar      (val_t'(sd_ew_scalar)),
    .x_base         (sd_x_base),
    .w_base         (sd_w_base),
    .rowlen_base    (sd_rowlen_base),
    .colptr_base    (sd_colptr_base),
    .rowidx_base    (sd_rowidx_base),
    .val_base       (sd_val_base),
    .busy           (sd_busy),
    .done           (sd_done),
    .mem_req        (sd_mem_req),
    .mem_addr       (sd_mem_addr),
    .mem_gnt        (sd_mem_gnt),
    .mem_rvalid     (sd_mem_rvalid),
    .mem_rdata      (sd_mem_rdata),
    .out_raddr      (sd_out_raddr),
    .out_rdata      (sd_out_rdata_v),
    .stat_cycles    (sd_stat_cycles),
    .stat_steps     (sd_stat_steps),
    .stat_mem_words (sd_stat_mem_words),
    .stat_os_cycles (sd_stat_os_cycles),
    .stat_is_cycles (sd_stat_is_cycles),
    .stat_eager     (sd_stat_eager),
    .stat_converted (sd_stat_converted),
    .stat_dropped   (sd_stat_dropped),
    .stat_est_x     (sd_stat_est_x)
  );

endmodule
