// Self-checking testbench of the SIMD2 instruction engine. A shared-memory
// model (one-cycle read latency) holds A, B and C; the test loads them,
// runs every arithmetic opcode on 16 x 16 matrices with D written to a
// different register and once in place over C, stores D and compares it with
// a reference that reduces the inner dimension in order. Instruction
// busy times (LOAD 17, STORE 16, ARITH 66 cycles) are checked too.
//
// Interface and timing: no ports; it drives its own clock (10 time units per
// cycle), prints "TB_RESULT checks=N failures=M" and stops, and a watchdog
// ends a run that hangs as a failure. What it expects follows the published
// behaviour of the block; the stimulus, the reduced sizes and the reference
// model are this testbench's own choices.
module tb_simd2_core;
  import simd2_pkg::*;
  import tb_fp_pkg::*;
  import tb_simd2_ref_pkg::*;

  localparam int unsigned MAT = 16, TILE = 4, NREG = 8, AW = 16;
  localparam int unsigned SMEM_WORDS = 4096;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          instr_valid, instr_ready, busy, smem_req, smem_we;
  logic [1:0]    instr_kind;
  simd2_op_e     instr_op;
  logic [2:0]    instr_rd, instr_ra, instr_rb, instr_rc;
  logic [AW-1:0] instr_addr, instr_ld, smem_addr;
  logic [31:0]   smem_wdata [MAT];
  logic [31:0]   smem_rdata [MAT];
  logic [31:0]   unit_ops;
  int checks = 0, failures = 0;

  simd2_core #(.MAT(MAT), .TILE(TILE), .NREG(NREG), .AW(AW)) dut (.*);

  // shared memory
  logic [31:0] smem [SMEM_WORDS];
  always @(posedge clk) begin
    if (smem_req && smem_we)
      for (int j = 0; j < MAT; j++) smem[int'(smem_addr) + j] = smem_wdata[j];
    if (smem_req && !smem_we)
      for (int j = 0; j < MAT; j++) smem_rdata[j] <= smem[int'(smem_addr) + j];
  end

  localparam int A_AT = 0, B_AT = 512, C_AT = 1024, D_AT = 2048, LD = 32;

  task automatic issue(logic [1:0] kind, int op, int rd, int ra, int rb, int rc,
                       int addr, int expect_cycles);
    longint t0, t1;
    instr_kind = kind;  instr_op = simd2_op_e'(op);
    instr_rd = 3'(rd);  instr_ra = 3'(ra);  instr_rb = 3'(rb);  instr_rc = 3'(rc);
    instr_addr = AW'(addr);  instr_ld = AW'(LD);
    instr_valid = 1'b1;
    @(posedge clk iff instr_ready);
    t0 = $time;
    #1 instr_valid = 1'b0;
    @(posedge clk iff instr_ready);
    t1 = $time;
    #1;
    // busy for expect_cycles, the next instruction is accepted one cycle later
    checks++;
    if ((t1 - t0) / 10 != longint'(expect_cycles) + 1) begin
      failures++;
      $display("kind %0d took %0d cycles, expected %0d", kind, (t1 - t0) / 10, expect_cycles + 1);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expd [MAT][MAT];
    instr_valid = 1'b0;
    instr_kind = '0; instr_op = OP_MMA;
    instr_rd = '0; instr_ra = '0; instr_rb = '0; instr_rc = '0;
    instr_addr = '0; instr_ld = '0;
    for (int i = 0; i < SMEM_WORDS; i++) smem[i] = '0;
    for (int j = 0; j < MAT; j++) smem_rdata[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int opc = 0; opc < 10; opc++) begin
      int op;
      bit inplace;
      op      = (opc == 9) ? 1 : opc;       // last round: min-plus in place
      inplace = (opc == 9);
      for (int i = 0; i < MAT; i++)
        for (int j = 0; j < MAT; j++) begin
          smem[A_AT + i*LD + j] = {16'hDEAD, rand_fp16(8, 20)};
          smem[B_AT + i*LD + j] = {16'hBEEF, rand_fp16(8, 20)};
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
      issue(2'd0, 0, 1, 0, 0, 0, A_AT, MAT + 1);
      issue(2'd0, 0, 2, 0, 0, 0, B_AT, MAT + 1);
      issue(2'd0, 0, 3, 0, 0, 0, C_AT, MAT + 1);
      issue(2'd2, op, inplace ? 3 : 4, 1, 2, 3, 0, (MAT/TILE)**3 + 2);
      issue(2'd1, 0, 0, inplace ? 3 : 4, 0, 0, D_AT, MAT);
      for (int i = 0; i < MAT; i++)
        for (int j = 0; j < MAT; j++) begin
          checks++;
          if (!fp_same(smem[D_AT + i*LD + j], expd[i][j])) begin
            failures++;
            if (failures < 10) $display("op %0d D[%0d][%0d] got %h exp %h", op, i, j, smem[D_AT + i*LD + j], expd[i][j]);
          end
        end
    end
    checks++;
    if (unit_ops != 32'(10 * (MAT/TILE)**3)) begin
      failures++;
      $display("unit_ops %0d", unit_ops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
