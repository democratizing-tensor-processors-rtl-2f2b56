// SIMD2 matrix instruction engine.
//
// Executes the warp-level SIMD2 instructions on MAT x MAT matrices held in a
// matrix register file of NREG registers:
//   LOAD  rd, addr, ld : shared memory -> register, one row per cycle
//   STORE rs, addr, ld : register -> shared memory, one row per cycle
//   ARITH op, rd, ra, rb, rc : rd = rc (+) (ra (x) rb) for one of the nine
//                        semiring-like opcodes
// Row r of a matrix lives at shared-memory word address addr + r*ld (ld is
// the leading dimension); a row is MAT 32-bit words. Half-precision operands
// of A and B are the low 16 bits of each word, C and D are single precision.
//
// ARITH walks the (MAT/TILE)^2 output tiles, and for each the MAT/TILE
// inner tiles in order, on one SIMD2 unit: the first inner step takes C from
// the register file, later ones feed back the unit's previous result, so the
// inner dimension is reduced strictly in order k = 0 .. MAT-1. One unit
// operation issues per cycle; results go to a staging matrix that is copied
// to rd in one extra cycle, so rd may equal ra, rb or rc.
// Busy time: LOAD MAT+1 cycles (one-cycle shared-memory read latency),
// STORE MAT cycles, ARITH (MAT/TILE)^3 + 2 cycles; "instr_ready" returns
// in the cycle after the last busy cycle.
//
// The instruction set, the 16 x 16 shape and the formats follow the
// document; the register file, the shared-memory port and the tile order
// are choices of this design (the document builds on a GPU whose register
// file and shared memory it does not describe).
module simd2_core
  import simd2_pkg::*;
#(
  parameter int unsigned MAT  = 16,
  parameter int unsigned TILE = 4,
  parameter int unsigned NREG = 8,
  parameter int unsigned AW   = 16      // shared-memory word address bits
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // instruction
  input  logic                    instr_valid,
  output logic                    instr_ready,
  input  logic [1:0]              instr_kind,   // 0 load, 1 store, 2 arith
  input  simd2_op_e               instr_op,
  input  logic [$clog2(NREG)-1:0] instr_rd,
  input  logic [$clog2(NREG)-1:0] instr_ra,
  input  logic [$clog2(NREG)-1:0] instr_rb,
  input  logic [$clog2(NREG)-1:0] instr_rc,
  input  logic [AW-1:0]           instr_addr,
  input  logic [AW-1:0]           instr_ld,
  output logic                    busy,
  // shared-memory port
  output logic                    smem_req,
  output logic                    smem_we,
  output logic [AW-1:0]           smem_addr,
  output logic [31:0]             smem_wdata [MAT],
  input  logic [31:0]             smem_rdata [MAT],
  // statistics
  output logic [31:0]             unit_ops
);
  localparam int unsigned NT = MAT / TILE;
  localparam int unsigned RW = $clog2(NREG);
  localparam int unsigned TW = (NT > 1) ? $clog2(NT) : 1;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_STORE, S_ARITH, S_DRAIN, S_COMMIT} state_e;

  localparam logic [1:0] K_LOAD = 2'd0, K_STORE = 2'd1;

  state_e           state_q;
  logic [31:0]      rf    [NREG][MAT][MAT];
  logic [31:0]      stage [MAT][MAT];
  logic [RW-1:0]    rd_q, ra_q, rb_q, rc_q;
  simd2_op_e        op_q;
  logic [AW-1:0]    addr_q, ld_q;
  logic [$clog2(MAT+1)-1:0] row_q;
  logic             rvalid_q;
  logic [$clog2(MAT)-1:0]   rrow_q;
  logic [TW-1:0]    ti_q, tj_q, tk_q;
  logic [TW-1:0]    oti_q, otj_q, otk_q;   // tile of the result in the unit

  // SIMD2 unit operands.
  logic        u_valid, u_out_valid;
  logic [15:0] u_a [TILE][TILE];
  logic [15:0] u_b [TILE][TILE];
  logic [31:0] u_c [TILE][TILE];
  logic [31:0] u_d [TILE][TILE];

  assign instr_ready = (state_q == S_IDLE);
  assign busy        = (state_q != S_IDLE);
  assign u_valid     = (state_q == S_ARITH);

  always_comb begin
    for (int i = 0; i < TILE; i++) begin
      for (int j = 0; j < TILE; j++) begin
        u_a[i][j] = rf[ra_q][int'(ti_q) * TILE + i][int'(tk_q) * TILE + j][15:0];
        u_b[i][j] = rf[rb_q][int'(tk_q) * TILE + i][int'(tj_q) * TILE + j][15:0];
        u_c[i][j] = (tk_q == '0) ? rf[rc_q][int'(ti_q) * TILE + i][int'(tj_q) * TILE + j]
                                 : u_d[i][j];
      end
    end
  end

  simd2_unit #(.TILE(TILE)) u_unit (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (u_valid),
    .opcode    (op_q),
    .a         (u_a),
    .b         (u_b),
    .c         (u_c),
    .out_valid (u_out_valid),
    .d         (u_d)
  );

  // Shared-memory port.
  always_comb begin
    smem_req  = (state_q == S_LOAD && row_q < MAT) || (state_q == S_STORE);
    smem_we   = (state_q == S_STORE);
    smem_addr = addr_q + AW'(row_q) * ld_q;
    for (int j = 0; j < MAT; j++)
      smem_wdata[j] = rf[rd_q][row_q[$clog2(MAT)-1:0]][j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      row_q    <= '0;
      rvalid_q <= 1'b0;
      rrow_q   <= '0;
      ti_q <= '0; tj_q <= '0; tk_q <= '0;
      oti_q <= '0; otj_q <= '0; otk_q <= '0;
      rd_q <= '0; ra_q <= '0; rb_q <= '0; rc_q <= '0;
      op_q <= OP_MMA;
      addr_q <= '0; ld_q <= '0;
      unit_ops <= '0;
    end else begin
      rvalid_q <= (state_q == S_LOAD) && (row_q < MAT);
      rrow_q   <= row_q[$clog2(MAT)-1:0];
      if (u_valid) unit_ops <= unit_ops + 32'd1;
      oti_q <= ti_q;  otj_q <= tj_q;  otk_q <= tk_q;
      case (state_q)
        S_IDLE: if (instr_valid) begin
          rd_q   <= (instr_kind == K_STORE) ? instr_ra : instr_rd;
          ra_q   <= instr_ra;
          rb_q   <= instr_rb;
          rc_q   <= instr_rc;
          op_q   <= instr_op;
          addr_q <= instr_addr;
          ld_q   <= instr_ld;
          row_q  <= '0;
          ti_q <= '0; tj_q <= '0; tk_q <= '0;
          state_q <= (instr_kind == K_LOAD)  ? S_LOAD :
                     (instr_kind == K_STORE) ? S_STORE : S_ARITH;
        end
        S_LOAD: begin
          if (row_q < MAT) row_q <= row_q + 1'b1;
          if (rvalid_q && 32'(rrow_q) == MAT - 1) state_q <= S_IDLE;
        end
        S_STORE: begin
          row_q <= row_q + 1'b1;
          if (32'(row_q) == MAT - 1) state_q <= S_IDLE;
        end
        S_ARITH: begin
          tk_q <= tk_q + 1'b1;
          if (32'(tk_q) == NT - 1) begin
            tk_q <= '0;
            tj_q <= tj_q + 1'b1;
            if (32'(tj_q) == NT - 1) begin
              tj_q <= '0;
              ti_q <= ti_q + 1'b1;
              if (32'(ti_q) == NT - 1) state_q <= S_DRAIN;
            end
          end
        end
        S_DRAIN:  state_q <= S_COMMIT;
        S_COMMIT: state_q <= S_IDLE;
        default:  state_q <= S_IDLE;
      endcase
    end
  end

  // Register file and staging matrix writes.
  always_ff @(posedge clk) begin
    if (rvalid_q) rf[rd_q][rrow_q] <= smem_rdata;
    if (u_out_valid && 32'(otk_q) == NT - 1) begin
      for (int i = 0; i < TILE; i++)
        for (int j = 0; j < TILE; j++)
          stage[int'(oti_q) * TILE + i][int'(otj_q) * TILE + j] <= u_d[i][j];
    end
    if (state_q == S_COMMIT) rf[rd_q] <= stage;
  end

endmodule
