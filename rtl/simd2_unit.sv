// SIMD2 unit: one fixed-size tile operation D = C (+) (A (x) B).
//
// A and B are TILE x TILE half-precision tiles, C and D single precision.
// Every output element has TILE (x) ALUs, one per inner index k, whose
// results are folded into C[i][j] by a chain of TILE (+) ALUs in order
// k = 0 .. TILE-1 (the accumulation structure of a matrix-multiply unit with
// the ALUs made configurable). Both ALUs are configured by decoding the
// instruction's opcode. One operation is accepted per cycle and its result
// is registered: "out_valid" and "d" follow "in_valid" by one cycle for every
// opcode, so all instructions have the same latency and throughput.
// The tile size follows the document's example unit (4 x 4); the chain order
// and the single-cycle latency are choices of this design.
module simd2_unit
  import simd2_pkg::*;
#(
  parameter int unsigned TILE = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  simd2_op_e   opcode,
  input  logic [15:0] a [TILE][TILE],
  input  logic [15:0] b [TILE][TILE],
  input  logic [31:0] c [TILE][TILE],
  output logic        out_valid,
  output logic [31:0] d [TILE][TILE]
);
  otimes_e ot;
  oplus_e  pl;
  assign ot = otimes_of(opcode);
  assign pl = oplus_of(opcode);

  for (genvar i = 0; i < TILE; i++) begin : g_i
    for (genvar j = 0; j < TILE; j++) begin : g_j
      for (genvar k = 0; k < TILE; k++) begin : g_k
        logic [31:0] prod, acc_in, acc_out;
        if (k == 0) begin : g_first
          assign acc_in = c[i][j];
        end else begin : g_next
          assign acc_in = g_k[k-1].acc_out;
        end
        simd2_otimes_alu u_ot (.op(ot), .a(a[i][k]), .b(b[k][j]), .y(prod));
        simd2_oplus_alu  u_pl (.op(pl), .x(acc_in), .p(prod), .y(acc_out));
      end
      always_ff @(posedge clk) begin
        if (in_valid) d[i][j] <= g_k[TILE-1].acc_out;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
