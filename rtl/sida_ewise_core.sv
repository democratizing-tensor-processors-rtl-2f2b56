// SIDA E-Wise core: applies the fused element-wise instruction to one
// sub-tensor of the OS core's output in SIMD fashion,
//   z[t] = (y[t] (x) s) (+) w[t],
// with (x) and (+) from the PE operation set and s a scalar of the
// instruction (for example z = d*y + (1-d)/n for PageRank, or z = y (+) w to
// keep the best distance so far). T PEs, one result sub-tensor per cycle:
// z and out_valid follow in_valid by one cycle.
// The document pre-generates the fused e-wise instructions offline and uses
// PEs identical to the OS core's; the instruction form is a choice of this
// design.
module sida_ewise_core
  import sida_pkg::*;
#(
  parameter int unsigned T = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  alu_e  mul_op,
  input  alu_e  add_op,
  input  val_t  scalar,
  input  logic  in_valid,
  input  val_t  y   [T],
  input  val_t  w   [T],
  output logic  out_valid,
  output val_t  z   [T]
);
  val_t r [T];
  for (genvar t = 0; t < T; t++) begin : g_pe
    sida_pe u_pe (.mul_op(mul_op), .add_op(add_op), .a(y[t]), .b(scalar), .c(w[t]), .y(r[t]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int unsigned t = 0; t < T; t++) z[t] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) z <= r;
    end
  end
endmodule
