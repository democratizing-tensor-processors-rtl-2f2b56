// SIDA IS core: input-stationary vector-matrix product.
//
// Each cycle with in_valid, one input-vector element z (the element-wise
// result for row s) meets up to NPE non-zeros of matrix row s, given as
// (column, value) lanes. Each lane's PE forms z (x) a and the scatter writes
// out[col] = out[col] (+) (z (x) a) into the output vector buffer of NVEC
// elements. The lanes of one cycle belong to one row, so their columns are
// distinct and every buffer element takes at most one update per cycle.
// "clear" sets the whole buffer to the identity of (+) in one cycle; the
// buffer is read back through out_raddr / out_rdata (combinational read).
// The document names the output vector buffer and a scatter network but does
// not detail them; one row per cycle is a choice of this design.
module sida_is_core
  import sida_pkg::*;
#(
  parameter int unsigned NPE  = 1024,
  parameter int unsigned NVEC = 65536
) (
  input  logic                     clk,
  input  semiring_e                sr,
  input  logic                     clear,
  input  logic                     in_valid,
  input  val_t                     z,
  input  logic                     lane_valid [NPE],
  input  logic [$clog2(NVEC)-1:0]  lane_col   [NPE],
  input  val_t                     lane_a     [NPE],
  input  logic [$clog2(NVEC)-1:0]  out_raddr,
  output val_t                     out_rdata
);
  val_t outv [NVEC];
  val_t upd  [NPE];

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    sida_pe u_pe (
      .mul_op (otimes_of(sr)),
      .add_op (oplus_of(sr)),
      .a      (z),
      .b      (lane_a[p]),
      .c      (outv[lane_col[p]]),
      .y      (upd[p])
    );
  end

  always_ff @(posedge clk) begin
    if (clear) begin
      for (int unsigned i = 0; i < NVEC; i++) outv[i] <= identity_of(sr);
    end else if (in_valid) begin
      for (int unsigned p = 0; p < NPE; p++)
        if (lane_valid[p]) outv[lane_col[p]] <= upd[p];
    end
  end

  assign out_rdata = outv[out_raddr];
endmodule
