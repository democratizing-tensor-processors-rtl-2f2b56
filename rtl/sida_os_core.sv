// SIDA OS core: output-stationary vector-matrix product over one sub-tensor.
//
// Each cycle with in_valid, up to NPE matrix elements of the sub-tensor's
// columns arrive on the lanes, each with its column offset (0 .. T-1) inside
// the sub-tensor and the input-vector element x[row] it meets. Every lane's
// PE forms a (x) x, and the products of each column are reduced with the
// semiring's (+) into that column's output element y[col]. A sub-tensor with
// more than NPE non-zeros takes several cycles; "clear" starts a new
// sub-tensor by setting all T outputs to the identity of (+). y is
// registered: it is complete one cycle after the last lanes are presented.
//
// The document reduces the variable number of non-zeros per column with a
// forwarding adder tree; here each column's (+) reduction over the lanes is
// written as a masked reduction, which has the same result for these
// associative and commutative operators.
module sida_os_core
  import sida_pkg::*;
#(
  parameter int unsigned NPE = 1024,
  parameter int unsigned T   = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  semiring_e         sr,
  input  logic              clear,
  input  logic              in_valid,
  input  logic              lane_valid [NPE],
  input  logic [$clog2(T)-1:0] lane_col [NPE],
  input  val_t              lane_a     [NPE],
  input  val_t              lane_x     [NPE],
  output val_t              y          [T]
);
  val_t prod [NPE];
  val_t red  [T];

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    sida_pe u_pe (
      .mul_op (otimes_of(sr)),
      .add_op (ALU_SEL_A),
      .a      (lane_a[p]),
      .b      (lane_x[p]),
      .c      ('0),
      .y      (prod[p])
    );
  end

  always_comb begin
    for (int unsigned t = 0; t < T; t++) begin
      red[t] = y[t];
      for (int unsigned p = 0; p < NPE; p++)
        if (lane_valid[p] && 32'(lane_col[p]) == t) red[t] = alu(oplus_of(sr), red[t], prod[p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned t = 0; t < T; t++) y[t] <= '0;
    end else if (clear) begin
      for (int unsigned t = 0; t < T; t++) y[t] <= identity_of(sr);
    end else if (in_valid) begin
      y <= red;
    end
  end
endmodule
