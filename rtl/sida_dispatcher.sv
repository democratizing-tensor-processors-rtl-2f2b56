// SIDA sub-tensor dispatcher and traffic estimator.
//
// The dispatcher is the state machine that walks the sub-tensor index I of
// the OEI (OS -> e-wise -> IS) pipeline. At every step
//   I     goes to the E-Wise core (and the IS rows of sub-tensor I),
//   I + 1 goes to the OS core,
//   I + 2 is the sub-tensor whose CSC data is loaded (prefetched).
// I starts at -2 so that the pipeline fills, and the run ends after the step
// with I = nsub - 1. Each flag *_valid tells whether its index is a real
// sub-tensor (0 .. nsub-1).
//
// The traffic estimator compares, for the coming step, the cycles needed to
// load the CSC data of sub-tensor I+2 (two memory words per non-zero, one
// word per cycle) with the compute cycles of the OS core on sub-tensor I+1
// (NPE non-zeros per cycle) plus one e-wise cycle, and reports the larger
// one as est_x. When compute dominates, est_r is the number of further
// matrix elements that could be fetched with the spare memory cycles (the
// budget for eager CSR loading). Combinational on the nnz inputs.
// Index assignment follows the document; the cost model is a choice of this
// design, and the engine uses est_x and est_r only as reported estimates.
module sida_dispatcher #(
  parameter int unsigned NPE = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        nsub,
  input  logic               step_done,
  input  logic [31:0]        nnz_prefetch,   // non-zeros of sub-tensor I+2
  input  logic [31:0]        nnz_os,         // non-zeros of sub-tensor I+1
  output logic signed [31:0] idx,            // I
  output logic               running,
  output logic               e_valid,
  output logic               o_valid,
  output logic               p_valid,
  output logic [31:0]        est_x,
  output logic [31:0]        est_r,
  output logic               done
);
  function automatic logic in_range(logic signed [31:0] k, logic [31:0] lim);
    return (k >= 0) && (k < $signed(lim));
  endfunction

  assign e_valid = running && in_range(idx, nsub);
  assign o_valid = running && in_range(idx + 1, nsub);
  assign p_valid = running && in_range(idx + 2, nsub);

  always_comb begin
    logic [31:0] load_c, comp_c;
    load_c = p_valid ? 2 * nnz_prefetch : 32'd0;
    comp_c = (o_valid ? (nnz_os + NPE - 1) / NPE : 32'd0) + (e_valid ? 32'd1 : 32'd0);
    est_x  = (load_c > comp_c) ? load_c : comp_c;
    est_r  = (comp_c > load_c) ? (comp_c - load_c) / 2 : 32'd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx     <= -32'sd2;
      running <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        idx     <= -32'sd2;
        running <= (nsub != 0);
        done    <= (nsub == 0);
      end else if (running && step_done) begin
        if (idx + 1 >= $signed(nsub)) begin
          running <= 1'b0;
          done    <= 1'b1;
        end else begin
          idx <= idx + 1;
        end
      end
    end
  end
endmodule
