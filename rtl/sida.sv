// SIDA engine: fused sparse vxm -> element-wise -> vxm with the OEI
// (output-stationary, element-wise, input-stationary) dataflow.
//
// For an n x n sparse matrix A (CSC in main memory), input vector x and
// element-wise operand w it computes
//   y[s]   = (+)_r x[r] (x) A[r][s]          OS core, column s
//   z[s]   = (y[s] (x) scalar) (+') w[s]     E-Wise core
//   out[j] = (+)_s z[s] (x) A[s][j]          IS core, row s
// reading every matrix element from memory once: an element loaded for the
// OS product of its column is converted into the CSR space of the on-chip
// buffer and reused by the IS product of its row.
//
// Columns are processed in sub-tensors of T columns. In the step with
// dispatcher index I the engine runs, one after another:
//   EW   : z of sub-tensor I from the OS result of the previous step;
//   IS   : rows of sub-tensor I, each row's elements stored so far in the
//          CSR space, up to NPE per cycle;
//   LOAD : the CSC data of sub-tensor I+2 from memory into the CSC space.
//          An element whose row already has its z is scattered by the IS
//          core at once (eager IS); all others are converted into the CSR
//          space for later;
//   OS   : the CSC data of sub-tensor I+1, NPE non-zeros per cycle, then the
//          sub-tensor's columns are evicted from the CSC space.
// Every element is thus used by the IS core exactly once, either from the
// CSR space or eagerly.
//
// Memory: word addresses of 64-bit words; mem_req/mem_addr are accepted when
// mem_gnt is high and read data return in request order with mem_rvalid.
// Before the steps the engine loads x, w, the row lengths (CSR index array
// differences) and the column pointers of the matrix into on-chip vectors.
// Layout: x at x_base[0..n-1], w at w_base, row lengths at rowlen_base,
// column pointers at colptr_base[0..n], row indices at rowidx_base[0..nnz-1]
// and values at val_base[0..nnz-1].
// Result: read out[j] through out_raddr / out_rdata after done.
//
// Follows the document: the three cores, dual storage, sub-tensor indices
// I, I+1, I+2, eager IS execution and column eviction. Choices of this
// design: the phases of a step run one after another instead of overlapping,
// one memory word per cycle, integer arithmetic, on-chip vectors of NVEC
// elements. Not implemented: eager CSR loading with the estimator's budget,
// CSR repacking and row eviction (a dropped conversion is counted in
// stat_dropped and makes the result incomplete), blocked storage.
module sida
  import sida_pkg::*;
#(
  parameter int unsigned NPE       = 1024,
  parameter int unsigned T         = 64,
  parameter int unsigned NVEC      = 65536,
  parameter int unsigned CSC_DEPTH = 2097152,
  parameter int unsigned CSR_DEPTH = 2097152
) (
  input  logic         clk,
  input  logic         rst_n,
  // job
  input  logic         start,
  input  logic [31:0]  n,
  input  semiring_e    sr,
  input  alu_e         ew_mul_op,
  input  alu_e         ew_add_op,
  input  val_t         ew_scalar,
  input  logic [31:0]  x_base,
  input  logic [31:0]  w_base,
  input  logic [31:0]  rowlen_base,
  input  logic [31:0]  colptr_base,
  input  logic [31:0]  rowidx_base,
  input  logic [31:0]  val_base,
  output logic         busy,
  output logic         done,
  // memory read port
  output logic         mem_req,
  output logic [31:0]  mem_addr,
  input  logic         mem_gnt,
  input  logic         mem_rvalid,
  input  logic [63:0]  mem_rdata,
  // result read port
  input  logic [$clog2(NVEC)-1:0] out_raddr,
  output val_t         out_rdata,
  // statistics
  output logic [31:0]  stat_cycles,
  output logic [31:0]  stat_steps,
  output logic [31:0]  stat_mem_words,
  output logic [31:0]  stat_os_cycles,
  output logic [31:0]  stat_is_cycles,
  output logic [31:0]  stat_eager,
  output logic [31:0]  stat_converted,
  output logic [31:0]  stat_dropped,
  output logic [31:0]  stat_est_x
);
  localparam int unsigned VW = $clog2(NVEC);
  localparam int unsigned TW = $clog2(T);
  localparam int unsigned CW = $clog2(CSC_DEPTH);
  localparam int unsigned RW = $clog2(CSR_DEPTH);

  typedef enum logic [3:0] {
    S_IDLE, S_META, S_STEP, S_EW, S_EW_WR, S_IS, S_LOAD, S_OS, S_OS_WAIT, S_NEXT
  } state_e;

  state_e       state_q;
  logic [1:0]   meta_q;                // 0 x, 1 w, 2 row lengths, 3 column pointers
  logic [31:0]  iss_q, rsp_q;          // stream request / response counters
  logic [31:0]  cnt_q;                 // stream length
  val_t         row_hold_q;            // row index of the element in flight

  // on-chip vectors
  val_t         xvec   [NVEC];
  val_t         wvec   [NVEC];
  val_t         zvec   [NVEC];
  logic [31:0]  rowlen [NVEC];
  logic [31:0]  colptr [NVEC+1];

  // dispatcher
  logic signed [31:0] idx;
  logic         d_run, e_valid, o_valid, p_valid, d_done, step_done;
  logic [31:0]  nsub, nnz_p, nnz_o, est_x, est_r;

  assign nsub = (n + T - 1) / T;

  function automatic logic [31:0] col_lo(logic signed [31:0] k);
    return 32'(k) * T;
  endfunction
  function automatic logic [31:0] col_hi(logic signed [31:0] k, logic [31:0] nn);
    logic [31:0] h;
    h = (32'(k) + 1) * T;
    return (h > nn) ? nn : h;
  endfunction

  assign nnz_p = p_valid ? colptr[col_hi(idx + 2, n)] - colptr[col_lo(idx + 2)] : 32'd0;
  assign nnz_o = o_valid ? colptr[col_hi(idx + 1, n)] - colptr[col_lo(idx + 1)] : 32'd0;

  sida_dispatcher #(.NPE(NPE)) u_disp (
    .clk, .rst_n,
    .start        (state_q == S_META && meta_q == 2'd3 && rsp_q == cnt_q),
    .nsub, .step_done,
    .nnz_prefetch (nnz_p),
    .nnz_os       (nnz_o),
    .idx, .running(d_run), .e_valid, .o_valid, .p_valid,
    .est_x, .est_r, .done (d_done)
  );

  // buffer
  logic         csc_we, csc_free, conv_we, conv_dropped;
  elem_t        ld_elem;
  logic [CW-1:0] csc_head;
  logic [CW:0]  csc_count;
  logic [CW-1:0] csc_rptr;
  elem_t        csc_rdata [NPE];
  logic [VW-1:0] row_sel;
  logic [RW-1:0] row_base;
  logic [31:0]  row_fill;
  logic [RW-1:0] csr_rptr;
  elem_t        csr_rdata [NPE];
  logic [RW:0]  csr_used;

  sida_dual_buffer #(.CSC_DEPTH(CSC_DEPTH), .CSR_DEPTH(CSR_DEPTH), .NVEC(NVEC), .NPE(NPE)) u_buf (
    .clk, .rst_n,
    .clear        (state_q == S_IDLE && start),
    .csc_we, .csc_wdata (ld_elem),
    .csc_free, .csc_free_n ((CW+1)'(nnz_o)),
    .csc_head, .csc_count, .csc_rptr, .csc_rdata,
    .conv_we, .conv_wdata (ld_elem),
    .conv_row_len (rowlen[ld_elem.row[VW-1:0]]),
    .conv_dropped,
    .row_sel, .row_base, .row_fill, .csr_rptr, .csr_rdata, .csr_used
  );

  // OS core
  logic         os_clear, os_valid;
  logic         os_lv  [NPE];
  logic [TW-1:0] os_col [NPE];
  val_t         os_a   [NPE];
  val_t         os_x   [NPE];
  val_t         os_y   [T];
  logic [31:0]  os_done_q;             // non-zeros of the sub-tensor consumed

  assign csc_rptr = csc_head + CW'(os_done_q);
  always_comb begin
    for (int unsigned p = 0; p < NPE; p++) begin
      os_lv[p]  = (state_q == S_OS) && (os_done_q + p < nnz_o);
      os_col[p] = TW'(csc_rdata[p].col - col_lo(idx + 1));
      os_a[p]   = csc_rdata[p].val;
      os_x[p]   = xvec[csc_rdata[p].row[VW-1:0]];
    end
  end
  assign os_valid = (state_q == S_OS);

  sida_os_core #(.NPE(NPE), .T(T)) u_os (
    .clk, .rst_n, .sr, .clear (os_clear), .in_valid (os_valid),
    .lane_valid (os_lv), .lane_col (os_col), .lane_a (os_a), .lane_x (os_x), .y (os_y)
  );

  // E-Wise core
  val_t         ew_w [T];
  val_t         ew_z [T];
  logic         ew_ov;
  always_comb begin
    for (int unsigned t = 0; t < T; t++) ew_w[t] = wvec[VW'(col_lo(idx) + t)];
  end
  sida_ewise_core #(.T(T)) u_ew (
    .clk, .rst_n, .mul_op (ew_mul_op), .add_op (ew_add_op), .scalar (ew_scalar),
    .in_valid (state_q == S_EW), .y (os_y), .w (ew_w), .out_valid (ew_ov), .z (ew_z)
  );

  // IS core, fed by the IS phase (CSR rows) or by eager loads
  logic [31:0]  is_row_q, is_off_q;
  logic         is_valid, eager;
  val_t         is_z;
  logic         is_lv  [NPE];
  logic [VW-1:0] is_col [NPE];
  val_t         is_a   [NPE];

  assign row_sel  = VW'(is_row_q);
  assign csr_rptr = row_base + RW'(is_off_q);

  logic is_row_ok;
  assign is_row_ok = (state_q == S_IS) && (is_row_q < col_hi(idx, n));

  always_comb begin
    for (int unsigned p = 0; p < NPE; p++) begin
      is_lv[p]  = is_row_ok && (is_off_q + p < row_fill);
      is_col[p] = csr_rdata[p].col[VW-1:0];
      is_a[p]   = csr_rdata[p].val;
    end
    is_z     = zvec[VW'(is_row_q)];
    is_valid = is_row_ok && (row_fill != 0);
    if (eager) begin
      for (int unsigned p = 0; p < NPE; p++) is_lv[p] = 1'b0;
      is_lv[0]  = 1'b1;
      is_col[0] = ld_elem.col[VW-1:0];
      is_a[0]   = ld_elem.val;
      is_z      = zvec[ld_elem.row[VW-1:0]];
      is_valid  = 1'b1;
    end
  end

  sida_is_core #(.NPE(NPE), .NVEC(NVEC)) u_is (
    .clk, .sr, .clear (state_q == S_IDLE && start), .in_valid (is_valid), .z (is_z),
    .lane_valid (is_lv), .lane_col (is_col), .lane_a (is_a),
    .out_raddr, .out_rdata
  );

  // memory streams
  logic         ld_word;     // a response word of the LOAD stream arrives
  logic [31:0]  e0;          // first element of the loaded sub-tensor
  logic [31:0]  ld_col;

  assign e0 = colptr[col_lo(idx + 2)];

  always_comb begin
    mem_req  = 1'b0;
    mem_addr = '0;
    if (state_q == S_META && iss_q < cnt_q) begin
      mem_req = 1'b1;
      case (meta_q)
        2'd0:    mem_addr = x_base + iss_q;
        2'd1:    mem_addr = w_base + iss_q;
        2'd2:    mem_addr = rowlen_base + iss_q;
        default: mem_addr = colptr_base + iss_q;
      endcase
    end else if (state_q == S_LOAD && iss_q < cnt_q) begin
      mem_req  = 1'b1;
      mem_addr = (iss_q[0] ? val_base : rowidx_base) + e0 + (iss_q >> 1);
    end
  end

  // column of the element completing now: columns of the sub-tensor whose
  // pointer range ends at or before it are skipped
  always_comb begin
    logic [31:0] e;
    e      = e0 + (rsp_q >> 1);
    ld_col = col_lo(idx + 2);
    for (int unsigned t = 0; t < T; t++)
      if (col_lo(idx + 2) + t < n && colptr[col_lo(idx + 2) + t + 1] <= e) ld_col = ld_col + 1;
  end

  assign ld_word = (state_q == S_LOAD) && mem_rvalid;
  always_comb begin
    ld_elem.row = row_hold_q[31:0];
    ld_elem.col = ld_col;
    ld_elem.val = mem_rdata;
    csc_we  = ld_word && rsp_q[0];
    // z is known for every row of the sub-tensors up to I
    eager   = csc_we && e_valid && (ld_elem.row < col_hi(idx, n));
    conv_we = csc_we && !eager;
  end

  assign os_clear  = (state_q == S_LOAD) && (rsp_q == cnt_q) && o_valid;
  assign csc_free  = (state_q == S_OS_WAIT);
  assign step_done = (state_q == S_NEXT);
  assign busy      = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      meta_q     <= '0;
      iss_q      <= '0;
      rsp_q      <= '0;
      cnt_q      <= '0;
      row_hold_q <= '0;
      os_done_q  <= '0;
      is_row_q   <= '0;
      is_off_q   <= '0;
      done       <= 1'b0;
      stat_cycles <= '0; stat_steps <= '0; stat_mem_words <= '0;
      stat_os_cycles <= '0; stat_is_cycles <= '0; stat_eager <= '0;
      stat_converted <= '0; stat_dropped <= '0; stat_est_x <= '0;
    end else begin
      done <= 1'b0;
      if (busy) stat_cycles <= stat_cycles + 1;
      if (mem_req && mem_gnt) iss_q <= iss_q + 1;
      if (mem_rvalid) begin
        rsp_q          <= rsp_q + 1;
        stat_mem_words <= stat_mem_words + 1;
      end
      if (ld_word && !rsp_q[0]) row_hold_q <= mem_rdata;
      if (eager)        stat_eager     <= stat_eager + 1;
      if (conv_we)      stat_converted <= stat_converted + 1;
      if (conv_dropped) stat_dropped   <= stat_dropped + 1;
      if (state_q == S_OS)  stat_os_cycles <= stat_os_cycles + 1;
      if (is_valid && !eager) stat_is_cycles <= stat_is_cycles + 1;

      case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_META;
          meta_q  <= 2'd0;
          iss_q   <= '0;
          rsp_q   <= '0;
          cnt_q   <= n;
          stat_cycles <= '0; stat_steps <= '0; stat_mem_words <= '0;
          stat_os_cycles <= '0; stat_is_cycles <= '0; stat_eager <= '0;
          stat_converted <= '0; stat_dropped <= '0; stat_est_x <= '0;
        end
        S_META: if (rsp_q == cnt_q) begin
          iss_q <= '0;
          rsp_q <= '0;
          if (meta_q == 2'd3) begin
            state_q <= S_STEP;
          end else begin
            meta_q <= meta_q + 2'd1;
            cnt_q  <= (meta_q == 2'd2) ? n + 1 : n;
          end
        end
        S_STEP: begin
          if (d_done) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else if (d_run) begin
            stat_est_x <= stat_est_x + est_x;
            state_q  <= e_valid ? S_EW : S_LOAD;
            is_row_q <= col_lo(idx);
            is_off_q <= '0;
            iss_q    <= '0;
            rsp_q    <= '0;
            cnt_q    <= 2 * nnz_p;
          end
        end
        S_EW:    state_q <= S_EW_WR;
        S_EW_WR: state_q <= S_IS;
        S_IS: begin
          if (is_row_q >= col_hi(idx, n)) begin
            state_q <= S_LOAD;
          end else if (is_off_q + NPE < row_fill) begin
            is_off_q <= is_off_q + NPE;
          end else begin
            is_off_q <= '0;
            is_row_q <= is_row_q + 1;
          end
        end
        S_LOAD: if (rsp_q == cnt_q) begin
          os_done_q <= '0;
          state_q   <= o_valid ? S_OS : S_NEXT;
        end
        S_OS: begin
          os_done_q <= os_done_q + NPE;
          if (os_done_q + NPE >= nnz_o) state_q <= S_OS_WAIT;
        end
        S_OS_WAIT: state_q <= S_NEXT;
        S_NEXT: begin
          stat_steps <= stat_steps + 1;
          state_q    <= S_STEP;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // on-chip vector writes
  always_ff @(posedge clk) begin
    if (state_q == S_META && mem_rvalid) begin
      case (meta_q)
        2'd0:    xvec[VW'(rsp_q)]   <= mem_rdata;
        2'd1:    wvec[VW'(rsp_q)]   <= mem_rdata;
        2'd2:    rowlen[VW'(rsp_q)] <= mem_rdata[31:0];
        default: colptr[rsp_q[VW:0]] <= mem_rdata[31:0];
      endcase
    end
    if (state_q == S_EW_WR && ew_ov) begin
      for (int unsigned t = 0; t < T; t++)
        if (col_lo(idx) + t < n) zvec[VW'(col_lo(idx) + t)] <= ew_z[t];
    end
  end

endmodule
