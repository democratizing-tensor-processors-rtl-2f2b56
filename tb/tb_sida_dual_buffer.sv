// Self-checking testbench of the SIDA dual-storage buffer. CSC space: random
// elements are pushed into the ring, read back NPE at a time and freed, with
// the count tracked. CSR space: elements of random rows arrive in random
// order; the first of a row reserves its full length, later ones fill it,
// and the rows are read back through row_base/row_fill and compared. A row
// that does not fit is reported as dropped and takes no space.
//
// Interface and timing: no ports; it drives its own clock (10 time units per
// cycle), prints "TB_RESULT checks=N failures=M" and stops, and a watchdog
// ends a run that hangs as a failure. What it expects follows the published
// behaviour of the block; the stimulus, the reduced sizes and the reference
// model are this testbench's own choices.
module tb_sida_dual_buffer;
  import sida_pkg::*;
  localparam int unsigned CSC_DEPTH = 64, CSR_DEPTH = 64, NVEC = 16, NPE = 4;
  localparam int unsigned CW = $clog2(CSC_DEPTH), RW = $clog2(CSR_DEPTH);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear, csc_we, csc_free, conv_we, conv_dropped;
  elem_t csc_wdata, conv_wdata;
  logic [CW:0] csc_free_n, csc_count;
  logic [CW-1:0] csc_head, csc_rptr;
  elem_t csc_rdata [NPE], csr_rdata [NPE];
  logic [31:0] conv_row_len, row_fill;
  logic [$clog2(NVEC)-1:0] row_sel;
  logic [RW-1:0] row_base, csr_rptr;
  logic [RW:0] csr_used;
  int checks = 0, failures = 0;

  sida_dual_buffer #(.CSC_DEPTH(CSC_DEPTH), .CSR_DEPTH(CSR_DEPTH), .NVEC(NVEC), .NPE(NPE)) dut (.*);

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("fail: %s", what);
    end
  endtask

  elem_t q [$];
  int    rl [NVEC];
  elem_t rows [NVEC][$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; csc_we = 0; csc_free = 0; conv_we = 0; csc_wdata = '0; conv_wdata = '0;
    csc_free_n = '0; csc_rptr = '0; conv_row_len = 0; row_sel = '0; csr_rptr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- CSC ring
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      csc_we = (q.size() < CSC_DEPTH - 1) && ($urandom % 2 == 0);
      csc_wdata = '{row: $urandom, col: $urandom, val: val_t'({$urandom, $urandom})};
      csc_free = (q.size() >= NPE) && ($urandom % 3 == 0);
      csc_free_n = (CW+1)'(1 + $urandom % NPE);
      csc_rptr = csc_head;
      #1;
      for (int p = 0; p < NPE && p < q.size(); p++) chk(csc_rdata[p] == q[p], "csc read");
      chk(32'(csc_count) == q.size(), "csc count");
      @(posedge clk);
      if (csc_free) repeat (csc_free_n) void'(q.pop_front());
      if (csc_we) q.push_back(csc_wdata);
    end
    @(negedge clk);
    csc_we = 0; csc_free = 0;
    // ---- CSR space
    for (int round = 0; round < 40; round++) begin
      int total, left;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      total = 0;
      for (int r = 0; r < NVEC; r++) begin
        rl[r] = $urandom % 7;
        total += rl[r];
        rows[r].delete();
      end
      left = total;
      while (left > 0) begin
        int r;
        r = $urandom % NVEC;
        if (rows[r].size() < rl[r]) begin
          conv_we = 1;
          conv_wdata = '{row: 32'(r), col: $urandom, val: val_t'($urandom)};
          conv_row_len = 32'(rl[r]);
          #1;
          if (conv_dropped) rl[r] = 0;
          else rows[r].push_back(conv_wdata);
          if (conv_dropped) left -= 1 + 0;
          else left--;
          @(negedge clk);
          conv_we = 0;
          // a dropped row's remaining elements are not sent again
          if (rl[r] == 0) begin
            chk(1'b1, "dropped row");
          end
        end
      end
      conv_we = 0;
      // read back every row
      for (int r = 0; r < NVEC; r++) begin
        row_sel = $clog2(NVEC)'(r);
        #1;
        chk(row_fill == 32'(rows[r].size()), "row fill");
        for (int k = 0; k < rows[r].size(); k++) begin
          csr_rptr = row_base + RW'(k);
          #1;
          chk(csr_rdata[0] == rows[r][k], "csr element");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
