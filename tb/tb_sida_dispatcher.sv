// Self-checking testbench of the SIDA sub-tensor dispatcher and traffic
// estimator: for random sub-tensor counts it walks the index I from -2 to
// nsub-1, checks which of the e-wise (I), OS (I+1) and prefetch (I+2) slots
// are valid at each step, the estimates X = max(2*nnz(I+2), ceil(nnz(I+1)/NPE)+1)
// and R = (compute - load)/2, and that done comes after nsub+2 steps.
//
// Interface and timing: no ports; it drives its own clock (10 time units per
// cycle), prints "TB_RESULT checks=N failures=M" and stops, and a watchdog
// ends a run that hangs as a failure. What it expects follows the published
// behaviour of the block; the stimulus, the reduced sizes and the reference
// model are this testbench's own choices.
module tb_sida_dispatcher;
  localparam int unsigned NPE = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start, step_done, running, e_valid, o_valid, p_valid, done;
  logic [31:0] nsub, nnz_prefetch, nnz_os, est_x, est_r;
  logic signed [31:0] idx;
  int checks = 0, failures = 0;

  sida_dispatcher #(.NPE(NPE)) dut (.*);

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("fail: %s (idx %0d)", what, idx);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; step_done = 0; nsub = 0; nnz_prefetch = 0; nnz_os = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int job = 0; job < 200; job++) begin
      int ns, steps;
      ns = 1 + $urandom % 9;
      @(negedge clk);
      nsub = 32'(ns); start = 1;
      @(negedge clk);
      start = 0;
      steps = 0;
      for (int k = -2; k < ns; k++) begin
        int lc, cc, ex, er;
        chk(running && idx == k, "index");
        chk(e_valid == (k >= 0 && k < ns), "e_valid");
        chk(o_valid == (k + 1 >= 0 && k + 1 < ns), "o_valid");
        chk(p_valid == (k + 2 >= 0 && k + 2 < ns), "p_valid");
        nnz_prefetch = $urandom % 100;
        nnz_os       = $urandom % 3000;
        #1;
        lc = p_valid ? 2 * int'(nnz_prefetch) : 0;
        cc = (o_valid ? (int'(nnz_os) + NPE - 1) / NPE : 0) + (e_valid ? 1 : 0);
        ex = (lc > cc) ? lc : cc;
        er = (cc > lc) ? (cc - lc) / 2 : 0;
        chk(est_x == 32'(ex), "est_x");
        chk(est_r == 32'(er), "est_r");
        // a step lasts a random number of cycles
        repeat ($urandom % 3) begin
          @(negedge clk);
          chk(idx == k && !done, "hold");
        end
        step_done = 1;
        @(negedge clk);
        step_done = 0;
        steps++;
      end
      chk(done && !running, "done after nsub+2 steps");
      chk(steps == ns + 2, "step count");
      @(negedge clk);
      chk(!done, "done is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
