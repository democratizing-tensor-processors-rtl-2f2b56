// Self-checking testbench of the multi-mode matrix unit: random and exact
// integer-valued FP16, FP32 and FP32C operations checked against real-number
// references, plus the issue rate (1, 2 and 4 cycles per operation) and the
// latency from the last issued step to "done".
//
// Interface and timing: no ports; it drives its own clock (10 time units per
// cycle), prints "TB_RESULT checks=N failures=M" and stops, and a watchdog
// ends a run that hangs as a failure. What it expects follows the published
// behaviour of the block; the stimulus, the reduced sizes and the reference
// model are this testbench's own choices.
module tb_m3xu;
  import m3xu_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned M = 8, N = 4, K16 = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, ready, done;
  m3xu_mode_e  mode;
  logic [15:0] a [M][K16];
  logic [15:0] b [K16][N];
  logic [31:0] c [M][N][2];
  logic [31:0] d [M][N][2];

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  m3xu #(.M(M), .N(N), .K16(K16)) dut (.*);

  // Expected results, filled when an operation is issued.
  real exp_v [64][M][N][2];
  real exp_t [64][M][N][2];  // tolerance
  int  wr_ptr = 0, rd_ptr = 0;
  longint done_cyc [$];

  function automatic real elem32(logic [15:0] w [K16], int k);
    return fp32_to_real({w[2*k+1], w[2*k]});
  endfunction

  task automatic compute_expected(m3xu_mode_e md);
    real v [M][N][2];
    real t [M][N][2];
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < N; j++) begin
        logic [15:0] ar [K16];
        logic [15:0] bc [K16];
        real re, im, mr, mi;
        for (int k = 0; k < K16; k++) begin
          ar[k] = a[i][k];
          bc[k] = b[k][j];
        end
        re = fp32_to_real(c[i][j][0]);
        im = (md == MODE_FP32C) ? fp32_to_real(c[i][j][1]) : 0.0;
        mr = fabs(re);
        mi = fabs(im);
        case (md)
          MODE_FP16:
            for (int k = 0; k < K16; k++) begin
              re += fp16_to_real(ar[k]) * fp16_to_real(bc[k]);
              mr += fabs(fp16_to_real(ar[k]) * fp16_to_real(bc[k]));
            end
          MODE_FP32:
            for (int k = 0; k < K16 / 2; k++) begin
              re += elem32(ar, k) * elem32(bc, k);
              mr += fabs(elem32(ar, k) * elem32(bc, k));
            end
          default:
            for (int k = 0; k < K16 / 4; k++) begin
              real xr, xi, yr, yi;
              xr = elem32(ar, 2*k);  xi = elem32(ar, 2*k+1);
              yr = elem32(bc, 2*k);  yi = elem32(bc, 2*k+1);
              re += xr * yr - xi * yi;
              im += xr * yi + xi * yr;
              mr += fabs(xr * yr) + fabs(xi * yi);
              mi += fabs(xr * yi) + fabs(xi * yr);
            end
        endcase
        v[i][j][0] = re;  v[i][j][1] = im;
        t[i][j][0] = mr * pow2(-22);
        t[i][j][1] = mi * pow2(-22);
      end
    end
    exp_v[wr_ptr % 64] = v;
    exp_t[wr_ptr % 64] = t;
    wr_ptr++;
  endtask

  task automatic fill_random(m3xu_mode_e md, bit ints);
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < N; j++) begin
        c[i][j][0] = ints ? real_to_fp32(real'(int'($urandom % 64) - 32))
                          : rand_fp32(118, 136);
        c[i][j][1] = ints ? real_to_fp32(real'(int'($urandom % 64) - 32))
                          : rand_fp32(118, 136);
      end
    end
    for (int k = 0; k < K16; k++) begin
      for (int i = 0; i < M; i++) a[i][k] = (md == MODE_FP16) ? rand_fp16(10, 20) : 16'($urandom);
      for (int j = 0; j < N; j++) b[k][j] = (md == MODE_FP16) ? rand_fp16(10, 20) : 16'($urandom);
    end
    if (md != MODE_FP16) begin
      for (int k = 0; k < K16 / 2; k++) begin
        for (int i = 0; i < M; i++)
          {a[i][2*k+1], a[i][2*k]} = ints ? real_to_fp32(real'(int'($urandom % 200) - 100))
                                          : rand_fp32(120, 134);
        for (int j = 0; j < N; j++)
          {b[2*k+1][j], b[2*k][j]} = ints ? real_to_fp32(real'(int'($urandom % 200) - 100))
                                          : rand_fp32(120, 134);
      end
    end
  endtask

  // Checker: compares every done against the oldest expectation.
  always @(posedge clk) begin
    if (rst_n && done) begin
      int e;
      e = rd_ptr % 64;
      rd_ptr++;
      done_cyc.push_back(cyc);
      for (int i = 0; i < M; i++)
        for (int j = 0; j < N; j++)
          for (int p = 0; p < 2; p++) begin
            real got;
            got = fp32_to_real(d[i][j][p]);
            checks++;
            if (fabs(got - exp_v[e][i][j][p]) > exp_t[e][i][j][p]) begin
              failures++;
              if (failures < 10)
                $display("MISMATCH d[%0d][%0d][%0d] got %g exp %g", i, j, p, got, exp_v[e][i][j][p]);
            end
          end
    end
  end

  // Issue n back-to-back operations of one mode; returns the issue cycles.
  task automatic run_batch(m3xu_mode_e md, int n, bit ints);
    for (int q = 0; q < n; q++) begin
      fill_random(md, ints);
      mode  = md;
      start = 1'b1;
      compute_expected(md);
      @(posedge clk iff ready);
      #1;
    end
    start = 1'b0;
    repeat (12) @(posedge clk);
    #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0;
    mode  = MODE_FP16;
    for (int i = 0; i < M; i++) for (int k = 0; k < K16; k++) a[i][k] = '0;
    for (int k = 0; k < K16; k++) for (int j = 0; j < N; j++) b[k][j] = '0;
    for (int i = 0; i < M; i++) for (int j = 0; j < N; j++) c[i][j] = '{32'd0, 32'd0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    foreach (done_cyc[i]) done_cyc.delete(i);

    // FP16, FP32, FP32C: integer-valued (exact) then random operands.
    for (int mi = 0; mi < 3; mi++) begin
      m3xu_mode_e md;
      int unsigned s;
      md = m3xu_mode_e'(mi);
      s  = steps_of(md);
      done_cyc.delete();
      run_batch(md, 1, 1'b1);
      run_batch(md, 6, 1'b0);
      // rate: the 6 back-to-back random operations finish s cycles apart
      for (int q = 2; q < 7; q++) begin
        checks++;
        if (done_cyc[q] - done_cyc[q-1] != longint'(s)) begin
          failures++;
          $display("RATE mode %0d: done spacing %0d, expected %0d", mi, done_cyc[q] - done_cyc[q-1], s);
        end
      end
    end

    // latency: issue one FP32 operation and count cycles to done
    begin
      longint t0;
      done_cyc.delete();
      fill_random(MODE_FP32, 1'b0);
      mode = MODE_FP32;
      start = 1'b1;
      compute_expected(MODE_FP32);
      @(posedge clk iff ready);
      t0 = cyc;
      #1 start = 1'b0;
      wait (done_cyc.size() == 1);
      checks++;
      // done rises 4 cycles after the accepting edge (2 steps, the
      // data-assignment register, the dot-product register, the output
      // register) and is sampled by the checker on the edge after that
      if (done_cyc[0] - t0 != 64'd5) begin
        failures++;
        $display("LATENCY %0d, expected 5", done_cyc[0] - t0);
      end
    end
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
