// Self-checking testbench of the M3XU data-assignment stage. For random
// operands it sums, over the steps of the mode, the weighted products of the
// entries presented to each multiplier group and compares the sum with the
// real product of the original FP16, FP32 or complex FP32 numbers: every
// partial product must appear exactly once with the right shift and sign.
//
// Interface and timing: no ports; it drives its own clock (10 time units per
// cycle), prints "TB_RESULT checks=N failures=M" and stops, and a watchdog
// ends a run that hangs as a failure. What it expects follows the published
// behaviour of the block; the stimulus, the reduced sizes and the reference
// model are this testbench's own choices.
module tb_m3xu_data_assign;
  import m3xu_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned K16 = 8;

  m3xu_mode_e  mode;
  logic [1:0]  step;
  logic [15:0] a_row [K16];
  logic [15:0] b_col [K16];
  m3xu_ent_t   a_ent [K16];
  m3xu_ent_t   b_ent [K16];
  m3xu_shift_e shift [K16];

  int checks = 0, failures = 0;

  m3xu_data_assign #(.K16(K16)) dut (.*);

  function automatic real ent_prod(m3xu_ent_t x, m3xu_ent_t y, m3xu_shift_e s);
    real v;
    v = real'(x.man) * real'(y.man)
      * pow2(int'(x.exp) + int'(y.exp) + int'(shift_bits(s)) - 300);
    return (x.sign ^ y.sign) ? -v : v;
  endfunction

  function automatic real e32(logic [15:0] w [K16], int k);
    return fp32_to_real({w[2*k+1], w[2*k]});
  endfunction

  task automatic check(real got, real want, string what);
    checks++;
    if (fabs(got - want) > fabs(want) * 1.0e-12) begin
      failures++;
      $display("%s: got %g want %g", what, got, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      real acc [K16];
      for (int k = 0; k < K16; k++) begin
        a_row[k] = 16'($urandom);
        b_col[k] = 16'($urandom);
        acc[k]   = 0.0;
      end
      // FP16: one step, product per multiplier
      mode = MODE_FP16;
      step = 2'd0;
      for (int k = 0; k < K16; k++) begin
        a_row[k] = rand_fp16(1, 30);
        b_col[k] = rand_fp16(1, 30);
      end
      if (t % 10 == 0) a_row[0] = {1'b0, 5'd0, 10'($urandom)};  // subnormal
      #1;
      for (int k = 0; k < K16; k++)
        check(ent_prod(a_ent[k], b_ent[k], shift[k]),
              fp16_to_real(a_row[k]) * fp16_to_real(b_col[k]), "fp16");
      // FP32: two steps, multipliers 2k and 2k+1 build element k
      mode = MODE_FP32;
      for (int k = 0; k < K16 / 2; k++) begin
        {a_row[2*k+1], a_row[2*k]} = rand_fp32(90, 160);
        {b_col[2*k+1], b_col[2*k]} = rand_fp32(90, 160);
      end
      for (int s = 0; s < 2; s++) begin
        step = 2'(s);
        #1;
        for (int k = 0; k < K16; k++) acc[k/2] += ent_prod(a_ent[k], b_ent[k], shift[k]);
      end
      for (int k = 0; k < K16 / 2; k++) begin
        check(acc[k], e32(a_row, k) * e32(b_col, k), "fp32");
        acc[k] = 0.0;
      end
      // FP32C: steps 0-1 real part, steps 2-3 imaginary part
      mode = MODE_FP32C;
      for (int s = 0; s < 4; s++) begin
        step = 2'(s);
        #1;
        for (int k = 0; k < K16; k++) begin
          if (s < 2) acc[k/4] += ent_prod(a_ent[k], b_ent[k], shift[k]);
          else       acc[K16/4 + k/4] += ent_prod(a_ent[k], b_ent[k], shift[k]);
        end
      end
      for (int cc = 0; cc < K16 / 4; cc++) begin
        real xr, xi, yr, yi;
        xr = e32(a_row, 2*cc);  xi = e32(a_row, 2*cc+1);
        yr = e32(b_col, 2*cc);  yi = e32(b_col, 2*cc+1);
        check(acc[cc], xr * yr - xi * yi, "fp32c re");
        check(acc[K16/4 + cc], xr * yi + xi * yr, "fp32c im");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
