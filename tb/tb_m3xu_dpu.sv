// Self-checking testbench of the M3XU dot-product unit: random buffer
// entries and shifts, accumulated over 1 to 4 steps starting from a random
// FP32 addend, checked against a real-number reference with a bound of
// 2^-22 of the sum of magnitudes; plus exact small-integer cases and the
// one-cycle result latency.
//
// Interface and timing: no ports; it drives its own clock (10 time units per
// cycle), prints "TB_RESULT checks=N failures=M" and stops, and a watchdog
// ends a run that hangs as a failure. What it expects follows the published
// behaviour of the block; the stimulus, the reduced sizes and the reference
// model are this testbench's own choices.
module tb_m3xu_dpu;
  import m3xu_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned K16 = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        step_valid, first, last, d_valid;
  m3xu_ent_t   a_ent [K16];
  m3xu_ent_t   b_ent [K16];
  m3xu_shift_e shift [K16];
  logic [31:0] c, d;

  int checks = 0, failures = 0;

  m3xu_dpu #(.K16(K16)) dut (.*);

  function automatic real ent_prod(m3xu_ent_t x, m3xu_ent_t y, m3xu_shift_e s);
    real v;
    v = real'(x.man) * real'(y.man)
      * pow2(int'(x.exp) + int'(y.exp) + int'(shift_bits(s)) - 300);
    return (x.sign ^ y.sign) ? -v : v;
  endfunction

  task automatic one_op(int nsteps, bit ints);
    real ref_v, mag;
    c = ints ? real_to_fp32(real'(int'($urandom % 100) - 50)) : rand_fp32(115, 140);
    ref_v = fp32_to_real(c);
    mag   = fabs(ref_v);
    for (int s = 0; s < nsteps; s++) begin
      for (int k = 0; k < K16; k++) begin
        if (ints) begin
          // value (man/2^11) * 2^(exp-127): exp 127..130, integer-ish mantissas
          a_ent[k] = '{sign: 1'($urandom), exp: 8'(127 + $urandom % 3), man: {1'b1, 11'($urandom % 4) << 9}};
          b_ent[k] = '{sign: 1'($urandom), exp: 8'(127 + $urandom % 3), man: {1'b1, 11'($urandom % 4) << 9}};
          shift[k] = SH24;
        end else begin
          a_ent[k] = '{sign: 1'($urandom), exp: 8'(110 + $urandom % 30), man: 12'($urandom)};
          b_ent[k] = '{sign: 1'($urandom), exp: 8'(110 + $urandom % 30), man: 12'($urandom)};
          shift[k] = m3xu_shift_e'($urandom % 3);
        end
        ref_v += ent_prod(a_ent[k], b_ent[k], shift[k]);
        mag   += fabs(ent_prod(a_ent[k], b_ent[k], shift[k]));
      end
      step_valid = 1'b1;
      first = (s == 0);
      last  = (s == nsteps - 1);
      @(posedge clk);
      #1;
    end
    step_valid = 1'b0;
    first = 1'b0;
    last  = 1'b0;
    // d_valid is high in the cycle right after the last step
    checks++;
    if (!d_valid) begin
      failures++;
      $display("d_valid missing after last step");
    end
    checks++;
    if (ints) begin
      if (d != real_to_fp32(ref_v)) begin
        failures++;
        $display("EXACT got %h exp %h", d, real_to_fp32(ref_v));
      end
    end else if (fabs(fp32_to_real(d) - ref_v) > mag * pow2(-22)) begin
      failures++;
      $display("got %g exp %g", fp32_to_real(d), ref_v);
    end
    @(posedge clk);
    #1;
    checks++;
    if (d_valid) begin
      failures++;
      $display("d_valid held too long");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step_valid = 1'b0; first = 1'b0; last = 1'b0; c = '0;
    for (int k = 0; k < K16; k++) begin
      a_ent[k] = '0; b_ent[k] = '0; shift[k] = SH0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int t = 0; t < 50; t++) one_op(1 + t % 4, 1'b1);
    for (int t = 0; t < 400; t++) one_op(1 + t % 4, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
