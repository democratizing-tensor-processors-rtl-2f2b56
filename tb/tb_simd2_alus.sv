// Self-checking testbench of the SIMD2 (x) and (+) ALUs: every operation on
// random operands (including subnormal halves, zeros and cancellation)
// against a real-number reference rounded to single precision.
//
// Interface and timing: no ports; it drives its own clock (10 time units per
// cycle), prints "TB_RESULT checks=N failures=M" and stops, and a watchdog
// ends a run that hangs as a failure. What it expects follows the published
// behaviour of the block; the stimulus, the reduced sizes and the reference
// model are this testbench's own choices.
module tb_simd2_alus;
  import simd2_pkg::*;
  import tb_fp_pkg::*;
  import tb_simd2_ref_pkg::*;

  otimes_e     ot;
  oplus_e      pl;
  logic [15:0] a, b;
  logic [31:0] x, p, y_ot, y_pl;
  int checks = 0, failures = 0;

  simd2_otimes_alu u_ot (.op(ot), .a(a), .b(b), .y(y_ot));
  simd2_oplus_alu  u_pl (.op(pl), .x(x), .p(p), .y(y_pl));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      a = rand_fp16(0, 30);
      b = (t % 7 == 0) ? a ^ 16'h0001 : rand_fp16(0, 30);
      if (t % 11 == 0) b = 16'h0000;
      x = rand_fp32(100, 150);
      p = (t % 5 == 0) ? {~x[31], x[30:2], 2'($urandom)} : rand_fp32(100, 150);
      if (t % 13 == 0) p = 32'd0;
      for (int o = 0; o < 6; o++) begin
        ot = otimes_e'(o);
        #1;
        checks++;
        if (!fp_same(y_ot, r_otimes(o, a, b))) begin
          failures++;
          if (failures < 10) $display("otimes %0d a=%h b=%h got %h exp %h", o, a, b, y_ot, r_otimes(o, a, b));
        end
      end
      for (int o = 0; o < 5; o++) begin
        pl = oplus_e'(o);
        #1;
        checks++;
        if (!fp_same(y_pl, r_oplus(o, x, p))) begin
          failures++;
          if (failures < 10) $display("oplus %0d x=%h p=%h got %h exp %h", o, x, p, y_pl, r_oplus(o, x, p));
        end
      end
    end
    // infinity as "no edge" in min-plus
    ot = OT_ADD; a = 16'h7C00; b = 16'h3C00; #1;
    checks++;
    if (y_ot != 32'h7F80_0000) begin failures++; $display("inf + 1 gave %h", y_ot); end
    pl = OP_MIN; x = 32'h7F80_0000; p = 32'h4000_0000; #1;
    checks++;
    if (y_pl != 32'h4000_0000) begin failures++; $display("min(inf,2) gave %h", y_pl); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
