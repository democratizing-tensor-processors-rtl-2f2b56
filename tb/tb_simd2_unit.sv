// Self-checking testbench of the SIMD2 tile unit: all nine opcodes on random
// 4 x 4 tiles, checked element by element against the reference
// d = c (+) a0(x)b0 (+) a1(x)b1 ... in order, with one result per cycle and a
// one-cycle latency for every opcode.
//
// Interface and timing: no ports; it drives its own clock (10 time units per
// cycle), prints "TB_RESULT checks=N failures=M" and stops, and a watchdog
// ends a run that hangs as a failure. What it expects follows the published
// behaviour of the block; the stimulus, the reduced sizes and the reference
// model are this testbench's own choices.
module tb_simd2_unit;
  import simd2_pkg::*;
  import tb_fp_pkg::*;
  import tb_simd2_ref_pkg::*;

  localparam int unsigned TILE = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, out_valid;
  simd2_op_e   opcode;
  logic [15:0] a [TILE][TILE];
  logic [15:0] b [TILE][TILE];
  logic [31:0] c [TILE][TILE];
  logic [31:0] d [TILE][TILE];
  logic [31:0] expd [TILE][TILE];
  int checks = 0, failures = 0;

  simd2_unit #(.TILE(TILE)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0;
    opcode   = OP_MMA;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int t = 0; t < 270; t++) begin
      int opc;
      opc = t % 9;
      for (int i = 0; i < TILE; i++)
        for (int j = 0; j < TILE; j++) begin
          a[i][j] = rand_fp16(8, 22);
          b[i][j] = rand_fp16(8, 22);
          if (opc == 7 && ($urandom % 3 == 0)) a[i][j] = 16'h0000;
          c[i][j] = (opc == 7) ? 32'd0 : rand_fp32(115, 140);
        end
      for (int i = 0; i < TILE; i++)
        for (int j = 0; j < TILE; j++) begin
          logic [31:0] acc;
          acc = c[i][j];
          for (int k = 0; k < TILE; k++)
            acc = r_oplus(pl_of(opc), acc, r_otimes(ot_of(opc), a[i][k], b[k][j]));
          expd[i][j] = acc;
        end
      opcode   = simd2_op_e'(opc);
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      in_valid = 1'b0;
      checks++;
      if (!out_valid) begin
        failures++;
        $display("out_valid not set one cycle after in_valid");
      end
      for (int i = 0; i < TILE; i++)
        for (int j = 0; j < TILE; j++) begin
          checks++;
          if (!fp_same(d[i][j], expd[i][j])) begin
            failures++;
            if (failures < 10) $display("op %0d d[%0d][%0d] got %h exp %h", opc, i, j, d[i][j], expd[i][j]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
