// M3XU: multi-mode matrix unit.
//
// An M x N array of extended dot-product units, each K16 multipliers wide,
// computes D = A * B + C on a tile whose register footprint does not change
// with the mode:
//   FP16  : A is M x K16, B is K16 x N FP16 words; 1 step   (8x4x8)
//   FP32  : A is M x K16/2, B is K16/2 x N FP32;     2 steps (8x4x4)
//   FP32C : A is M x K16/4, B is K16/4 x N complex;  4 steps (8x4x2)
// FP32 elements occupy two consecutive 16-bit words (low half first), and a
// complex element occupies two consecutive FP32 elements (real, imaginary).
// The C and D ports carry, for every output, a real and an imaginary FP32
// word; the imaginary word is used in FP32C only and is 0 otherwise.
//
// Timing: a "start" is accepted while "ready" is high. Operands are stored
// in the operand buffers, then one step per cycle goes through the
// data-assignment stage (registered, the extra pipeline stage that keeps the
// baseline clock rate) and the dot-product units. "done" pulses with the
// complete result three cycles after the last step is issued; a new
// operation may start on the cycle the last step of the previous one
// issues, so the unit sustains one FP16 MMA per cycle, one FP32 MMA every 2
// cycles and one FP32C MMA every 4 cycles. In FP32C the real part is
// accumulated in steps 0-1 from the real part of C and the imaginary part
// in steps 2-3 from its imaginary part.
//
// The array size, the step counts and the operand layout follow the
// document; the handshake and the word order are choices of this design.
module m3xu
  import m3xu_pkg::*;
#(
  parameter int unsigned M   = 8,
  parameter int unsigned N   = 4,
  parameter int unsigned K16 = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         ready,
  input  m3xu_mode_e   mode,
  input  logic [15:0]  a [M][K16],
  input  logic [15:0]  b [K16][N],
  input  logic [31:0]  c [M][N][2],
  output logic [31:0]  d [M][N][2],
  output logic         done
);

  // Operand buffers and step sequencer.
  logic [15:0] a_q [M][K16];
  logic [15:0] b_q [K16][N];
  logic [31:0] c_q [M][N][2];
  m3xu_mode_e  mode_q;
  logic        busy_q;
  logic [1:0]  step_q;
  logic        last_issue;

  assign last_issue = busy_q && (32'(step_q) == steps_of(mode_q) - 1);
  assign ready      = !busy_q || last_issue;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      step_q <= '0;
      mode_q <= MODE_FP16;
    end else if (start && ready) begin
      busy_q <= 1'b1;
      step_q <= '0;
      mode_q <= mode;
    end else if (last_issue) begin
      busy_q <= 1'b0;
    end else if (busy_q) begin
      step_q <= step_q + 2'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (start && ready) begin
      a_q <= a;
      b_q <= b;
      c_q <= c;
    end
  end

  // Step flags for the issued step.
  logic iss_first, iss_last, iss_part;
  always_comb begin
    iss_part  = (mode_q == MODE_FP32C) && step_q[1];
    iss_first = (step_q == 2'd0) || (mode_q == MODE_FP32C && step_q == 2'd2);
    iss_last  = last_issue || (mode_q == MODE_FP32C && step_q == 2'd1);
  end

  // Data-assignment stage and its pipeline register.
  m3xu_ent_t   s1_a  [M][N][K16];
  m3xu_ent_t   s1_b  [M][N][K16];
  m3xu_shift_e s1_sh [M][N][K16];
  logic [31:0] s1_c  [M][N];
  logic        s1_valid, s1_first, s1_last, s1_part, s1_final, s1_cplx;
  logic        s2_part, s2_final, s2_cplx;

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic [15:0] b_col [K16];
      m3xu_ent_t   a_e   [K16];
      m3xu_ent_t   b_e   [K16];
      m3xu_shift_e sh    [K16];
      logic [31:0] dpu_d;
      logic        dpu_v;

      for (genvar k = 0; k < K16; k++) begin : g_b
        assign b_col[k] = b_q[k][j];
      end

      m3xu_data_assign #(.K16(K16)) u_assign (
        .mode  (mode_q),
        .step  (step_q),
        .a_row (a_q[i]),
        .b_col (b_col),
        .a_ent (a_e),
        .b_ent (b_e),
        .shift (sh)
      );

      always_ff @(posedge clk) begin
        if (busy_q) begin
          s1_a[i][j]  <= a_e;
          s1_b[i][j]  <= b_e;
          s1_sh[i][j] <= sh;
          s1_c[i][j]  <= c_q[i][j][iss_part];
        end
      end

      m3xu_dpu #(.K16(K16)) u_dpu (
        .clk        (clk),
        .rst_n      (rst_n),
        .step_valid (s1_valid),
        .first      (s1_first),
        .last       (s1_last),
        .a_ent      (s1_a[i][j]),
        .b_ent      (s1_b[i][j]),
        .shift      (s1_sh[i][j]),
        .c          (s1_c[i][j]),
        .d          (dpu_d),
        .d_valid    (dpu_v)
      );

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          d[i][j][0] <= '0;
          d[i][j][1] <= '0;
        end else if (dpu_v) begin
          d[i][j][s2_part] <= dpu_d;
          if (!s2_cplx) d[i][j][1] <= '0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      s1_part  <= 1'b0;
      s1_final <= 1'b0;
      s1_cplx  <= 1'b0;
      s2_part  <= 1'b0;
      s2_final <= 1'b0;
      s2_cplx  <= 1'b0;
      done     <= 1'b0;
    end else begin
      s1_valid <= busy_q;
      s1_first <= iss_first;
      s1_last  <= iss_last;
      s1_part  <= iss_part;
      s1_final <= last_issue;
      s1_cplx  <= (mode_q == MODE_FP32C);
      s2_part  <= s1_part;
      s2_final <= s1_valid && s1_final;
      s2_cplx  <= s1_cplx;
      done     <= s2_final;
    end
  end

endmodule
