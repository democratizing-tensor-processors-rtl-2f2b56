// Behavioural model of the main memory (HBM) seen by SIDA: a word array with
// a pipelined read port. A request is granted when gnt is high (random
// back-pressure when STALLS is set) and its data return LAT cycles later, in
// order. Testbench use only; contents are written directly through "mem".
//
// Interface and timing: req/addr/gnt request port, rvalid/rdata LAT cycles
// later in request order. The memory itself is outside the design; its
// latency and back-pressure pattern are choices of this model.
module hbm_model #(
  parameter int unsigned WORDS  = 65536,
  parameter int unsigned LAT    = 3,
  parameter bit          STALLS = 1'b1
) (
  input  logic        clk,
  input  logic        req,
  input  logic [31:0] addr,
  output logic        gnt,
  output logic        rvalid,
  output logic [63:0] rdata
);
  logic [63:0] mem [WORDS];
  logic        v_pipe [LAT];
  logic [63:0] d_pipe [LAT];

  initial begin
    for (int i = 0; i < LAT; i++) begin
      v_pipe[i] = 1'b0;
      d_pipe[i] = '0;
    end
    gnt = 1'b1;
  end

  always @(posedge clk) begin
    v_pipe[0] <= req && gnt;
    d_pipe[0] <= (addr < WORDS) ? mem[addr] : 64'd0;
    for (int i = 1; i < LAT; i++) begin
      v_pipe[i] <= v_pipe[i-1];
      d_pipe[i] <= d_pipe[i-1];
    end
    gnt <= STALLS ? ($urandom % 4 != 0) : 1'b1;
  end

  assign rvalid = v_pipe[LAT-1];
  assign rdata  = d_pipe[LAT-1];
endmodule
