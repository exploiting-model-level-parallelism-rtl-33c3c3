// mem_model: behavioural model of the main memory behind the memory
// controller (DDR3 plus controller), for simulation only.
//
// Serves the lstm_pkg memory bus: a request is granted in the cycle it is
// presented unless the model stalls (every STALL_EVERY-th cycle when
// STALL_EVERY > 0, to exercise back-pressure); read data returns LAT cycles
// after the grant. Words are 64 bits; DEPTH words, word addresses wrap.
// The array is public so a testbench can load and inspect it directly.
module mem_model
  import lstm_pkg::*;
#(
  parameter int unsigned DEPTH       = 1 << 20,
  parameter int unsigned LAT         = 2,
  parameter int unsigned STALL_EVERY = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req,
  output mem_rsp_t rsp
);
  word_t mem [DEPTH];
  logic [LAT-1:0] vpipe;
  word_t          dpipe [LAT];
  int unsigned    cyc;
  int unsigned    reads, writes;

  logic stall;
  assign stall   = (STALL_EVERY != 0) && (cyc % STALL_EVERY == STALL_EVERY - 1);
  assign rsp.gnt = req.req && !stall;
  assign rsp.rvalid = vpipe[LAT-1];
  assign rsp.rdata  = dpipe[LAT-1];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe  <= '0;
      cyc    <= 0;
      reads  <= 0;
      writes <= 0;
      for (int i = 0; i < LAT; i++) dpipe[i] <= '0;
    end else begin
      cyc <= cyc + 1;
      vpipe[0] <= rsp.gnt && !req.we;
      dpipe[0] <= mem[req.addr % DEPTH];
      for (int i = 1; i < LAT; i++) begin
        vpipe[i] <= vpipe[i-1];
        dpipe[i] <= dpipe[i-1];
      end
      if (rsp.gnt && req.we) mem[req.addr % DEPTH] <= req.wdata;
      if (rsp.gnt) begin
        if (req.we) writes <= writes + 1;
        else        reads  <= reads + 1;
      end
    end
  end
endmodule
