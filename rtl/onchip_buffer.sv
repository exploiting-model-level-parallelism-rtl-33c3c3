// onchip_buffer: simple dual-port on-chip buffer (one write port, one read
// port, both synchronous), the kind of block RAM the cores keep their input
// vectors and states in.
//
// Interface: write when we is high at a rising clock edge; rdata shows the
// word at raddr one cycle after raddr is presented. A read and a write to the
// same address in the same cycle return the old word (read-first).
// Depth and width are parameters; the contents are not reset.
module onchip_buffer #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
