// mem_bus_arbiter: shares the one main-memory port among several masters
// (the two cores and the system manager).
//
// The cores of the dual-core system sit on one bus to the memory controller,
// so when both need off-chip bandwidth one of them waits; that contention is
// what limits multi-programming mode on memory-bound models. The document
// gives the shared bus but not its arbitration, so this block is this
// design's own: round-robin among requesting masters, one request forwarded
// per cycle, and at most one read outstanding in the whole system, so a
// read's data always belongs to the master that issued it. Writes need no
// answer and do not block.
//
// Timing: a request that wins arbitration is forwarded combinationally in the
// same cycle and its gnt is the memory's gnt of that cycle. The memory's
// rdata is wired to every master unchanged (so these output bits come
// straight from an input); only the owner of the outstanding read sees
// rvalid.
module mem_bus_arbiter
  import lstm_pkg::*;
#(
  parameter int unsigned NM = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t m_req [NM],
  output mem_rsp_t m_rsp [NM],
  output mem_req_t s_req,
  input  mem_rsp_t s_rsp,
  output logic [NM-1:0] wait_cycle  // master i requests but is not granted
);
  localparam int unsigned IW = (NM > 1) ? $clog2(NM) : 1;

  logic [IW-1:0] last;      // last master granted
  logic [IW-1:0] sel;       // master chosen this cycle
  logic          sel_vld;
  logic          rd_busy;   // a read is outstanding
  logic [IW-1:0] rd_owner;

  always_comb begin
    sel     = '0;
    sel_vld = 1'b0;
    for (int unsigned k = 1; k <= NM; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % NM;
      if (!sel_vld && m_req[idx].req && !(rd_busy && !m_req[idx].we)) begin
        sel     = IW'(idx);
        sel_vld = 1'b1;
      end
    end
  end

  always_comb begin
    s_req = '0;
    if (sel_vld) s_req = m_req[sel];
    for (int unsigned i = 0; i < NM; i++) begin
      m_rsp[i].gnt    = sel_vld && (sel == IW'(i)) && s_rsp.gnt;
      m_rsp[i].rvalid = rd_busy && (rd_owner == IW'(i)) && s_rsp.rvalid;
      m_rsp[i].rdata  = s_rsp.rdata;
      wait_cycle[i]   = m_req[i].req && !m_rsp[i].gnt;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last     <= IW'(NM - 1);
      rd_busy  <= 1'b0;
      rd_owner <= '0;
    end else begin
      if (sel_vld && s_rsp.gnt) begin
        last <= sel;
        if (!s_req.we) begin
          rd_busy  <= 1'b1;
          rd_owner <= sel;
        end
      end
      if (rd_busy && s_rsp.rvalid) rd_busy <= 1'b0;
    end
  end

  // A read answer only arrives for a read that was granted.
  assert property (@(posedge clk) disable iff (!rst_n) s_rsp.rvalid |-> rd_busy);
  // The arbiter never forwards a read while another is outstanding.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (s_req.req && !s_req.we) |-> !rd_busy);
endmodule
