// lstm_dual_core_top: dual-core LSTM-RNN inference accelerator.
//
// Two identical LSTM cores share one bus to main memory. A mode scheduler
// decides what each core computes:
//   multi-programming - two independent jobs, one per core;
//   multi-threading   - one job, logical timesteps interleaved between the
//                       cores as threads, advanced in synchronised time slots;
//   helper-core       - one job, core 0 computes the input products W_x*x_t a
//                       slot ahead, core 1 the recurrent products W_h*h_{t-1}
//                       and the element-wise part.
// The system manager connects the host to main memory and to the control
// registers (mode, jobs, start, status, profiler and scheduler counters);
// a profiler counts for each core the cycles spent computing, in memory
// operations, in both and in neither.
//
// Ports: the host request stream (standing for the PCIe link) and the
// main-memory bus (standing for the memory controller's user port; see
// lstm_pkg for the bus rules), busy/done of the accelerator, and debug
// probes: each core's profiler state and which bus masters are waiting.
// Arbitration of the shared bus is round-robin among core 0, core 1 and the
// system manager.
//
// The structure (two cores, shared memory bus, system manager, profiler, the
// three modes) follows the document; sizes of the on-chip buffers are
// parameters whose defaults cover its largest benchmark layer (1024 inputs,
// 1024 cells) at batch 32 and four timesteps per helper slot.
module lstm_dual_core_top
  import lstm_pkg::*;
#(
  parameter int unsigned NMAX = 1024,
  parameter int unsigned MMAX = 1024,
  parameter int unsigned VMAX = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  // host link
  input  logic        host_valid,
  output logic        host_ready,
  input  logic        host_we,
  input  logic [31:0] host_addr,
  input  word_t       host_wdata,
  output logic        host_rvalid,
  output word_t       host_rdata,
  // memory controller port
  output mem_req_t    mem_req,
  input  mem_rsp_t    mem_rsp,
  // status
  output logic        busy,
  output logic        done,
  // debug probes
  output prof_state_e core_state [2],  // profiler state of each core
  output logic [2:0]  bus_wait         // master waits for the bus (core 0, core 1, system manager)
);
  logic      start;
  mode_e     mode;
  job_cfg_t  jobs [2];

  logic      cmd_valid [2], cmd_ready [2], core_done [2];
  core_cmd_t cmd [2];
  logic [31:0] slots, idle_slots [2], sync_wait [2];

  mem_req_t  m_req [3];
  mem_rsp_t  m_rsp [3];

  logic [1:0] bc, bm;
  logic [31:0] pcnt [2][4];
  logic [31:0] ptotal;

  system_manager u_sysmgr (
    .clk, .rst_n,
    .host_valid, .host_ready, .host_we, .host_addr, .host_wdata,
    .host_rvalid, .host_rdata,
    .mreq(m_req[2]), .mrsp(m_rsp[2]),
    .start, .mode, .jobs, .busy, .done,
    .prof_cnt(pcnt), .prof_total(ptotal),
    .slots, .idle_slots, .sync_wait);

  mode_scheduler u_sched (
    .clk, .rst_n, .start, .mode, .jobs, .busy, .done,
    .cmd_valid, .cmd_ready, .cmd, .core_done,
    .slots, .idle_slots, .sync_wait);

  for (genvar ci = 0; ci < 2; ci++) begin : g_core
    lstm_core #(.NMAX(NMAX), .MMAX(MMAX), .VMAX(VMAX)) u_core (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[ci]), .cmd_ready(cmd_ready[ci]), .cmd(cmd[ci]),
      .done(core_done[ci]),
      .mreq(m_req[ci]), .mrsp(m_rsp[ci]),
      .busy_compute(bc[ci]), .busy_mem(bm[ci]));
  end

  mem_bus_arbiter #(.NM(3)) u_arb (
    .clk, .rst_n, .m_req, .m_rsp, .s_req(mem_req), .s_rsp(mem_rsp),
    .wait_cycle(bus_wait));

  perf_profiler #(.NC(2)) u_prof (
    .clk, .rst_n, .clear(start), .enable(busy),
    .busy_compute(bc), .busy_mem(bm), .state(core_state), .cnt(pcnt),
    .total(ptotal));
endmodule
