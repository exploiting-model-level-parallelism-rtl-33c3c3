// tb_lstm_dual_core_full: end-to-end test of the dual-core accelerator with
// every parameter at its default (buffers for 1024 inputs, 1024 cells and
// 128 vectors per pass), running the same small jobs as the reduced test,
// with a main-memory model that stalls every fifth request. The host-side
// work and all checks are in tb_top_driver.
module tb_lstm_dual_core_full;
  import lstm_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, host_valid, host_ready, host_we, host_rvalid, busy, done;
  logic [31:0] host_addr;
  word_t host_wdata, host_rdata;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  prof_state_e core_state [2];
  logic [2:0] bus_wait;

  lstm_dual_core_top dut (.*);
  mem_model #(.DEPTH(1 << 17), .LAT(4), .STALL_EVERY(5)) u_mem (
    .clk, .rst_n, .req(mem_req), .rsp(mem_rsp));
  tb_top_driver u_drv (
    .clk, .rst_n, .host_valid, .host_ready, .host_we, .host_addr, .host_wdata,
    .host_rvalid, .host_rdata, .busy, .done,
    .contention(|bus_wait[1:0]),
    .mem_stall(mem_req.req && !mem_rsp.gnt));

  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", u_drv.checks, u_drv.failures + 1);
    $finish;
  end
endmodule
