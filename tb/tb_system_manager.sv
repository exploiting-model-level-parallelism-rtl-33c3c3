// tb_system_manager: exercises the host port of the system manager. Main
// memory writes and reads go through to a memory model and read back the
// written data; job registers written by the host appear on the job outputs
// and read back; a start write pulses start once with the mode given and is
// ignored while busy; the done flag is sticky until the next start; and the
// status inputs (profiler and scheduler counters) are readable at their
// register addresses.
module tb_system_manager;
  import lstm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_valid, host_ready, host_we, host_rvalid;
  logic [31:0] host_addr;
  word_t host_wdata, host_rdata;
  mem_req_t mreq;
  mem_rsp_t mrsp;
  logic start, busy, done;
  mode_e mode;
  job_cfg_t jobs [2];
  logic [31:0] prof_cnt [2][4];
  logic [31:0] prof_total, slots;
  logic [31:0] idle_slots [2], sync_wait [2];

  system_manager dut (.*);
  mem_model #(.DEPTH(4096), .LAT(2), .STALL_EVERY(3)) mem (.clk, .rst_n, .req(mreq), .rsp(mrsp));

  int checks = 0, failures = 0, starts = 0;
  always @(posedge clk) if (start) starts++;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic hw(logic [31:0] a, word_t d);
    @(negedge clk);
    host_valid = 1; host_we = 1; host_addr = a; host_wdata = d;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    @(negedge clk);
    host_valid = 0; host_we = 0;
  endtask

  task automatic hr(logic [31:0] a, output word_t d);
    @(negedge clk);
    host_valid = 1; host_we = 0; host_addr = a;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    @(negedge clk);
    host_valid = 0;
    while (!host_rvalid) @(negedge clk);
    d = host_rdata;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t d, vals [32];
    host_valid = 0; host_we = 0; host_addr = 0; host_wdata = 0; busy = 0; done = 0;
    for (int c = 0; c < 2; c++) begin
      for (int s = 0; s < 4; s++) prof_cnt[c][s] = 32'(1000 + c*10 + s);
      idle_slots[c] = 32'(50 + c); sync_wait[c] = 32'(60 + c);
    end
    prof_total = 12345; slots = 77;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // memory
    for (int i = 0; i < 32; i++) begin
      vals[i] = {$urandom, $urandom};
      hw(32'(100 + 3*i), vals[i]);
    end
    for (int i = 0; i < 32; i++) begin
      check($sformatf("memory model word %0d", i), longint'(mem.mem[100 + 3*i]), longint'(vals[i]));
      hr(32'(100 + 3*i), d);
      check($sformatf("memory readback %0d", i), longint'(d), longint'(vals[i]));
    end

    // job registers
    hw(32'h8000_0010, 3);            // job0 nlayers
    hw(32'h8000_0011, 17);           // job0 T
    hw(32'h8000_0012, 32);           // job0 B
    hw(32'h8000_0013, 4);            // job0 reuse
    hw(32'h8000_0050, 1);            // job1 nlayers
    for (int l = 0; l < LMAX; l++)
      for (int f = 0; f < 9; f++)
        hw(32'h8000_0018 + 32'(9*l + f), word_t'(1000*l + 10*f + 1));
    hw(32'h8000_0058 + 9 + 2, 'hABCD);  // job1 layer 1 wx
    check("job0 nlayers", jobs[0].nlayers, 3);
    check("job0 T", jobs[0].t, 17);
    check("job0 B", jobs[0].b, 32);
    check("job0 reuse", jobs[0].reuse, 4);
    check("job1 nlayers", jobs[1].nlayers, 1);
    check("job1 layer1 wx", jobs[1].layer[1].wx_base, 'hABCD);
    check("job0 layer2 n", jobs[0].layer[2].n, 2001);
    check("job0 layer3 p", jobs[0].layer[3].p_base, 3081);
    check("job0 layer0 in", jobs[0].layer[0].in_base, 51);
    hr(32'h8000_0018 + 9 + 6, d);
    check("layer1 h readback", d, 1061);
    hr(32'h8000_0011, d);
    check("T readback", d, 17);

    // start and status
    hw(32'h8000_0000, {61'd0, 2'(MODE_HELPER), 1'b1});
    @(negedge clk);
    check("start pulses", starts, 1);
    check("mode", mode, MODE_HELPER);
    busy = 1;
    hw(32'h8000_0000, {61'd0, 2'(MODE_MT), 1'b1});
    @(negedge clk);
    check("no start while busy", starts, 1);
    hr(32'h8000_0000, d);
    check("status busy", d[0], 1);
    check("status done", d[1], 0);
    @(negedge clk); busy = 0; done = 1; @(negedge clk); done = 0;
    hr(32'h8000_0000, d);
    check("done sticky", d[1], 1);
    check("status mode", d[3:2], MODE_MT);

    for (int c = 0; c < 2; c++)
      for (int s = 0; s < 4; s++) begin
        hr(32'h8000_0100 + 32'(4*c + s), d);
        check($sformatf("profiler %0d %0d", c, s), d, 1000 + c*10 + s);
      end
    hr(32'h8000_0110, d); check("profiler total", d, 12345);
    hr(32'h8000_0120, d); check("slots", d, 77);
    hr(32'h8000_0121, d); check("idle slots 0", d, 50);
    hr(32'h8000_0122, d); check("idle slots 1", d, 51);
    hr(32'h8000_0123, d); check("sync wait 0", d, 60);
    hr(32'h8000_0124, d); check("sync wait 1", d, 61);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
