// tb_mode_scheduler: checks the task order of the three computing modes with
// stand-in cores that take a command, stay busy for a random number of
// cycles and signal done. Every accepted command is logged with its slot,
// core, operation, layer and timestep, and compared with the expected
// schedule:
//  - multi-threading, 3 layers x 3 timesteps: the six-slot schedule in which
//    core 1 waits in slot 1 and core 0 finishes thread 3 alone;
//  - helper-core, 1 layer x 4 timesteps, two timesteps per slot: helper one
//    slot ahead of the main core, three slots;
//  - helper-core, 2 layers x 2 timesteps: the helper must wait for the main
//    core before starting the upper layer;
//  - multi-programming: two jobs on the two cores at the same time.
module tb_mode_scheduler;
  import lstm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  mode_e mode;
  job_cfg_t jobs [2];
  logic cmd_valid [2], cmd_ready [2], core_done [2];
  core_cmd_t cmd [2];
  logic [31:0] slots, idle_slots [2], sync_wait [2];

  mode_scheduler dut (.*);

  int checks = 0, failures = 0;
  string log_q [$];
  int both_busy;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // stand-in cores
  int busy_cnt [2];
  for (genvar c = 0; c < 2; c++) begin : g_core
    always_ff @(posedge clk) begin
      core_done[c] <= 1'b0;
      if (!rst_n) busy_cnt[c] <= 0;
      else if (busy_cnt[c] > 0) begin
        busy_cnt[c] <= busy_cnt[c] - 1;
        if (busy_cnt[c] == 1) core_done[c] <= 1'b1;
      end else if (cmd_valid[c] && cmd_ready[c]) begin
        busy_cnt[c] <= 3 + int'($urandom % 12);
        // layer from the weight base, timestep from the h output address
        log_q.push_back($sformatf("s%0d c%0d %s L%0d t%0d n%0d", slots + 1, c,
          cmd[c].op.name(), cmd[c].wx_base >> 12,
          ((cmd[c].ho_base & 'hfff) / cmd[c].m) - 1, cmd[c].nvec));
      end
    end
    assign cmd_ready[c] = rst_n && (busy_cnt[c] == 0) && !core_done[c];
  end
  always @(posedge clk) if (busy_cnt[0] > 0 && busy_cnt[1] > 0) both_busy++;

  function automatic job_cfg_t mk_job(int nl, int t, int r, int base);
    job_cfg_t j;
    j = '0;
    j.nlayers = 3'(nl); j.t = 16'(t); j.b = 16'd1; j.reuse = 8'(r);
    for (int l = 0; l < LMAX; l++) begin
      j.layer[l].n = 4; j.layer[l].m = 4;
      j.layer[l].wx_base = addr_t'(base + (l << 12));
      j.layer[l].h_base  = addr_t'(base + (l << 12) + 'h100000);
    end
    return j;
  endfunction

  task automatic run(mode_e m, job_cfg_t j0, job_cfg_t j1);
    log_q.delete();
    mode = m; jobs[0] = j0; jobs[1] = j1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic expect_log(string name, string exp [$]);
    check({name, " command count"}, log_q.size(), exp.size());
    foreach (exp[i]) begin
      checks++;
      if (i >= log_q.size() || log_q[i] != exp[i]) begin
        failures++;
        $display("FAIL %s entry %0d: got '%s' expected '%s'", name, i,
                 (i < log_q.size()) ? log_q[i] : "-", exp[i]);
      end
    end
  endtask

  function automatic string sortkey(string q [$]);
    string s = "";
    q.sort();
    foreach (q[i]) s = {s, q[i], ";"};
    return s;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string e [$];
    start = 0; mode = MODE_MP; jobs[0] = '0; jobs[1] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // multi-threading, 3 layers, 3 timesteps
    run(MODE_MT, mk_job(3, 3, 1, 0), '0);
    e = '{"s1 c0 OP_FULL L0 t0 n1",
          "s2 c0 OP_FULL L1 t0 n1", "s2 c1 OP_FULL L0 t1 n1",
          "s3 c0 OP_FULL L2 t0 n1", "s3 c1 OP_FULL L1 t1 n1",
          "s4 c0 OP_FULL L0 t2 n1", "s4 c1 OP_FULL L2 t1 n1",
          "s5 c0 OP_FULL L1 t2 n1", "s6 c0 OP_FULL L2 t2 n1"};
    check("MT slots", slots, 6);
    check("MT core1 dependency idle slots", idle_slots[1], 1);
    check("MT core0 dependency idle slots", idle_slots[0], 0);
    // order inside one slot depends on the stand-in latencies: compare per slot
    check("MT schedule", int'(sortkey(log_q) == sortkey(e)), 1);

    // helper-core, 1 layer, 4 timesteps, 2 per slot
    run(MODE_HELPER, mk_job(1, 4, 2, 0), '0);
    e = '{"s1 c0 OP_XPART L0 t0 n2",
          "s2 c0 OP_XPART L0 t2 n2", "s2 c1 OP_HPART L0 t0 n1", "s2 c1 OP_HPART L0 t1 n1",
          "s3 c1 OP_HPART L0 t2 n1", "s3 c1 OP_HPART L0 t3 n1"};
    check("helper slots", slots, 3);
    check("helper main idle slots", idle_slots[1], 1);
    check("helper schedule", int'(sortkey(log_q) == sortkey(e)), 1);
    check("helper barrier waits seen", int'(sync_wait[0] + sync_wait[1] > 0), 1);

    // helper-core, 2 layers, 2 timesteps: helper waits for layer 0's h
    run(MODE_HELPER, mk_job(2, 2, 2, 0), '0);
    e = '{"s1 c0 OP_XPART L0 t0 n2",
          "s2 c1 OP_HPART L0 t0 n1", "s2 c1 OP_HPART L0 t1 n1",
          "s3 c0 OP_XPART L1 t0 n2",
          "s4 c1 OP_HPART L1 t0 n1", "s4 c1 OP_HPART L1 t1 n1"};
    check("helper 2L slots", slots, 4);
    check("helper 2L helper idle slots", idle_slots[0], 1);
    check("helper 2L main idle slots", idle_slots[1], 2);
    check("helper 2L schedule", int'(sortkey(log_q) == sortkey(e)), 1);

    // multi-programming: job 0 (2 layers x 2) on core 0, job 1 (1 x 3) on core 1
    both_busy = 0;
    run(MODE_MP, mk_job(2, 2, 1, 0), mk_job(1, 3, 1, 'h8000));
    check("MP command count", log_q.size(), 7);
    begin
      int n0 = 0, n1 = 0;
      foreach (log_q[i]) begin
        if (log_q[i].substr(3, 4) == "c0") n0++;
        if (log_q[i].substr(3, 4) == "c1") n1++;
      end
      check("MP core0 commands", n0, 4);
      check("MP core1 commands", n1, 3);
    end
    check("MP cores overlap", int'(both_busy > 0), 1);
    check("MP no slots", slots, 0);
    foreach (log_q[i]) $display("  %s", log_q[i]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
