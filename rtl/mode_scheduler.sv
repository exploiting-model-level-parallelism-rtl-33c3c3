// mode_scheduler: hands the work of one or two LSTM jobs to the two cores in
// one of the three computing modes of the dual-core accelerator.
//
//  MODE_MP (multi-programming): job 0 runs on core 0 and job 1 on core 1,
//    each core free-running through its own job, layer by layer and within a
//    layer timestep by timestep. A job with nlayers = 0 leaves its core idle.
//  MODE_MT (multi-threading): job 0 only. The work of logical timestep t
//    (all layers) is thread t+1; odd threads (t = 0, 2, ...) go to core 0 and
//    even threads to core 1. Execution is cut into time slots; in each slot a
//    core runs one layer step of its current thread if its inputs are ready
//    (the layer below in the same timestep, and the same layer one timestep
//    earlier), otherwise it idles for that slot. After the last layer a core
//    jumps to its next thread.
//  MODE_HELPER (helper-core): job 0 only. Core 0 (helper) computes the
//    products with x_t for a group of `reuse` timesteps in one pass; core 1
//    (main) then computes, one slot later, the products with h_{t-1}, the
//    activations and the element-wise part for that group. The helper moves
//    through all groups of a layer and then to the next layer; a group of a
//    higher layer waits until the main core has produced its inputs.
// In MT and helper mode a slot ends only when both cores have finished their
// task (a barrier), so the cores advance at the same pace.
//
// Readiness is decided at the start of a slot from per-layer progress
// counters: hdone[l] = timesteps of layer l with final h_t, xdone[l] = helper
// groups of layer l finished.
//
// Interface: start (one cycle, while idle) takes mode and jobs; busy is high
// until all work is done, then done pulses. Each core gets its commands
// through a core_task_runner. Statistics: slots, idle slots per core (had
// work but waited on a dependency) and barrier wait cycles per core.
//
// The modes, the odd/even thread assignment, the slot barrier and the helper
// running one slot ahead are the document's; the counters, the task format
// and the readiness rules written as counters are this design's.
module mode_scheduler
  import lstm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  mode_e     mode,
  input  job_cfg_t  jobs [2],
  output logic      busy,
  output logic      done,
  // core command streams
  output logic      cmd_valid [2],
  input  logic      cmd_ready [2],
  output core_cmd_t cmd [2],
  input  logic      core_done [2],
  // statistics
  output logic [31:0] slots,
  output logic [31:0] idle_slots [2],
  output logic [31:0] sync_wait [2]
);
  typedef enum logic [2:0] { SC_IDLE, SC_MP, SC_SLOT, SC_WAIT, SC_DONE } sstate_e;

  sstate_e    st;
  mode_e      md;
  job_cfg_t   jb [2];
  logic [2:0] lc [2];        // layer position per core
  logic [15:0] tc [2];       // timestep (MT/MP) or group (helper) per core
  logic       fin [2];       // core has no work left
  logic       launched [2];  // task started in this slot
  logic       running [2];   // task not yet finished
  logic [15:0] hdone [LMAX];
  logic [15:0] xdone [LMAX];

  logic       task_valid [2];
  core_task_t tsk [2];
  logic       ridle [2];
  logic       tdone [2];

  for (genvar ci = 0; ci < 2; ci++) begin : g_run
    core_task_runner u_run (
      .clk, .rst_n,
      .task_valid(task_valid[ci]), .tsk(tsk[ci]), .idle(ridle[ci]),
      .task_done(tdone[ci]),
      .cmd_valid(cmd_valid[ci]), .cmd_ready(cmd_ready[ci]), .cmd(cmd[ci]),
      .core_done(core_done[ci]));
  end

  // groups of a layer in helper mode
  logic [15:0] ngroups;
  assign ngroups = 16'((32'(jb[0].t) + 32'(jb[0].reuse) - 1) / 32'(jb[0].reuse));

  // task of each core at its current position, and whether it may start
  logic ready [2];
  always_comb begin
    for (int c = 0; c < 2; c++) begin
      job_cfg_t    j;
      logic [15:0] t0, ns, hend;
      j  = (md == MODE_MP) ? jb[c] : jb[0];
      t0 = '0;
      ns = '0;
      hend = '0;
      tsk[c] = '0;
      tsk[c].ld = j.layer[lc[c][1:0]];
      tsk[c].b  = j.b;
      ready[c]  = 1'b0;
      unique case (md)
        MODE_HELPER: begin
          t0 = 16'(32'(tc[c]) * 32'(j.reuse));
          ns = (j.t - t0 < 16'(j.reuse)) ? j.t - t0 : 16'(j.reuse);
          hend = t0 + ns;
          tsk[c].t0     = t0;
          tsk[c].nsteps = ns;
          if (c == 0) begin
            tsk[c].op = OP_XPART;
            ready[c]  = (lc[c] == 0) || (hdone[2'(lc[c] - 3'd1)] >= hend);
          end else begin
            tsk[c].op = OP_HPART;
            ready[c]  = (xdone[lc[c][1:0]] > tc[c]) && (hdone[lc[c][1:0]] == t0);
          end
        end
        MODE_MT: begin
          tsk[c].op     = OP_FULL;
          tsk[c].t0     = tc[c];
          tsk[c].nsteps = 16'd1;
          ready[c] = (hdone[lc[c][1:0]] == tc[c]) &&
                     ((lc[c] == 0) || (hdone[2'(lc[c] - 3'd1)] > tc[c]));
        end
        default: begin  // MP: whole layer of the core's own job
          tsk[c].op     = OP_FULL;
          tsk[c].t0     = 16'd0;
          tsk[c].nsteps = j.t;
          ready[c]      = 1'b1;
        end
      endcase
      ready[c] = ready[c] && !fin[c];
    end
  end

  assign busy = (st != SC_IDLE);

  always_comb begin
    for (int c = 0; c < 2; c++)
      task_valid[c] = ridle[c] && ready[c] &&
                      ((st == SC_MP && !running[c]) || st == SC_SLOT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= SC_IDLE;
      md    <= MODE_MP;
      done  <= 1'b0;
      slots <= '0;
      for (int c = 0; c < 2; c++) begin
        jb[c] <= '0; lc[c] <= '0; tc[c] <= '0; fin[c] <= 1'b1;
        launched[c] <= 1'b0; running[c] <= 1'b0;
        idle_slots[c] <= '0; sync_wait[c] <= '0;
      end
      for (int l = 0; l < LMAX; l++) begin hdone[l] <= '0; xdone[l] <= '0; end
    end else begin
      done <= 1'b0;
      unique case (st)
        SC_IDLE: if (start) begin
          md    <= mode;
          jb    <= jobs;
          slots <= '0;
          for (int l = 0; l < LMAX; l++) begin hdone[l] <= '0; xdone[l] <= '0; end
          for (int c = 0; c < 2; c++) begin
            lc[c] <= '0;
            idle_slots[c] <= '0;
            sync_wait[c]  <= '0;
            running[c]    <= 1'b0;
            launched[c]   <= 1'b0;
          end
          unique case (mode)
            MODE_MP: begin
              tc[0] <= '0; tc[1] <= '0;
              fin[0] <= (jobs[0].nlayers == 0);
              fin[1] <= (jobs[1].nlayers == 0);
              st <= SC_MP;
            end
            MODE_MT: begin
              tc[0] <= 16'd0; tc[1] <= 16'd1;
              fin[0] <= (jobs[0].nlayers == 0);
              fin[1] <= (jobs[0].nlayers == 0) || (jobs[0].t < 16'd2);
              st <= SC_SLOT;
            end
            default: begin
              tc[0] <= '0; tc[1] <= '0;
              fin[0] <= (jobs[0].nlayers == 0);
              fin[1] <= (jobs[0].nlayers == 0);
              st <= SC_SLOT;
            end
          endcase
        end

        // multi-programming: each core takes its next layer when free
        SC_MP: begin
          for (int c = 0; c < 2; c++) begin
            if (task_valid[c]) running[c] <= 1'b1;
            if (tdone[c]) begin
              running[c] <= 1'b0;
              if (lc[c] + 3'd1 == jb[c].nlayers) fin[c] <= 1'b1;
              lc[c] <= lc[c] + 3'd1;
            end
          end
          if (fin[0] && fin[1] && !running[0] && !running[1]) st <= SC_DONE;
        end

        // start of a time slot: launch every ready task
        SC_SLOT: begin
          if (fin[0] && fin[1]) st <= SC_DONE;
          else begin
            for (int c = 0; c < 2; c++) begin
              launched[c] <= ready[c];
              running[c]  <= ready[c];
              if (!ready[c] && !fin[c]) idle_slots[c] <= idle_slots[c] + 1;
            end
            st <= SC_WAIT;
          end
        end

        // wait until both cores have finished the slot, then advance
        SC_WAIT: begin
          for (int c = 0; c < 2; c++) begin
            if (tdone[c]) running[c] <= 1'b0;
            if (launched[c] && !running[c] && (running[0] || running[1]) && !tdone[c])
              sync_wait[c] <= sync_wait[c] + 1;
          end
          if (!(running[0] && !tdone[0]) && !(running[1] && !tdone[1])) begin
            slots <= slots + 1;
            for (int c = 0; c < 2; c++) begin
              if (launched[c]) begin
                if (md == MODE_MT) begin
                  hdone[lc[c][1:0]] <= hdone[lc[c][1:0]] + 16'd1;
                  if (lc[c] + 3'd1 == jb[0].nlayers) begin
                    lc[c] <= '0;
                    tc[c] <= tc[c] + 16'd2;
                    if (tc[c] + 16'd2 >= jb[0].t) fin[c] <= 1'b1;
                  end else lc[c] <= lc[c] + 3'd1;
                end else begin
                  if (c == 0) xdone[lc[c][1:0]] <= xdone[lc[c][1:0]] + 16'd1;
                  else        hdone[lc[c][1:0]] <= tsk[c].t0 + tsk[c].nsteps;
                  if (tc[c] + 16'd1 == ngroups) begin
                    tc[c] <= '0;
                    lc[c] <= lc[c] + 3'd1;
                    if (lc[c] + 3'd1 == jb[0].nlayers) fin[c] <= 1'b1;
                  end else tc[c] <= tc[c] + 16'd1;
                end
              end
            end
            st <= SC_SLOT;
          end
        end

        SC_DONE: begin
          done <= 1'b1;
          st   <= SC_IDLE;
        end
        default: st <= SC_IDLE;
      endcase
    end
  end

  // In a slot at least one core must be able to run, or the job would hang.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (st == SC_SLOT && !(fin[0] && fin[1])) |-> (ready[0] || ready[1]));
endmodule
