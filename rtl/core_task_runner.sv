// core_task_runner: turns one scheduler task into the core commands that
// carry it out, and reports when the last of them has finished.
//
// A task names a layer, a first timestep t0, a number of timesteps and the
// batch size B. Memory addresses follow the layout of lstm_pkg: x[t][b] at
// in_base + (t*B+b)*N, h and c of timestep t at base + ((t+1)*B+b)*M (slot 0
// holds the initial state), partial sums at p_base + (t*B+b)*M.
//   OP_FULL  : one command per timestep, B vectors each
//   OP_XPART : one command for all timesteps, nsteps*B vectors, so each weight
//              word is used for every timestep of the task
//   OP_HPART : one command per timestep, B vectors each, in timestep order
//              (each needs the h_t of the one before)
// Interface: task is taken when task_valid and idle; task_done pulses one
// cycle after the final core done. This is a helper of the scheduler; the
// split into commands is this design's own.
module core_task_runner
  import lstm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       task_valid,
  input  core_task_t tsk,
  output logic       idle,
  output logic       task_done,
  output logic       cmd_valid,
  input  logic       cmd_ready,
  output core_cmd_t  cmd,
  input  logic       core_done
);
  typedef enum logic [1:0] { R_IDLE, R_ISSUE, R_WAIT } rstate_e;

  rstate_e     st;
  core_task_t  tk;
  logic [15:0] t;      // timestep of the command being issued
  logic [15:0] left;   // commands still to issue after this one

  // address of vector (timestep ts, batch 0) in a region of len words
  function automatic addr_t vaddr(addr_t base, logic [15:0] ts, logic [15:0] b,
                                  logic [15:0] len);
    return base + addr_t'(32'(ts) * 32'(b) * 32'(len));
  endfunction

  always_comb begin
    cmd         = '0;
    cmd.op      = tk.op;
    cmd.n       = tk.ld.n;
    cmd.m       = tk.ld.m;
    cmd.nvec    = (tk.op == OP_XPART) ? 16'(32'(tk.nsteps) * 32'(tk.b)) : tk.b;
    cmd.wx_base = tk.ld.wx_base;
    cmd.wh_base = tk.ld.wh_base;
    cmd.b_base  = tk.ld.b_base;
    cmd.x_base  = vaddr(tk.ld.in_base, t, tk.b, tk.ld.n);
    cmd.hp_base = vaddr(tk.ld.h_base, t, tk.b, tk.ld.m);
    cmd.ho_base = vaddr(tk.ld.h_base, t + 16'd1, tk.b, tk.ld.m);
    cmd.cp_base = vaddr(tk.ld.c_base, t, tk.b, tk.ld.m);
    cmd.co_base = vaddr(tk.ld.c_base, t + 16'd1, tk.b, tk.ld.m);
    cmd.p_base  = vaddr(tk.ld.p_base, t, tk.b, tk.ld.m);
  end

  assign idle      = (st == R_IDLE);
  assign cmd_valid = (st == R_ISSUE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= R_IDLE;
      tk        <= '0;
      t         <= '0;
      left      <= '0;
      task_done <= 1'b0;
    end else begin
      task_done <= 1'b0;
      unique case (st)
        R_IDLE: if (task_valid) begin
          tk   <= tsk;
          t    <= tsk.t0;
          left <= (tsk.op == OP_XPART) ? 16'd0 : tsk.nsteps - 16'd1;
          st   <= R_ISSUE;
        end
        R_ISSUE: if (cmd_ready) st <= R_WAIT;
        R_WAIT: if (core_done) begin
          if (left == 0) begin
            task_done <= 1'b1;
            st        <= R_IDLE;
          end else begin
            left <= left - 16'd1;
            t    <= t + 16'd1;
            st   <= R_ISSUE;
          end
        end
        default: st <= R_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (task_valid && idle) |-> (tsk.nsteps != 0 && tsk.b != 0));
endmodule
