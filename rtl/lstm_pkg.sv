// lstm_pkg: types and constants shared by the dual-core LSTM accelerator.
//
// Numbers are Q8.8 fixed point (16 bits, 8 fraction bits), as the accelerator's
// data format. Products are Q16.16 and accumulate in 32-bit registers.
// One main-memory word is 64 bits and holds the four gate values of one
// matrix element, one bias row or one partial-sum row, packed as
// {c~, o, f, i} from the most significant lane down; a vector element uses
// the low lane only. The packing, the bus and the command format are this
// design's own choices.
package lstm_pkg;

  localparam int unsigned QW   = 16;  // Q8.8 width
  localparam int unsigned QF   = 8;   // fraction bits
  localparam int unsigned ACCW = 32;  // accumulator width (Q16.16)
  localparam int unsigned MEMW = 64;  // main-memory word: four Q8.8 lanes
  localparam int unsigned AW   = 32;  // main-memory word address width

  typedef logic signed [QW-1:0]   q88_t;
  typedef logic signed [ACCW-1:0] acc_t;
  typedef logic [AW-1:0]          addr_t;
  typedef logic [MEMW-1:0]        word_t;

  // Gate lane order inside a memory word.
  localparam int unsigned G_I = 0;
  localparam int unsigned G_F = 1;
  localparam int unsigned G_O = 2;
  localparam int unsigned G_C = 3;

  localparam q88_t Q_MAX = 16'sh7fff;
  localparam q88_t Q_MIN = -16'sh8000;

  // Computing modes of the dual-core system.
  typedef enum logic [1:0] {
    MODE_MP     = 2'd0,  // multi-programming: two independent jobs
    MODE_MT     = 2'd1,  // multi-threading: one job, timesteps interleaved
    MODE_HELPER = 2'd2   // helper-core: one job, x-part on core 0
  } mode_e;

  // Profiler states of a core, in counter order.
  typedef enum logic [1:0] {
    PS_COMPUTE = 2'd0,  // computing only
    PS_BOTH    = 2'd1,  // computing and memory operation
    PS_MEMORY  = 2'd2,  // memory operation only
    PS_NEITHER = 2'd3   // idle
  } prof_state_e;

  // Work a core performs for one command.
  typedef enum logic [1:0] {
    OP_FULL  = 2'd0,  // b + Wx*x + Wh*h, activations, element-wise
    OP_XPART = 2'd1,  // Wx*x only, partial sums written to memory
    OP_HPART = 2'd2   // b + partial + Wh*h, activations, element-wise
  } core_op_e;

  // One core command: a pass over the rows of one layer for nvec vectors
  // that share the layer's weights (batch entries, and in helper mode
  // several timesteps). Vector j of the pass is at base + j*len.
  typedef struct packed {
    core_op_e    op;
    logic [15:0] n;        // input size N
    logic [15:0] m;        // layer size M
    logic [15:0] nvec;     // vectors in this pass
    addr_t       wx_base;  // W_x: word (r*N + k)
    addr_t       wh_base;  // W_h: word (r*M + k)
    addr_t       b_base;   // bias: word r
    addr_t       x_base;   // x vectors, N words each
    addr_t       hp_base;  // h_{t-1} vectors, M words each
    addr_t       ho_base;  // h_t vectors out
    addr_t       cp_base;  // c_{t-1} vectors
    addr_t       co_base;  // c_t vectors out
    addr_t       p_base;   // partial sums, M words per vector
  } core_cmd_t;

  localparam int unsigned LMAX = 4;  // layers per job

  // Layer description held by the system manager.
  typedef struct packed {
    logic [15:0] n;
    logic [15:0] m;
    addr_t       wx_base;
    addr_t       wh_base;
    addr_t       b_base;
    addr_t       in_base;  // input x[t][b] at in_base + (t*B+b)*N
    addr_t       h_base;   // h[t][b] at h_base + ((t+1)*B+b)*M, slot 0 = h_{-1}
    addr_t       c_base;   // c likewise
    addr_t       p_base;   // partial sums p[t][b] at p_base + (t*B+b)*M
  } layer_desc_t;

  // Main-memory bus, master to slave. A master holds a request stable until
  // it is granted; reads are answered in order by rvalid/rdata.
  typedef struct packed {
    logic  req;
    logic  we;
    addr_t addr;
    word_t wdata;
  } mem_req_t;

  // Main-memory bus, slave to master.
  typedef struct packed {
    logic  gnt;     // request accepted this cycle
    logic  rvalid;  // read data valid this cycle
    word_t rdata;
  } mem_rsp_t;

  // One job: a stacked LSTM model run over T timesteps for a batch of B.
  typedef struct packed {
    logic [2:0]        nlayers;  // 0 = no job
    logic [15:0]       t;        // sequence length
    logic [15:0]       b;        // batch size
    logic [7:0]        reuse;    // helper-core timesteps per slot
    layer_desc_t [LMAX-1:0] layer;
  } job_cfg_t;

  // Unit of work handed to a core by the scheduler.
  typedef struct packed {
    core_op_e    op;
    layer_desc_t ld;
    logic [15:0] t0;      // first timestep
    logic [15:0] nsteps;  // timesteps covered
    logic [15:0] b;       // batch size
  } core_task_t;

  // Multiply two Q8.8 numbers, result Q16.16.
  function automatic acc_t qmul(q88_t a, q88_t b);
    return acc_t'(a) * acc_t'(b);
  endfunction

  // Saturate a Q16.16 value to Q8.8 (truncating the low fraction bits).
  function automatic q88_t sat_q88(acc_t v);
    acc_t s;
    s = v >>> QF;
    if (s > acc_t'(Q_MAX)) return Q_MAX;
    if (s < acc_t'(Q_MIN)) return Q_MIN;
    return q88_t'(s);
  endfunction

endpackage
