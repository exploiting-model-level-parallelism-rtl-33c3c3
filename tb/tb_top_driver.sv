// tb_top_driver: host-side driver and checker for the dual-core accelerator,
// shared by the end-to-end testbenches.
//
// Plays the host program: builds random LSTM models, loads weights, biases,
// inputs and initial states into main memory through the host port,
// programs the job registers, starts a run, waits for it and reads every
// output h_t back through the host port. The outputs are compared with an
// integer reference model that computes the same layers on its own memory
// image (full pass arithmetic for multi-programming and multi-threading,
// x-part / h-part arithmetic for helper-core mode).
//
// Scenarios: multi-programming with two different jobs; multi-threading on a
// 2-layer model; helper-core on a 2-layer model whose sequence length is not
// a multiple of the timesteps per slot. It then checks that every mechanism
// happened at least once: each mode, dependency idle slots, barrier waits,
// each of the four profiler states, shared-bus contention and memory
// back-pressure. Prints TB_RESULT and finishes.
module tb_top_driver
  import lstm_pkg::*;
  import lstm_ref_pkg::*;
(
  input  logic        clk,
  output logic        rst_n,
  output logic        host_valid,
  input  logic        host_ready,
  output logic        host_we,
  output logic [31:0] host_addr,
  output word_t       host_wdata,
  input  logic        host_rvalid,
  input  word_t       host_rdata,
  input  logic        busy,
  input  logic        done,
  input  logic        contention,  // a master waited for the shared bus
  input  logic        mem_stall    // memory held off a request
);
  int checks = 0, failures = 0;
  int n_contention = 0, n_stall = 0;
  longint img [addr_t];            // reference memory image

  always @(posedge clk) begin
    if (contention) n_contention++;
    if (mem_stall) n_stall++;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
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

  task automatic memw(addr_t a, word_t d);
    img[a] = longint'(d);
    hw({1'b0, a[30:0]}, d);
  endtask

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  function automatic longint rd_img(addr_t a);
    return img.exists(a) ? img[a] : 0;
  endfunction

  function automatic int l0(addr_t a);
    return lane(word_t'(rd_img(a)), 0);
  endfunction

  // a model: L layers, input size n0, layer sizes ms[], T timesteps, batch B
  typedef struct {
    int nl, t, b, reuse;
    int n [LMAX];
    int m [LMAX];
    addr_t wx [LMAX], wh [LMAX], bb [LMAX], in [LMAX], h [LMAX], c [LMAX], p [LMAX];
  } model_t;

  task automatic build(int jn, addr_t base, int nl, int n0, int m0, int m1, int t,
                       int b, int reuse, output model_t md);
    addr_t a;
    a = base;
    md.nl = nl; md.t = t; md.b = b; md.reuse = reuse;
    // input sequence
    md.in[0] = a;
    for (int i = 0; i < t*b*n0; i++) memw(a + addr_t'(i), word_t'(rnd(-300, 300) & 'hffff));
    a += addr_t'(t*b*n0);
    for (int l = 0; l < nl; l++) begin
      int n, m;
      n = (l == 0) ? n0 : md.m[l-1];
      m = (l == 0) ? m0 : m1;
      md.n[l] = n; md.m[l] = m;
      md.wx[l] = a; a += addr_t'(m*n);
      md.wh[l] = a; a += addr_t'(m*m);
      md.bb[l] = a; a += addr_t'(m);
      md.h[l]  = a; a += addr_t'((t+1)*b*m);
      md.c[l]  = a; a += addr_t'((t+1)*b*m);
      md.p[l]  = a; a += addr_t'(t*b*m);
      if (l > 0) md.in[l] = md.h[l-1] + addr_t'(b*md.m[l-1]);
      for (int i = 0; i < m*n; i++)
        memw(md.wx[l] + addr_t'(i), pack4(rnd(-90,90), rnd(-90,90), rnd(-90,90), rnd(-90,90)));
      for (int i = 0; i < m*m; i++)
        memw(md.wh[l] + addr_t'(i), pack4(rnd(-90,90), rnd(-90,90), rnd(-90,90), rnd(-90,90)));
      for (int i = 0; i < m; i++)
        memw(md.bb[l] + addr_t'(i), pack4(rnd(-128,128), rnd(-128,128), rnd(-128,128), rnd(-128,128)));
      // initial states (slot 0)
      for (int i = 0; i < b*m; i++) begin
        memw(md.h[l] + addr_t'(i), word_t'(rnd(-200, 200) & 'hffff));
        memw(md.c[l] + addr_t'(i), word_t'(rnd(-300, 300) & 'hffff));
      end
    end
    // job registers
    hw(32'h8000_0010 + 32'(jn*'h40) + 0, word_t'(nl));
    hw(32'h8000_0010 + 32'(jn*'h40) + 1, word_t'(t));
    hw(32'h8000_0010 + 32'(jn*'h40) + 2, word_t'(b));
    hw(32'h8000_0010 + 32'(jn*'h40) + 3, word_t'(reuse));
    for (int l = 0; l < nl; l++) begin
      logic [31:0] ra;
      ra = 32'h8000_0010 + 32'(jn*'h40) + 32'(8 + 9*l);
      hw(ra + 0, word_t'(md.n[l]));  hw(ra + 1, word_t'(md.m[l]));
      hw(ra + 2, word_t'(md.wx[l])); hw(ra + 3, word_t'(md.wh[l]));
      hw(ra + 4, word_t'(md.bb[l])); hw(ra + 5, word_t'(md.in[l]));
      hw(ra + 6, word_t'(md.h[l]));  hw(ra + 7, word_t'(md.c[l]));
      hw(ra + 8, word_t'(md.p[l]));
    end
  endtask

  // reference: run the whole model on the image
  task automatic reference(model_t md, bit split);
    for (int l = 0; l < md.nl; l++) begin
      int n, m;
      n = md.n[l]; m = md.m[l];
      for (int t = 0; t < md.t; t++)
        for (int b = 0; b < md.b; b++)
          for (int r = 0; r < m; r++) begin
            int z[4], cn, hn, pp[4];
            for (int g = 0; g < 4; g++) begin
              longint sx, sh;
              sx = 0; sh = 0;
              for (int k = 0; k < n; k++)
                sx += longint'(lane(word_t'(rd_img(md.wx[l] + addr_t'(r*n + k))), g)) *
                      l0(md.in[l] + addr_t'((t*md.b + b)*n + k));
              for (int k = 0; k < m; k++)
                sh += longint'(lane(word_t'(rd_img(md.wh[l] + addr_t'(r*m + k))), g)) *
                      l0(md.h[l] + addr_t'((t*md.b + b)*m + k));
              if (split) begin
                pp[g] = sat16(sx >>> 8);
                z[g] = sat16(((longint'(lane(word_t'(rd_img(md.bb[l] + addr_t'(r))), g)) + pp[g]) * 256 + sh) >>> 8);
              end else
                z[g] = sat16((longint'(lane(word_t'(rd_img(md.bb[l] + addr_t'(r))), g)) * 256 + sx + sh) >>> 8);
            end
            ref_cell(z[0], z[1], z[2], z[3], l0(md.c[l] + addr_t'((t*md.b + b)*m + r)), cn, hn);
            img[md.h[l] + addr_t'(((t+1)*md.b + b)*m + r)] = longint'(hn & 'hffff);
            img[md.c[l] + addr_t'(((t+1)*md.b + b)*m + r)] = longint'(cn & 'hffff);
          end
    end
  endtask

  task automatic compare(string name, model_t md);
    word_t d;
    for (int l = 0; l < md.nl; l++)
      for (int i = md.b*md.m[l]; i < (md.t+1)*md.b*md.m[l]; i++) begin
        hr({1'b0, 31'(md.h[l] + addr_t'(i))}, d);
        check($sformatf("%s h L%0d word %0d", name, l, i), lane(d, 0), lane(word_t'(rd_img(md.h[l] + addr_t'(i))), 0));
        hr({1'b0, 31'(md.c[l] + addr_t'(i))}, d);
        check($sformatf("%s c L%0d word %0d", name, l, i), lane(d, 0), lane(word_t'(rd_img(md.c[l] + addr_t'(i))), 0));
      end
  endtask

  task automatic run(mode_e m, output int cycles);
    word_t d;
    int c0;
    hw(32'h8000_0000, word_t'({m, 1'b1}));
    c0 = 0;
    @(negedge clk);
    while (busy || c0 == 0) begin @(negedge clk); c0++; end
    cycles = c0;
    hr(32'h8000_0000, d);
    check("done flag", d[1], 1);
    check("mode readback", d[3:2], m);
  endtask

  // counters read through the registers
  longint prof [4];
  longint idle_sum, sync_sum;
  task automatic read_stats(output longint slots);
    word_t d;
    for (int s = 0; s < 4; s++) begin
      hr(32'h8000_0100 + 32'(s), d); prof[s] += longint'(d[31:0]);
      hr(32'h8000_0104 + 32'(s), d); prof[s] += longint'(d[31:0]);
    end
    hr(32'h8000_0120, d); slots = longint'(d[31:0]);
    hr(32'h8000_0121, d); idle_sum += longint'(d[31:0]);
    hr(32'h8000_0122, d); idle_sum += longint'(d[31:0]);
    hr(32'h8000_0123, d); sync_sum += longint'(d[31:0]);
    hr(32'h8000_0124, d); sync_sum += longint'(d[31:0]);
  endtask

  initial begin
    model_t ja, jb2;
    int cyc_mp, cyc_mt, cyc_hc;
    longint s_mp, s_mt, s_hc;
    word_t d;
    int modes_run = 0;
    rst_n = 0; host_valid = 0; host_we = 0; host_addr = '0; host_wdata = '0;
    for (int s = 0; s < 4; s++) prof[s] = 0;
    idle_sum = 0; sync_sum = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;

    // register readback
    hw(32'h8000_0011, 64'd77);
    hr(32'h8000_0011, d);
    check("register readback", d, 77);

    // multi-programming: two different jobs at once
    build(0, 'h1000, 2, 5, 4, 3, 3, 2, 1, ja);
    build(1, 'h4000, 1, 6, 5, 5, 4, 2, 1, jb2);
    run(MODE_MP, cyc_mp);
    read_stats(s_mp);
    modes_run++;
    check("MP uses no slots", s_mp, 0);
    reference(ja, 0);
    reference(jb2, 0);
    compare("MP job0", ja);
    compare("MP job1", jb2);

    // multi-threading: 2 layers, 5 timesteps
    hw(32'h8000_0050, 64'd0);  // job 1 off
    build(0, 'h8000, 2, 4, 4, 3, 5, 2, 1, ja);
    run(MODE_MT, cyc_mt);
    read_stats(s_mt);
    modes_run++;
    // 2 layers x 5 steps on two cores: slots = 6 (see the scheduling rules)
    check("MT slots", s_mt, 6);
    reference(ja, 0);
    compare("MT", ja);

    // helper-core: 2 layers, 5 timesteps, 2 timesteps per slot
    build(0, 'hC000, 2, 4, 4, 3, 5, 2, 2, ja);
    run(MODE_HELPER, cyc_hc);
    read_stats(s_hc);
    modes_run++;
    check("helper slots", s_hc, 7);
    reference(ja, 1);
    compare("helper", ja);

    $display("cycles: MP %0d, MT %0d, helper %0d", cyc_mp, cyc_mt, cyc_hc);
    $display("profiler: compute %0d both %0d memory %0d neither %0d",
             prof[PS_COMPUTE], prof[PS_BOTH], prof[PS_MEMORY], prof[PS_NEITHER]);
    $display("mechanisms: idle slots %0d, barrier waits %0d, bus contention %0d, memory stalls %0d",
             idle_sum, sync_sum, n_contention, n_stall);
    check("all three modes ran", modes_run, 3);
    check("dependency idle slot happened", idle_sum > 0, 1);
    check("barrier wait happened", sync_sum > 0, 1);
    check("profiler compute-only seen", prof[PS_COMPUTE] > 0, 1);
    check("profiler both seen", prof[PS_BOTH] > 0, 1);
    check("profiler memory-only seen", prof[PS_MEMORY] > 0, 1);
    check("profiler neither seen", prof[PS_NEITHER] > 0, 1);
    check("bus contention happened", n_contention > 0, 1);
    check("memory back-pressure happened", n_stall > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
