// tb_workloads: runs the layer geometries of the six benchmark models on the
// accelerator at its default sizes (no parameter overrides), each with a short
// sequence so the run stays within minutes:
//   IMDB 1x128/128, LRCN 1x320/256, Show & Tell 1x512/512,
//   Shakespeare-2 2x65/128, CTC-3L-421-UNI 3x121/421, Translation 3x1024/1024
// (layers x input size / layer size). Single-layer models run in
// multi-programming mode (the same model on both cores, as a throughput
// test) and multi-layer models in multi-threading mode; every model also runs
// in helper-core mode with two timesteps per slot. Weights and inputs are
// placed straight into the memory model; jobs are programmed and started
// through the host port. Every h_t and c_t of every layer is compared with
// the integer reference model, and the cycle count of each run is printed.
module tb_workloads;
  import lstm_pkg::*;
  import lstm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_valid, host_ready, host_we, host_rvalid, busy, done;
  logic [31:0] host_addr;
  word_t host_wdata, host_rdata;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  prof_state_e core_state [2];
  logic [2:0] bus_wait;

  lstm_dual_core_top dut (.*);
  mem_model #(.DEPTH(1 << 23), .LAT(4), .STALL_EVERY(0)) u_mem (
    .clk, .rst_n, .req(mem_req), .rsp(mem_rsp));

  int checks = 0, failures = 0;

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

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  function automatic int l0(addr_t a);
    return lane(u_mem.mem[a], 0);
  endfunction

  typedef struct {
    int nl, t, b;
    int n [LMAX];
    int m [LMAX];
    addr_t wx [LMAX], wh [LMAX], bb [LMAX], in [LMAX], h [LMAX], c [LMAX], p [LMAX];
  } model_t;

  // place a model at base; outputs are checked against ref_h/ref_c images
  int ref_h [addr_t], ref_c [addr_t];

  task automatic build(int jn, addr_t base, int nl, int n0, int m0, int t, int b,
                       int reuse, output model_t md);
    addr_t a;
    a = base;
    md.nl = nl; md.t = t; md.b = b;
    md.in[0] = a;
    for (int i = 0; i < t*b*n0; i++) u_mem.mem[a + addr_t'(i)] = 64'(rnd(-256, 256) & 'hffff);
    a += addr_t'(t*b*n0);
    for (int l = 0; l < nl; l++) begin
      int n, m;
      n = (l == 0) ? n0 : m0;
      m = m0;
      md.n[l] = n; md.m[l] = m;
      md.wx[l] = a; a += addr_t'(m*n);
      md.wh[l] = a; a += addr_t'(m*m);
      md.bb[l] = a; a += addr_t'(m);
      md.h[l]  = a; a += addr_t'((t+1)*b*m);
      md.c[l]  = a; a += addr_t'((t+1)*b*m);
      md.p[l]  = a; a += addr_t'(t*b*m);
      if (l > 0) md.in[l] = md.h[l-1] + addr_t'(b*m0);
      for (int i = 0; i < m*n; i++)
        u_mem.mem[md.wx[l] + addr_t'(i)] = pack4(rnd(-12,12), rnd(-12,12), rnd(-12,12), rnd(-12,12));
      for (int i = 0; i < m*m; i++)
        u_mem.mem[md.wh[l] + addr_t'(i)] = pack4(rnd(-12,12), rnd(-12,12), rnd(-12,12), rnd(-12,12));
      for (int i = 0; i < m; i++)
        u_mem.mem[md.bb[l] + addr_t'(i)] = pack4(rnd(-128,128), rnd(-128,128), rnd(-128,128), rnd(-128,128));
      for (int i = 0; i < b*m; i++) begin
        u_mem.mem[md.h[l] + addr_t'(i)] = 64'(rnd(-200, 200) & 'hffff);
        u_mem.mem[md.c[l] + addr_t'(i)] = 64'(rnd(-300, 300) & 'hffff);
      end
    end
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

  // reference on the memory image before the run; results kept aside
  task automatic reference(model_t md, bit split);
    int hv [addr_t], cv [addr_t];
    for (int l = 0; l < md.nl; l++) begin
      int n, m;
      n = md.n[l]; m = md.m[l];
      for (int t = 0; t < md.t; t++)
        for (int b = 0; b < md.b; b++)
          for (int r = 0; r < m; r++) begin
            int z[4], cn, hn, cp;
            addr_t ca;
            for (int g = 0; g < 4; g++) begin
              longint sx, sh;
              int bias;
              sx = 0; sh = 0;
              for (int k = 0; k < n; k++) begin
                addr_t xa;
                xa = md.in[l] + addr_t'((t*md.b + b)*n + k);
                sx += longint'(lane(u_mem.mem[md.wx[l] + addr_t'(r*n + k)], g)) *
                      (hv.exists(xa) ? hv[xa] : l0(xa));
              end
              for (int k = 0; k < m; k++) begin
                addr_t ha;
                ha = md.h[l] + addr_t'((t*md.b + b)*m + k);
                sh += longint'(lane(u_mem.mem[md.wh[l] + addr_t'(r*m + k)], g)) *
                      (hv.exists(ha) ? hv[ha] : l0(ha));
              end
              bias = lane(u_mem.mem[md.bb[l] + addr_t'(r)], g);
              if (split) z[g] = sat16(((longint'(bias) + sat16(sx >>> 8)) * 256 + sh) >>> 8);
              else       z[g] = sat16((longint'(bias) * 256 + sx + sh) >>> 8);
            end
            ca = md.c[l] + addr_t'((t*md.b + b)*m + r);
            cp = cv.exists(ca) ? cv[ca] : l0(ca);
            ref_cell(z[0], z[1], z[2], z[3], cp, cn, hn);
            hv[md.h[l] + addr_t'(((t+1)*md.b + b)*m + r)] = hn;
            cv[md.c[l] + addr_t'(((t+1)*md.b + b)*m + r)] = cn;
          end
    end
    foreach (hv[a]) ref_h[a] = hv[a];
    foreach (cv[a]) ref_c[a] = cv[a];
  endtask

  task automatic compare(string name);
    foreach (ref_h[a]) check($sformatf("%s h @%0h", name, a), l0(a), ref_h[a]);
    foreach (ref_c[a]) check($sformatf("%s c @%0h", name, a), l0(a), ref_c[a]);
    ref_h.delete();
    ref_c.delete();
  endtask

  task automatic run(mode_e m, string name);
    int cyc;
    hw(32'h8000_0000, word_t'({m, 1'b1}));
    cyc = 0;
    @(negedge clk);
    while (busy || cyc == 0) begin @(negedge clk); cyc++; end
    $display("%-16s %-11s %0d cycles", name, m.name(), cyc);
  endtask

  initial begin
    repeat (400_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { string name; int nl, n, m; } bench_t;

  initial begin
    bench_t bs [6];
    model_t a, b;
    host_valid = 0; host_we = 0; host_addr = '0; host_wdata = '0;
    bs[0] = '{"IMDB", 1, 128, 128};
    bs[1] = '{"LRCN", 1, 320, 256};
    bs[2] = '{"Show&Tell", 1, 512, 512};
    bs[3] = '{"Shakespeare-2", 2, 65, 128};
    bs[4] = '{"CTC-3L-421-UNI", 3, 121, 421};
    bs[5] = '{"Translation", 3, 1024, 1024};
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (bs[i]) begin
      int t, bt;
      t  = (i == 5) ? 2 : 3;
      bt = (i == 5) ? 1 : 2;
      if (i != 5) begin
        if (bs[i].nl == 1) begin
          build(0, 'h10000, 1, bs[i].n, bs[i].m, t, bt, 2, a);
          build(1, 'h200000, 1, bs[i].n, bs[i].m, t, bt, 2, b);
          reference(a, 0);
          reference(b, 0);
          run(MODE_MP, bs[i].name);
          compare({bs[i].name, " MP"});
        end else begin
          hw(32'h8000_0050, 64'd0);
          build(0, 'h10000, bs[i].nl, bs[i].n, bs[i].m, t, bt, 2, a);
          reference(a, 0);
          run(MODE_MT, bs[i].name);
          compare({bs[i].name, " MT"});
        end
      end
      hw(32'h8000_0050, 64'd0);
      build(0, 'h10000, bs[i].nl, bs[i].n, bs[i].m, t, bt, 2, a);
      reference(a, 1);
      run(MODE_HELPER, bs[i].name);
      compare({bs[i].name, " helper"});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
