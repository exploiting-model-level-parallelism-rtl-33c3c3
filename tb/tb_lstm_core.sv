// tb_lstm_core: self-checking test of one LSTM core against the integer
// reference model. A small layer (N=5, M=4) with random weights is run for
// three vectors three ways: as one full pass, and split into an x-part pass
// and an h-part pass as in helper-core mode. h_t, c_t and the partial sums in
// memory are compared with the reference, and the number of memory reads is
// checked to show each weight word is fetched once per pass, not once per
// vector.
module tb_lstm_core;
  import lstm_pkg::*;
  import lstm_ref_pkg::*;

  localparam int N = 5, M = 4, NV = 3;
  localparam addr_t WX = 'h100, WH = 'h200, BB = 'h300, XB = 'h400, HP = 'h500,
                    HO = 'h600, CP = 'h700, CO = 'h800, PB = 'h900, HO2 = 'hA00,
                    CO2 = 'hB00;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, done, bc, bm;
  core_cmd_t cmd;
  mem_req_t mreq;
  mem_rsp_t mrsp;

  lstm_core #(.NMAX(8), .MMAX(8), .VMAX(8)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .done, .mreq, .mrsp,
    .busy_compute(bc), .busy_mem(bm));
  mem_model #(.DEPTH(4096), .LAT(3), .STALL_EVERY(7)) mem (
    .clk, .rst_n, .req(mreq), .rsp(mrsp));

  int checks = 0, failures = 0;
  int wx[M][N][4], wh[M][M][4], b[M][4], x[NV][N], hp[NV][M], cp[NV][M];
  int both_cycles = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  task automatic run(core_op_e op, addr_t ho, addr_t co);
    cmd = '0;
    cmd.op = op; cmd.n = N; cmd.m = M; cmd.nvec = NV;
    cmd.wx_base = WX; cmd.wh_base = WH; cmd.b_base = BB; cmd.x_base = XB;
    cmd.hp_base = HP; cmd.ho_base = ho; cmd.cp_base = CP; cmd.co_base = co;
    cmd.p_base = PB;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) @(negedge clk);
  endtask

  always @(posedge clk) if (bc && bm) both_cycles++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r0, r1, zf[4], zp[4], cn, hn, psum[NV][M][4];
    longint s;
    cmd_valid = 0;
    cmd = '0;
    // model
    for (int r = 0; r < M; r++) begin
      for (int g = 0; g < 4; g++) begin
        b[r][g] = rnd(-128, 128);
        for (int k = 0; k < N; k++) wx[r][k][g] = rnd(-100, 100);
        for (int k = 0; k < M; k++) wh[r][k][g] = rnd(-100, 100);
      end
    end
    for (int j = 0; j < NV; j++) begin
      for (int k = 0; k < N; k++) x[j][k] = rnd(-300, 300);
      for (int k = 0; k < M; k++) begin hp[j][k] = rnd(-256, 256); cp[j][k] = rnd(-400, 400); end
    end
    for (int r = 0; r < M; r++) begin
      mem.mem[BB + r] = pack4(b[r][0], b[r][1], b[r][2], b[r][3]);
      for (int k = 0; k < N; k++) mem.mem[WX + r*N + k] = pack4(wx[r][k][0], wx[r][k][1], wx[r][k][2], wx[r][k][3]);
      for (int k = 0; k < M; k++) mem.mem[WH + r*M + k] = pack4(wh[r][k][0], wh[r][k][1], wh[r][k][2], wh[r][k][3]);
    end
    for (int j = 0; j < NV; j++) begin
      for (int k = 0; k < N; k++) mem.mem[XB + j*N + k] = 64'(x[j][k] & 'hffff);
      for (int k = 0; k < M; k++) begin
        mem.mem[HP + j*M + k] = 64'(hp[j][k] & 'hffff);
        mem.mem[CP + j*M + k] = 64'(cp[j][k] & 'hffff);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // full pass
    r0 = mem.reads;
    run(OP_FULL, HO, CO);
    r1 = mem.reads;
    check("full pass reads", r1 - r0, NV*N + NV*M + M*(1 + N + M + NV));
    for (int j = 0; j < NV; j++)
      for (int r = 0; r < M; r++) begin
        for (int g = 0; g < 4; g++) begin
          s = longint'(b[r][g]) * 256;
          for (int k = 0; k < N; k++) s += longint'(wx[r][k][g]) * x[j][k];
          for (int k = 0; k < M; k++) s += longint'(wh[r][k][g]) * hp[j][k];
          zf[g] = sat16(s >>> 8);
        end
        ref_cell(zf[0], zf[1], zf[2], zf[3], cp[j][r], cn, hn);
        check($sformatf("full c[%0d][%0d]", j, r), lane(mem.mem[CO + j*M + r], 0), cn);
        check($sformatf("full h[%0d][%0d]", j, r), lane(mem.mem[HO + j*M + r], 0), hn);
      end

    // split pass: x-part then h-part
    run(OP_XPART, HO2, CO2);
    r0 = mem.reads;
    run(OP_HPART, HO2, CO2);
    r1 = mem.reads;
    check("h-part reads", r1 - r0, NV*M + M*(1 + NV + M + NV));
    for (int j = 0; j < NV; j++)
      for (int r = 0; r < M; r++) begin
        for (int g = 0; g < 4; g++) begin
          s = 0;
          for (int k = 0; k < N; k++) s += longint'(wx[r][k][g]) * x[j][k];
          psum[j][r][g] = sat16(s >>> 8);
          check($sformatf("partial[%0d][%0d][%0d]", j, r, g), lane(mem.mem[PB + j*M + r], g), psum[j][r][g]);
          s = (longint'(b[r][g]) + psum[j][r][g]) * 256;
          for (int k = 0; k < M; k++) s += longint'(wh[r][k][g]) * hp[j][k];
          zp[g] = sat16(s >>> 8);
        end
        ref_cell(zp[0], zp[1], zp[2], zp[3], cp[j][r], cn, hn);
        check($sformatf("split c[%0d][%0d]", j, r), lane(mem.mem[CO2 + j*M + r], 0), cn);
        check($sformatf("split h[%0d][%0d]", j, r), lane(mem.mem[HO2 + j*M + r], 0), hn);
      end
    // compute and memory traffic overlapped at least once
    checks++;
    if (both_cycles == 0) begin failures++; $display("FAIL no compute/memory overlap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
