// lstm_core: one LSTM accelerator core of the dual-core system.
//
// A core executes commands, each a pass over all M rows of one LSTM layer for
// nvec input vectors that share the layer's weights (the entries of a batch,
// and in helper-core mode several timesteps as well, so that every weight
// word read from main memory is used nvec times). Three kinds of pass exist:
//   OP_FULL  : z = b + Wx*x_t + Wh*h_{t-1}; then activations and element-wise
//              ops give c_t and h_t, which are written back (one core running
//              a whole layer step, used in multi-programming and
//              multi-threading mode);
//   OP_XPART : p = Wx*x_t only, written to memory as partial sums (the helper
//              core's share in helper-core mode: the products that do not
//              depend on h_{t-1});
//   OP_HPART : z = b + p + Wh*h_{t-1}, activations, element-wise ops (the main
//              core's share in helper-core mode).
// The four gate matrices are multiplied side by side: a memory word holds the
// four gate weights of one (row, column) element and four MAC lanes consume it
// at once, one vector per cycle.
//
// Sequence of one command: the x vectors (and/or h_{t-1} vectors) are copied
// into on-chip buffers; then for every row r the bias row (and partial sums)
// are read, the weight words of row r are streamed through the MAC lanes, and
// per vector the gate values are activated and the element-wise part reads
// c_{t-1}[r] and writes c_t[r] and h_t[r] (or the partial-sum word). While the
// MAC lanes work on one weight word the next one is already being fetched, so
// compute and memory traffic overlap.
//
// Interface: cmd is accepted when cmd_valid and cmd_ready are both high; done
// pulses for one cycle when the command has finished and all its writes have
// been granted. busy_compute and busy_mem tell the profiler what the core is
// doing. Memory layout and bus are defined in lstm_pkg.
//
// From the document: Q8.8 data, the gate data flow, the split into x-part and
// h-part, and the reuse of weights across vectors. The command format, buffer
// organisation, one-lane-per-gate MAC array and fetch scheme are this design's
// own, since the core's internals are not given there.
module lstm_core
  import lstm_pkg::*;
#(
  parameter int unsigned NMAX = 1024,  // largest input size N
  parameter int unsigned MMAX = 1024,  // largest layer size M
  parameter int unsigned VMAX = 128    // largest nvec (batch 32 x reuse 4)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cmd_valid,
  output logic      cmd_ready,
  input  core_cmd_t cmd,
  output logic      done,
  output mem_req_t  mreq,
  input  mem_rsp_t  mrsp,
  output logic      busy_compute,
  output logic      busy_mem
);
  localparam int unsigned XD  = VMAX * NMAX;
  localparam int unsigned HD  = VMAX * MMAX;
  localparam int unsigned XAW = $clog2(XD);
  localparam int unsigned HAW = $clog2(HD);
  localparam int unsigned VW  = (VMAX > 1) ? $clog2(VMAX) : 1;

  typedef enum logic [4:0] {
    S_IDLE, S_LOADX_REQ, S_LOADX_WAIT, S_LOADH_REQ, S_LOADH_WAIT,
    S_ROW, S_BIAS_REQ, S_BIAS_WAIT, S_INIT, S_P_REQ, S_P_WAIT,
    S_MAC_WAIT, S_MAC_RUN,
    S_C_REQ, S_C_WAIT, S_WR_C, S_WR_H, S_WR_P, S_DONE
  } state_e;

  state_e    st;
  core_cmd_t c;          // latched command
  logic [31:0] idx;      // load counter
  logic [15:0] r;        // current row
  logic [15:0] j;        // current vector
  logic [16:0] kk;       // weight word index in the row (x part, then h part)
  logic [16:0] klen;     // weight words per row
  logic [16:0] nx;       // x-part words per row (0 for OP_HPART)
  word_t     bias;
  q88_t      cprev;

  acc_t      acc [VMAX][4];

  // weight fetcher
  logic [16:0] fk;       // next weight word to fetch
  logic        f_pend;   // fetch read outstanding
  logic        wf_v;     // fetched word waiting
  word_t       wf;
  word_t       wcur;     // word in the MAC lanes
  logic        wcur_x;   // it belongs to the x part
  logic [15:0] wcur_k;   // its column
  logic [16:0] jj;       // MAC pipeline counter (0..nvec)

  // main FSM read outstanding
  logic        rd_pend;

  logic [VW-1:0] jv, jm;   // accumulator indices of j and jj-1
  assign jv = VW'(j);
  assign jm = VW'(jj - 17'd1);

  // on-chip vector buffers
  logic           xb_we, hb_we;
  logic [XAW-1:0] xb_waddr, xb_raddr;
  logic [HAW-1:0] hb_waddr, hb_raddr;
  q88_t           xb_rdata, hb_rdata;
  q88_t           ld_data;

  assign ld_data  = q88_t'(mrsp.rdata[QW-1:0]);
  assign xb_we    = (st == S_LOADX_WAIT) && mrsp.rvalid;
  assign hb_we    = (st == S_LOADH_WAIT) && mrsp.rvalid;
  assign xb_waddr = XAW'(idx);
  assign hb_waddr = HAW'(idx);
  assign xb_raddr = XAW'(32'(jj) * 32'(c.n) + 32'(wcur_k));
  assign hb_raddr = HAW'(32'(jj) * 32'(c.m) + 32'(wcur_k));

  onchip_buffer #(.WIDTH(QW), .DEPTH(XD)) u_xbuf (
    .clk, .we(xb_we), .waddr(xb_waddr), .wdata(ld_data),
    .raddr(xb_raddr), .rdata(xb_rdata));
  onchip_buffer #(.WIDTH(QW), .DEPTH(HD)) u_hbuf (
    .clk, .we(hb_we), .waddr(hb_waddr), .wdata(ld_data),
    .raddr(hb_raddr), .rdata(hb_rdata));

  // element-wise unit on the accumulator of vector j
  q88_t ew_c, ew_h;
  lstm_elementwise u_ew (
    .z_i(sat_q88(acc[jv][G_I])), .z_f(sat_q88(acc[jv][G_F])),
    .z_o(sat_q88(acc[jv][G_O])), .z_c(sat_q88(acc[jv][G_C])),
    .c_prev(cprev), .c_out(ew_c), .h_out(ew_h));

  // addresses
  addr_t row_off;   // j*M + r
  assign row_off = addr_t'(32'(j) * 32'(c.m) + 32'(r));

  addr_t f_addr;
  always_comb begin
    if (fk < nx) f_addr = c.wx_base + addr_t'(32'(r) * 32'(c.n) + 32'(fk));
    else         f_addr = c.wh_base + addr_t'(32'(r) * 32'(c.m) + 32'(fk - nx));
  end

  logic in_mac;
  assign in_mac = (st == S_MAC_WAIT) || (st == S_MAC_RUN);
  logic f_issue;
  assign f_issue = in_mac && !wf_v && !f_pend && (fk < klen);

  // bus request
  always_comb begin
    mreq = '0;
    unique case (st)
      S_LOADX_REQ: begin mreq.req = 1'b1; mreq.addr = c.x_base + idx; end
      S_LOADH_REQ: begin mreq.req = 1'b1; mreq.addr = c.hp_base + idx; end
      S_BIAS_REQ:  begin mreq.req = 1'b1; mreq.addr = c.b_base + addr_t'(r); end
      S_P_REQ:     begin mreq.req = 1'b1; mreq.addr = c.p_base + row_off; end
      S_C_REQ:     begin mreq.req = 1'b1; mreq.addr = c.cp_base + row_off; end
      S_WR_C: begin
        mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = c.co_base + row_off;
        mreq.wdata = word_t'($unsigned(ew_c));
      end
      S_WR_H: begin
        mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = c.ho_base + row_off;
        mreq.wdata = word_t'($unsigned(ew_h));
      end
      S_WR_P: begin
        mreq.req = 1'b1; mreq.we = 1'b1; mreq.addr = c.p_base + row_off;
        mreq.wdata = {sat_q88(acc[jv][G_C]), sat_q88(acc[jv][G_O]),
                      sat_q88(acc[jv][G_F]), sat_q88(acc[jv][G_I])};
      end
      default: if (f_issue) begin mreq.req = 1'b1; mreq.addr = f_addr; end
    endcase
  end

  assign cmd_ready    = (st == S_IDLE);
  assign busy_compute = (st == S_MAC_RUN) || (st == S_INIT) || (st == S_WR_C);
  assign busy_mem     = mreq.req || rd_pend || f_pend;

  // accumulator start value: bias (unless x-part) plus partial sum (h-part)
  acc_t acc_init [4];
  always_comb begin
    for (int g = 0; g < 4; g++) begin
      acc_init[g] = '0;
      if (c.op != OP_XPART) acc_init[g] = acc_t'(q88_t'(bias[g*QW +: QW])) <<< QF;
      if (st == S_P_WAIT)
        acc_init[g] = acc_init[g] + (acc_t'(q88_t'(mrsp.rdata[g*QW +: QW])) <<< QF);
    end
  end

  // MAC lane input for the vector leaving the buffer this cycle
  q88_t vin;
  assign vin = wcur_x ? xb_rdata : hb_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      c       <= '0;
      idx     <= '0;
      r       <= '0;
      j       <= '0;
      kk      <= '0;
      klen    <= '0;
      nx      <= '0;
      bias    <= '0;
      cprev   <= '0;
      fk      <= '0;
      f_pend  <= 1'b0;
      wf_v    <= 1'b0;
      wf      <= '0;
      wcur    <= '0;
      wcur_x  <= 1'b0;
      wcur_k  <= '0;
      jj      <= '0;
      rd_pend <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;

      // weight fetcher
      if (f_issue && mrsp.gnt) f_pend <= 1'b1;
      if (f_pend && mrsp.rvalid) begin
        f_pend <= 1'b0;
        wf     <= mrsp.rdata;
        wf_v   <= 1'b1;
        fk     <= fk + 17'd1;
      end

      unique case (st)
        S_IDLE: if (cmd_valid) begin
          c    <= cmd;
          idx  <= '0;
          nx   <= (cmd.op == OP_HPART) ? 17'd0 : 17'(cmd.n);
          klen <= ((cmd.op == OP_HPART) ? 17'd0 : 17'(cmd.n)) +
                  ((cmd.op == OP_XPART) ? 17'd0 : 17'(cmd.m));
          st   <= (cmd.op == OP_HPART) ? S_LOADH_REQ : S_LOADX_REQ;
        end

        S_LOADX_REQ: if (mrsp.gnt) st <= S_LOADX_WAIT;
        S_LOADX_WAIT: if (mrsp.rvalid) begin
          if (idx + 1 == 32'(c.nvec) * 32'(c.n)) begin
            idx <= '0;
            st  <= (c.op == OP_XPART) ? S_ROW : S_LOADH_REQ;
          end else begin
            idx <= idx + 1;
            st  <= S_LOADX_REQ;
          end
        end

        S_LOADH_REQ: if (mrsp.gnt) st <= S_LOADH_WAIT;
        S_LOADH_WAIT: if (mrsp.rvalid) begin
          if (idx + 1 == 32'(c.nvec) * 32'(c.m)) begin
            idx <= '0;
            st  <= S_ROW;
          end else begin
            idx <= idx + 1;
            st  <= S_LOADH_REQ;
          end
        end

        S_ROW: begin
          j  <= '0;
          st <= (c.op == OP_XPART) ? S_INIT : S_BIAS_REQ;
        end

        S_BIAS_REQ: if (mrsp.gnt) st <= S_BIAS_WAIT;
        S_BIAS_WAIT: if (mrsp.rvalid) begin
          bias <= mrsp.rdata;
          st   <= (c.op == OP_HPART) ? S_P_REQ : S_INIT;
        end

        // accumulator start value of vector j: bias (+ partial sums) or zero
        S_INIT, S_P_WAIT: if (st == S_INIT || mrsp.rvalid) begin
          for (int g = 0; g < 4; g++) acc[jv][g] <= acc_init[g];
          if (j + 1 == c.nvec) begin
            j  <= '0;
            kk <= '0;
            fk <= '0;
            st <= S_MAC_WAIT;
          end else begin
            j  <= j + 1;
            st <= (c.op == OP_HPART) ? S_P_REQ : S_INIT;
          end
        end
        S_P_REQ: if (mrsp.gnt) st <= S_P_WAIT;

        S_MAC_WAIT: if (wf_v) begin
          wcur   <= wf;
          wf_v   <= 1'b0;
          wcur_x <= (kk < nx);
          wcur_k <= (kk < nx) ? kk[15:0] : 16'(kk - nx);
          jj     <= '0;
          st     <= S_MAC_RUN;
        end

        // cycle jj reads vector jj from the buffer; vector jj-1 is multiplied
        S_MAC_RUN: begin
          if (jj != 0) begin
            for (int g = 0; g < 4; g++)
              acc[jm][g] <= acc[jm][g] + qmul(q88_t'(wcur[g*QW +: QW]), vin);
          end
          if (jj == 17'(c.nvec)) begin
            if (kk + 1 == klen) begin
              j  <= '0;
              st <= (c.op == OP_XPART) ? S_WR_P : S_C_REQ;
            end else begin
              kk <= kk + 1;
              st <= S_MAC_WAIT;
            end
          end else begin
            jj <= jj + 1;
          end
        end

        S_C_REQ: if (mrsp.gnt) st <= S_C_WAIT;
        S_C_WAIT: if (mrsp.rvalid) begin
          cprev <= q88_t'(mrsp.rdata[QW-1:0]);
          st    <= S_WR_C;
        end
        S_WR_C: if (mrsp.gnt) st <= S_WR_H;
        S_WR_H, S_WR_P: if (mrsp.gnt) begin
          if (j + 1 == c.nvec) begin
            j <= '0;
            if (r + 1 == c.m) begin
              r  <= '0;
              st <= S_DONE;
            end else begin
              r  <= r + 1;
              st <= S_ROW;
            end
          end else begin
            j  <= j + 1;
            st <= (st == S_WR_P) ? S_WR_P : S_C_REQ;
          end
        end

        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase

      // read bookkeeping of the main FSM
      if (!in_mac && mreq.req && !mreq.we && mrsp.gnt) rd_pend <= 1'b1;
      if (rd_pend && mrsp.rvalid) rd_pend <= 1'b0;
    end
  end

  // The fetcher and the main FSM never wait for a read at the same time.
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_pend && f_pend));
endmodule
