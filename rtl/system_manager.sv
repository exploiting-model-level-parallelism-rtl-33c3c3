// system_manager: the accelerator's link to the host.
//
// The host reaches the FPGA through a PCIe stream; the system manager turns
// the host's word requests into main-memory accesses (loading the model's
// parameters and inputs during initialisation, reading the outputs back
// afterwards) and into accesses to its own control registers, which hold the
// computing mode and the job descriptions and start the accelerator.
//
// Host port: a request (host_valid, host_we, host_addr, host_wdata) is
// accepted with host_ready; a read is answered by host_rvalid/host_rdata.
// One request is handled at a time. host_addr bit 31 = 0 addresses main
// memory (64-bit word address); bit 31 = 1 addresses a register, index in
// bits 11:0:
//   0x000  control  write: bit 0 start, bits 2:1 mode; read: bit 0 busy,
//                   bit 1 done (sticky, cleared by start), bits 3:2 mode
//   0x010 + 0x40*j  job j: +0 nlayers, +1 T, +2 batch B, +3 reuse,
//                   +8+9*l layer l: n, m, wx, wh, b, in, h, c, p base
//   0x100 + 4*c + s profiler count of core c, state s (lstm_pkg order)
//   0x110           profiler total cycles
//   0x120           slots; 0x121/0x122 idle slots core 0/1;
//                   0x123/0x124 barrier wait cycles core 0/1
// Register reads answer in the next cycle. Memory accesses go over the
// shared bus; a memory read is answered when its data returns.
//
// From the document: that the system manager moves host data into main
// memory and the results back. The register map, the host port and the way
// jobs are described are this design's own.
module system_manager
  import lstm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // host side (PCIe stream)
  input  logic        host_valid,
  output logic        host_ready,
  input  logic        host_we,
  input  logic [31:0] host_addr,
  input  word_t       host_wdata,
  output logic        host_rvalid,
  output word_t       host_rdata,
  // main-memory bus
  output mem_req_t    mreq,
  input  mem_rsp_t    mrsp,
  // accelerator control
  output logic        start,
  output mode_e       mode,
  output job_cfg_t    jobs [2],
  input  logic        busy,
  input  logic        done,
  input  logic [31:0] prof_cnt [2][4],
  input  logic [31:0] prof_total,
  input  logic [31:0] slots,
  input  logic [31:0] idle_slots [2],
  input  logic [31:0] sync_wait [2]
);
  typedef enum logic [1:0] { M_IDLE, M_MEM, M_MEMWAIT, M_REG } mstate_e;

  mstate_e     st;
  logic        we_q;
  logic [31:0] addr_q;
  word_t       wdata_q;
  logic        done_flag;

  assign host_ready = (st == M_IDLE);

  always_comb begin
    mreq       = '0;
    mreq.req   = (st == M_MEM);
    mreq.we    = we_q;
    mreq.addr  = addr_t'(addr_q[30:0]);
    mreq.wdata = wdata_q;
  end

  // register read
  function automatic logic [31:0] layer_field(layer_desc_t ld, int f);
    unique case (f)
      0: return 32'(ld.n);
      1: return 32'(ld.m);
      2: return ld.wx_base;
      3: return ld.wh_base;
      4: return ld.b_base;
      5: return ld.in_base;
      6: return ld.h_base;
      7: return ld.c_base;
      default: return ld.p_base;
    endcase
  endfunction

  logic [31:0] rreg;
  always_comb begin
    logic [11:0] a;
    int jn, o;
    a    = addr_q[11:0];
    jn   = (int'(a) - 'h10) / 'h40;
    o    = (int'(a) - 'h10) % 'h40;
    rreg = '0;
    if (a == 12'h000) rreg = {28'd0, 2'(mode), done_flag, busy};
    else if (a >= 12'h010 && a < 12'h090) begin
      if (o == 0)      rreg = 32'(jobs[jn].nlayers);
      else if (o == 1) rreg = 32'(jobs[jn].t);
      else if (o == 2) rreg = 32'(jobs[jn].b);
      else if (o == 3) rreg = 32'(jobs[jn].reuse);
      else if (o >= 8 && o < 8 + 9*int'(LMAX))
        rreg = layer_field(jobs[jn].layer[(o-8)/9], (o-8)%9);
    end
    else if (a >= 12'h100 && a < 12'h108) rreg = prof_cnt[a[2]][a[1:0]];
    else if (a == 12'h110) rreg = prof_total;
    else if (a == 12'h120) rreg = slots;
    else if (a == 12'h121) rreg = idle_slots[0];
    else if (a == 12'h122) rreg = idle_slots[1];
    else if (a == 12'h123) rreg = sync_wait[0];
    else if (a == 12'h124) rreg = sync_wait[1];
  end

  // decoded register write address: job, offset in job, layer, field
  logic [11:0] wa;
  logic        wj;
  int          wo, wl, wf;
  always_comb begin
    int rel;
    wa  = host_addr[11:0];
    rel = int'(wa) - 'h10;
    wj  = rel[6];
    wo  = rel % 'h40;
    wl  = (wo - 8) / 9;
    wf  = (wo - 8) % 9;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= M_IDLE;
      we_q        <= 1'b0;
      addr_q      <= '0;
      wdata_q     <= '0;
      host_rvalid <= 1'b0;
      host_rdata  <= '0;
      start       <= 1'b0;
      mode        <= MODE_MP;
      jobs[0]     <= '0;
      jobs[1]     <= '0;
      done_flag   <= 1'b0;
    end else begin
      host_rvalid <= 1'b0;
      start       <= 1'b0;
      if (done) done_flag <= 1'b1;
      unique case (st)
        M_IDLE: if (host_valid) begin
          we_q    <= host_we;
          addr_q  <= host_addr;
          wdata_q <= host_wdata;
          if (!host_addr[31]) st <= M_MEM;
          else if (host_we) begin
            // register write
            if (wa == 12'h000) begin
              mode <= mode_e'(host_wdata[2:1]);
              if (host_wdata[0] && !busy) begin
                start     <= 1'b1;
                done_flag <= 1'b0;
              end
            end else if (wa >= 12'h010 && wa < 12'h090) begin
              if (wo == 0)      jobs[wj].nlayers <= host_wdata[2:0];
              else if (wo == 1) jobs[wj].t       <= host_wdata[15:0];
              else if (wo == 2) jobs[wj].b       <= host_wdata[15:0];
              else if (wo == 3) jobs[wj].reuse   <= host_wdata[7:0];
              else if (wo >= 8 && wo < 8 + 9*int'(LMAX)) begin
                unique case (wf)
                  0: jobs[wj].layer[wl].n       <= host_wdata[15:0];
                  1: jobs[wj].layer[wl].m       <= host_wdata[15:0];
                  2: jobs[wj].layer[wl].wx_base <= host_wdata[31:0];
                  3: jobs[wj].layer[wl].wh_base <= host_wdata[31:0];
                  4: jobs[wj].layer[wl].b_base  <= host_wdata[31:0];
                  5: jobs[wj].layer[wl].in_base <= host_wdata[31:0];
                  6: jobs[wj].layer[wl].h_base  <= host_wdata[31:0];
                  7: jobs[wj].layer[wl].c_base  <= host_wdata[31:0];
                  default: jobs[wj].layer[wl].p_base <= host_wdata[31:0];
                endcase
              end
            end
          end else st <= M_REG;
        end
        M_REG: begin
          host_rvalid <= 1'b1;
          host_rdata  <= word_t'(rreg);
          st          <= M_IDLE;
        end
        M_MEM: if (mrsp.gnt) st <= we_q ? M_IDLE : M_MEMWAIT;
        M_MEMWAIT: if (mrsp.rvalid) begin
          host_rvalid <= 1'b1;
          host_rdata  <= mrsp.rdata;
          st          <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
