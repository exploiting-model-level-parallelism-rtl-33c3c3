// tb_mem_bus_arbiter: three masters issue random reads and writes, each to
// its own address region, through the arbiter to a memory model that stalls
// now and then. Each master holds its request until granted and waits for
// its read data. Checked: every read returns the data the master last
// wrote there (so answers reach the right master), a master never gets a
// rvalid it did not ask for, and round-robin keeps any master from waiting
// longer than a bound while the others are served.
module tb_mem_bus_arbiter;
  import lstm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NM = 3;
  mem_req_t m_req [NM];
  mem_rsp_t m_rsp [NM];
  mem_req_t s_req;
  mem_rsp_t s_rsp;
  logic [NM-1:0] wait_cycle;

  mem_bus_arbiter #(.NM(NM)) dut (.*);
  mem_model #(.DEPTH(4096), .LAT(3), .STALL_EVERY(4)) mem (.clk, .rst_n, .req(s_req), .rsp(s_rsp));

  int checks = 0, failures = 0;
  int contention = 0;
  int ops_done [NM];

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if ($countones(wait_cycle) > 0 && s_req.req) contention++;

  for (genvar mi = 0; mi < NM; mi++) begin : g_m
    initial begin
      word_t shadow [64];
      int waited;
      m_req[mi] = '0;
      ops_done[mi] = 0;
      foreach (shadow[i]) shadow[i] = '0;
      wait (rst_n);
      for (int op = 0; op < 300; op++) begin
        logic [5:0] a;
        @(negedge clk);
        a = 6'($urandom);
        m_req[mi].req = 1;
        m_req[mi].we = 1'($urandom);
        m_req[mi].addr = addr_t'(mi * 1024 + int'(a));
        m_req[mi].wdata = {$urandom, $urandom};
        waited = 0;
        @(posedge clk);
        while (!m_rsp[mi].gnt) begin waited++; @(posedge clk); end
        checks++;
        if (waited > 40) fail($sformatf("master %0d waited %0d cycles", mi, waited));
        if (m_req[mi].we) begin
          shadow[a] = m_req[mi].wdata;
          @(negedge clk); m_req[mi].req = 0;
        end else begin
          @(negedge clk); m_req[mi].req = 0;
          while (!m_rsp[mi].rvalid) @(negedge clk);
          checks++;
          if (m_rsp[mi].rdata !== shadow[a])
            fail($sformatf("master %0d read %0d: got %h expected %h", mi, a, m_rsp[mi].rdata, shadow[a]));
        end
        ops_done[mi]++;
        if ($urandom % 3 == 0) repeat ($urandom % 4) @(negedge clk);
      end
    end
  end

  // no unsolicited read data
  logic [NM-1:0] pend;
  always @(posedge clk) begin
    if (!rst_n) pend <= '0;
    else for (int i = 0; i < NM; i++) begin
      if (m_rsp[i].rvalid && !(pend[i])) fail($sformatf("master %0d got unrequested data", i));
      if (m_req[i].req && !m_req[i].we && m_rsp[i].gnt) pend[i] <= 1'b1;
      else if (m_rsp[i].rvalid) pend[i] <= 1'b0;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (ops_done[0] == 300 && ops_done[1] == 300 && ops_done[2] == 300);
    checks++;
    if (contention == 0) fail("no contention happened");
    $display("contention cycles %0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
