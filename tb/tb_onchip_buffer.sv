// tb_onchip_buffer: writes random words to random addresses of the buffer
// while reading others, and compares every read (one cycle after its
// address) with a shadow copy, including read-first behaviour when the
// same address is read and written in one cycle.
module tb_onchip_buffer;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int D = 64;
  logic we;
  logic [5:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  onchip_buffer #(.WIDTH(16), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] shadow [D];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = 16'($urandom); shadow[i] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 6'($urandom); wdata = 16'($urandom);
      raddr = (i % 5 == 0) ? waddr : 6'($urandom);
      exp = shadow[raddr];
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      checks++;
      if (rdata !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d: got %h expected %h", raddr, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
