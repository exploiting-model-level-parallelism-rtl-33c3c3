// tb_perf_profiler: drives random compute/memory activity for two cores,
// with enable and clear toggled, and compares all eight state counters and
// the total with counts kept by the testbench.
module tb_perf_profiler;
  import lstm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, enable;
  logic [1:0] busy_compute, busy_mem;
  prof_state_e state [2];
  logic [31:0] cnt [2][4];
  logic [31:0] total;
  perf_profiler #(.NC(2)) dut (.*);

  int checks = 0, failures = 0;
  int exp [2][4];
  int exp_total;

  task automatic check(string what, int got, int e);
    checks++;
    if (got != e) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, e); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; enable = 0; busy_compute = 0; busy_mem = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      exp = '{default: 0}; exp_total = 0;
      for (int i = 0; i < 2000; i++) begin
        @(negedge clk);
        enable = ($urandom % 8) != 0;
        busy_compute = 2'($urandom); busy_mem = 2'($urandom);
        if (enable) begin
          exp_total++;
          for (int c = 0; c < 2; c++) begin
            int s;
            s = busy_compute[c] ? (busy_mem[c] ? 1 : 0) : (busy_mem[c] ? 2 : 3);
            exp[c][s]++;
          end
        end
      end
      @(negedge clk); enable = 0;
      @(negedge clk);
      check("total", total, exp_total);
      for (int c = 0; c < 2; c++)
        for (int s = 0; s < 4; s++)
          check($sformatf("core %0d state %0d", c, s), cnt[c][s], exp[c][s]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
