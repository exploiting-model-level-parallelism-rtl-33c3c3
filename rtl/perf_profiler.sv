// perf_profiler: hardware run-time profiler of the cores.
//
// For each core it classifies every cycle of a run into one of four states
// (computing only, memory operation only, both, neither) and counts the
// cycles of each, plus the total cycles of the run. These are the figures
// behind an execution-time breakdown: for one core a state's share is its
// count over the total; for the dual-core system the two cores' counts are
// averaged. Counting runs while `enable` is high; `clear` zeroes all
// counters (clear wins over enable). Counters are 32 bits and wrap.
//
// The four states and the "state machines and counters" structure follow the
// document; what counts as computing or memory activity is defined by the
// busy_compute/busy_mem signals of lstm_core.
module perf_profiler
  import lstm_pkg::*;
#(
  parameter int unsigned NC = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        enable,
  input  logic [NC-1:0] busy_compute,
  input  logic [NC-1:0] busy_mem,
  output prof_state_e state [NC],
  output logic [31:0] cnt [NC][4],
  output logic [31:0] total
);
  always_comb begin
    for (int c = 0; c < NC; c++) begin
      unique case ({busy_compute[c], busy_mem[c]})
        2'b10:   state[c] = PS_COMPUTE;
        2'b01:   state[c] = PS_MEMORY;
        2'b11:   state[c] = PS_BOTH;
        default: state[c] = PS_NEITHER;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      total <= '0;
      for (int c = 0; c < NC; c++)
        for (int s = 0; s < 4; s++) cnt[c][s] <= '0;
    end else if (clear) begin
      total <= '0;
      for (int c = 0; c < NC; c++)
        for (int s = 0; s < 4; s++) cnt[c][s] <= '0;
    end else if (enable) begin
      total <= total + 32'd1;
      for (int c = 0; c < NC; c++)
        cnt[c][state[c]] <= cnt[c][state[c]] + 32'd1;
    end
  end
endmodule
