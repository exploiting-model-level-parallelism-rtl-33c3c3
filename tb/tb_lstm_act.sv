// tb_lstm_act: sweeps the activation unit over the whole Q8.8 range and
// compares it with the exact sigmoid and tanh (computed with real
// arithmetic): the error must stay below 0.022 for sigmoid and 0.044 for
// tanh, and both outputs must be monotonic in x. Spot values with known
// results (0, +-1, saturation) are checked exactly.
module tb_lstm_act;
  import lstm_pkg::*;

  logic is_tanh;
  q88_t x, y;
  lstm_act dut (.is_tanh, .x, .y);

  int checks = 0, failures = 0;
  real worst [2];

  task automatic expect_exact(bit th, int xi, int yi);
    is_tanh = th; x = q88_t'(xi); #1;
    checks++;
    if (int'(y) != yi) begin
      failures++;
      $display("FAIL %s(%0d) = %0d expected %0d", th ? "tanh" : "sig", xi, int'(y), yi);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    worst[0] = 0; worst[1] = 0;
    for (int th = 0; th < 2; th++) begin
      int prev;
      prev = -100000;
      for (int xi = -32768; xi < 32768; xi += 7) begin
        real xr, ex, err;
        is_tanh = th[0]; x = q88_t'(xi); #1;
        xr = real'(xi) / 256.0;
        ex = th ? (($exp(xr) - $exp(-xr)) / ($exp(xr) + $exp(-xr))) : 1.0 / (1.0 + $exp(-xr));
        err = real'(int'(y)) / 256.0 - ex;
        if (err < 0) err = -err;
        if (err > worst[th]) worst[th] = err;
        checks++;
        if (err > (th ? 0.044 : 0.022) || int'(y) < prev) begin
          failures++;
          if (failures < 10) $display("FAIL %s(%f) = %f, exact %f", th ? "tanh" : "sig", xr, real'(int'(y))/256.0, ex);
        end
        prev = int'(y);
      end
    end
    $display("worst error: sigmoid %f tanh %f", worst[0], worst[1]);
    expect_exact(0, 0, 128);
    expect_exact(1, 0, 0);
    expect_exact(0, 256, 192);      // 1/8 + 0.625 = 0.75
    expect_exact(0, -256, 64);
    expect_exact(0, 32767, 256);
    expect_exact(0, -32768, 0);
    expect_exact(1, 32767, 256);
    expect_exact(1, -32768, -256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
