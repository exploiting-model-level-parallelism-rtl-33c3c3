// tb_lstm_elementwise: drives random gate pre-activations and previous cell
// states into the element-wise unit and compares c_t and h_t with the
// integer reference model, including values that saturate.
module tb_lstm_elementwise;
  import lstm_pkg::*;
  import lstm_ref_pkg::*;

  q88_t zi, zf, zo, zc, cp, cn, hn;
  lstm_elementwise dut (.z_i(zi), .z_f(zf), .z_o(zo), .z_c(zc), .c_prev(cp),
                        .c_out(cn), .h_out(hn));

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int a, b, cc, d, e, ec, eh, span;
      span = (i < 4000) ? 1200 : 32767;
      a = int'($urandom % (2*span+1)) - span; b = int'($urandom % (2*span+1)) - span;
      cc = int'($urandom % (2*span+1)) - span; d = int'($urandom % (2*span+1)) - span;
      e = int'($urandom % 65536) - 32768;
      zi = q88_t'(a); zf = q88_t'(b); zo = q88_t'(cc); zc = q88_t'(d); cp = q88_t'(e);
      #1;
      ref_cell(a, b, cc, d, e, ec, eh);
      checks += 2;
      if (int'(cn) != ec || int'(hn) != eh) begin
        failures++;
        if (failures < 10)
          $display("FAIL z=(%0d %0d %0d %0d) c=%0d: got c=%0d h=%0d expected c=%0d h=%0d",
                   a, b, cc, d, e, int'(cn), int'(hn), ec, eh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
