// lstm_ref_pkg: reference arithmetic for the testbenches.
//
// Computes the LSTM cell in plain integer arithmetic, written independently
// of the RTL: Q8.8 values are ints scaled by 256, the activations are the
// piecewise-linear curves written out as integer formulas, and saturation is
// done with explicit limits. It also holds the memory-layout helpers that
// place a model into main memory.
package lstm_ref_pkg;

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // floor division by 256 of a product (arithmetic shift semantics)
  function automatic int qprod(int a, int b);
    longint p;
    p = longint'(a) * longint'(b);
    return sat16(p >>> 8);
  endfunction

  function automatic int sig_pos(int a);  // a >= 0, scaled by 256
    if (a >= 1280) return 256;
    if (a >= 608)  return a / 32 + 216;
    if (a >= 256)  return a / 8 + 160;
    return a / 4 + 128;
  endfunction

  function automatic int ref_sigmoid(int x);
    if (x < 0) return 256 - sig_pos(-x);
    return sig_pos(x);
  endfunction

  function automatic int ref_tanh(int x);
    return 2 * ref_sigmoid(2 * x) - 256;
  endfunction

  // one cell row: z values are Q8.8 pre-activations
  function automatic void ref_cell(input int zi, zf, zo, zc, cp, output int cn, hn);
    int i, f, o, g;
    i = ref_sigmoid(zi); f = ref_sigmoid(zf); o = ref_sigmoid(zo); g = ref_tanh(zc);
    cn = sat16((longint'(f) * cp + longint'(i) * g) >>> 8);
    hn = qprod(o, ref_tanh(cn));
  endfunction

  // pack four lanes into a memory word
  function automatic logic [63:0] pack4(int l0, l1, l2, l3);
    return {l3[15:0], l2[15:0], l1[15:0], l0[15:0]};
  endfunction

  function automatic int lane(logic [63:0] w, int g);
    return int'($signed(w[g*16 +: 16]));
  endfunction

endpackage
