// lstm_act: activation function unit, sigmoid or tanh of one Q8.8 value.
//
// The accelerator needs sigma for the input, forget and output gates and tanh
// for the candidate cell value and for the cell state before the output
// multiply. Both are computed here by a piecewise-linear approximation, a
// choice of this design (the document does not give the function's
// implementation):
//   sigma(x) for a = |x|:  a >= 5      : 1
//                          a >= 2.375  : a/32 + 0.84375
//                          a >= 1      : a/8  + 0.625
//                          otherwise   : a/4  + 0.5
//   sigma(-x) = 1 - sigma(x),   tanh(x) = 2*sigma(2x) - 1
// The slopes are powers of two, so the unit is shifts and adds only.
// Largest error against the exact functions is about 0.02 (sigma) and
// 0.04 (tanh). Purely combinational.
module lstm_act
  import lstm_pkg::*;
(
  input  logic is_tanh,  // 0: sigmoid, 1: tanh
  input  q88_t x,
  output q88_t y
);
  logic signed [17:0] xi;   // argument of the sigmoid (x or 2x), Q8.8 widened
  logic        [17:0] a;    // |xi|
  logic        [17:0] s;    // sigma(|xi|), Q8.8
  logic        [17:0] sig;  // sigma(xi)

  always_comb begin
    xi  = is_tanh ? (18'(x) <<< 1) : 18'(x);
    a   = xi[17] ? 18'(-xi) : 18'(xi);
    if (a >= 18'd1280)      s = 18'd256;
    else if (a >= 18'd608)  s = (a >> 5) + 18'd216;
    else if (a >= 18'd256)  s = (a >> 3) + 18'd160;
    else                    s = (a >> 2) + 18'd128;
    sig = xi[17] ? (18'd256 - s) : s;
    if (is_tanh) y = q88_t'((sig << 1) - 18'd256);
    else         y = q88_t'(sig);
  end
endmodule
