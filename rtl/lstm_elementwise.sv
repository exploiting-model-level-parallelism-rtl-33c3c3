// lstm_elementwise: gate activations and element-wise part of one LSTM
// cell row.
//
// Takes the four gate pre-activations of one row (bias and both
// matrix-vector products already summed, Q8.8) and the previous cell state,
// and forms
//   i = sigma(zi), f = sigma(zf), o = sigma(zo), g = tanh(zc)
//   c_t = f*c_{t-1} + i*g
//   h_t = o*tanh(c_t)
// which is the data flow of an LSTM layer after its vector additions. Each
// product is truncated back to Q8.8 and saturated. Purely combinational; the
// core registers the results.
module lstm_elementwise
  import lstm_pkg::*;
(
  input  q88_t z_i,
  input  q88_t z_f,
  input  q88_t z_o,
  input  q88_t z_c,
  input  q88_t c_prev,
  output q88_t c_out,
  output q88_t h_out
);
  q88_t a_i, a_f, a_o, a_g, tanh_c;

  lstm_act u_act_i (.is_tanh(1'b0), .x(z_i),   .y(a_i));
  lstm_act u_act_f (.is_tanh(1'b0), .x(z_f),   .y(a_f));
  lstm_act u_act_o (.is_tanh(1'b0), .x(z_o),   .y(a_o));
  lstm_act u_act_g (.is_tanh(1'b1), .x(z_c),   .y(a_g));
  lstm_act u_act_h (.is_tanh(1'b1), .x(c_out), .y(tanh_c));

  always_comb begin
    c_out = sat_q88(qmul(a_f, c_prev) + qmul(a_i, a_g));
    h_out = sat_q88(qmul(a_o, tanh_c));
  end
endmodule
