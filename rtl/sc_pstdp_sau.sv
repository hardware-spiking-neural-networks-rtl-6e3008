// sc_pstdp_sau - stochastic arithmetic unit of the SC-PSTDP learning rule.
//
// Pure gate network on bitstreams (every input and output is a bitstream):
//   x_dec = x_j A_j                    trace decay (AND)
//   y_dec = y_i A_i                    trace decay (AND)
//   x_inc = (x_j A_j + inc) / 2        trace decay plus spike increment (MUX)
//   y_inc = (y_i A_i + inc) / 2
//   w_dep = MUX(0.5; w, NOT(y_i A_i B_i))   read as bipolar: (w - y_i A_i B_i) / 2
//   w_pot = MUX(0.5; w, x_j A_j B_j)        read as unipolar: (w + x_j A_j B_j) / 2
// The weight part - four AND gates, one NOT gate and two MUXes with w at input
// 1 and 0.5 as select - follows the source design. The two trace-increment
// MUXes are this design's addition, to form x A + inc in the same way.
module sc_pstdp_sau (
  input  logic s_x,
  input  logic s_y,
  input  logic s_w,
  input  logic s_aj,
  input  logic s_ai,
  input  logic s_bi,
  input  logic s_bj,
  input  logic s_inc,
  input  logic s_half,
  output logic x_dec,
  output logic y_dec,
  output logic x_inc,
  output logic y_inc,
  output logic w_dep,
  output logic w_pot
);
  logic y_ab, x_ab;

  sc_element #(.OP(sc_pkg::SCE_AND)) u_xa   (.a(s_x),   .b(s_aj),  .d(1'b0),   .c(x_dec));
  sc_element #(.OP(sc_pkg::SCE_AND)) u_ya   (.a(s_y),   .b(s_ai),  .d(1'b0),   .c(y_dec));
  sc_element #(.OP(sc_pkg::SCE_AND)) u_yb   (.a(y_dec), .b(s_bi),  .d(1'b0),   .c(y_ab));
  sc_element #(.OP(sc_pkg::SCE_AND)) u_xb   (.a(x_dec), .b(s_bj),  .d(1'b0),   .c(x_ab));
  sc_element #(.OP(sc_pkg::SCE_SUB)) u_dep  (.a(s_w),   .b(y_ab),  .d(s_half), .c(w_dep));
  sc_element #(.OP(sc_pkg::SCE_ADD)) u_pot  (.a(s_w),   .b(x_ab),  .d(s_half), .c(w_pot));
  sc_element #(.OP(sc_pkg::SCE_ADD)) u_xinc (.a(x_dec), .b(s_inc), .d(s_half), .c(x_inc));
  sc_element #(.OP(sc_pkg::SCE_ADD)) u_yinc (.a(y_dec), .b(s_inc), .d(s_half), .c(y_inc));
endmodule
