// sc_if_neuron - integrate-and-fire neuron built from stochastic computing
// (SC-IF).
//
// Forward-Euler form of the IF model: v(t+1) = v(t) + (h Rm / tau_m) I(t).
// Per time step, during one bitstream period:
//   * the input current i_in and the constant GAIN = h Rm / tau_m are turned
//     into bitstreams and multiplied by an AND gate;
//   * a MUX driven by a one-half bitstream adds that product to the bitstream of
//     v(t) (input 1 = v(t), input 0 = current, select = 0.5);
//   * a counter de-randomizes the sum and doubles it, giving v_m = v(t+1);
//   * a comparator tests v_m > V_TH; the neuron then fires one spike and
//     returns to V_REST, else v_m is kept.
// Sequencing is done by controller 1 (sc_if_ctrl).
// Scales: v_m full scale (all ones) is 1 mV, i_in full scale is 1 nA, so with
// h = 0.1 ms, Rm = 10 MOhm, tau_m = 10 ms the gain is 0.1 mV/nA. v_m saturates at
// 1 mV. The MUX/counter/comparator structure, the AND-gate multiplier and the
// constants follow the source design; the scales, the doubling decode and the
// saturation are this design's choices.
// Interface: step starts an update (L + 2 or L + 3 cycles, see sc_if_ctrl);
// spike is a one-cycle pulse at the end of a step; busy is high while updating.
module sc_if_neuron #(
  parameter int unsigned N      = sc_pkg::SC_N,
  parameter int unsigned GAIN   = sc_pkg::to_fix(0.1 * 10.0 / 10.0, N),  // h*Rm/tau_m in mV/nA
  parameter int unsigned V_TH   = sc_pkg::to_fix(0.9, N),                // 0.9 mV
  parameter int unsigned V_REST = 0                                      // 0 mV
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic [N-1:0] i_in,
  output logic         spike,
  output logic [N-1:0] v_m,
  output logic         busy
);
  logic [1:0]   state;
  logic         cnt_clr, cnt_en, v_load, gt;
  logic         s_v, s_i, s_g, s_half, s_ig, s_sum;
  logic [N-1:0] v_next;

  sc_sng #(.N(N), .SEED(sc_pkg::seed(4, N))) u_sng_v    (.clk, .rst_n, .x(v_m),            .sn(s_v));
  sc_sng #(.N(N), .SEED(sc_pkg::seed(7, N))) u_sng_i    (.clk, .rst_n, .x(i_in),           .sn(s_i));
  sc_sng #(.N(N), .SEED(sc_pkg::seed(11, N))) u_sng_gain (.clk, .rst_n, .x(N'(GAIN)),       .sn(s_g));
  sc_sng #(.N(N), .SEED(sc_pkg::seed(2, N))) u_sng_half (.clk, .rst_n, .x(N'(1 << (N-1))), .sn(s_half));

  sc_element #(.OP(sc_pkg::SCE_AND)) u_mul (.a(s_i), .b(s_g),  .d(1'b0),   .c(s_ig));
  sc_element #(.OP(sc_pkg::SCE_ADD)) u_add (.a(s_v), .b(s_ig), .d(s_half), .c(s_sum));

  sc_counter #(.N(N)) u_cnt (
    .clk, .rst_n, .clr(cnt_clr), .en(cnt_en), .bit_i(s_sum),
    .mode(sc_pkg::DEC_ADD), .count(), .value(v_next)
  );

  assign gt = (v_next > N'(V_TH));

  sc_if_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .step, .gt, .state, .cnt_clr, .cnt_en, .v_load, .spike
  );

  always_ff @(posedge clk) begin
    if (!rst_n)      v_m <= N'(V_REST);
    else if (spike)  v_m <= N'(V_REST);
    else if (v_load) v_m <= v_next;
  end

  assign busy = (state != 2'd0);
endmodule
