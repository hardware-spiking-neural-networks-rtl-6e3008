// sc_synapse - sigma dynamic synapse built from stochastic computing
// (SC-Synapse).
//
// Discrete form of the synapse: I(t+1) = I(t) A_I + B w  after a presynaptic
// spike, and I(t+1) = I(t) A_I otherwise, with A_I = 1 - h/tau and
// B = h C / tau (= 1 for h = 0.1 ms, C = 100, tau = 10 ms). Per time step,
// during one bitstream period:
//   * no spike pending: an AND gate multiplies the I(t) and A_I bitstreams and a
//     counter reads the product back, I(t+1) = I(t) A_I;
//   * spike pending: a MUX with a one-half select adds the I(t) and w(t)
//     bitstreams (input 1 = I(t), input 0 = w(t)); the counter doubles its count,
//     I(t+1) = I(t) + w(t), saturating at 1.0.
// A pre_spike pulse is remembered until the next step uses it.
// i_syn full scale is 1 nA; w full scale is a weight of 1.0.
// The AND/MUX structure and the constants follow the source design; the
// spike latch, the one-period timing, the doubling decode and the saturation
// are this design's choices.
// Timing: step starts an update that takes L + 2 cycles (L = 2^N - 1); i_syn
// changes on the last of them; busy is high meanwhile. step must not come
// while busy.
module sc_synapse #(
  parameter int unsigned N   = sc_pkg::SC_N,
  parameter int unsigned A_I = sc_pkg::to_fix(1.0 - 0.1 / 10.0, N)  // 1 - h/tau
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic         pre_spike,
  input  logic [N-1:0] w,
  output logic [N-1:0] i_syn,
  output logic         busy
);
  localparam logic [N-1:0] LAST = '1;

  logic         pre_pend, add_mode, running;
  logic [N-1:0] pcnt, i_next;
  logic         s_i, s_w, s_a, s_half, s_dec, s_add, s_bit;
  logic         cnt_clr, cnt_en, load;
  sc_pkg::dec_mode_e mode;

  sc_sng #(.N(N), .SEED(sc_pkg::seed(7, N))) u_sng_i    (.clk, .rst_n, .x(i_syn),          .sn(s_i));
  sc_sng #(.N(N), .SEED(sc_pkg::seed(2, N))) u_sng_w    (.clk, .rst_n, .x(w),              .sn(s_w));
  sc_sng #(.N(N), .SEED(sc_pkg::seed(1, N))) u_sng_a    (.clk, .rst_n, .x(N'(A_I)),        .sn(s_a));
  sc_sng #(.N(N), .SEED(sc_pkg::seed(3, N))) u_sng_half (.clk, .rst_n, .x(N'(1 << (N-1))), .sn(s_half));

  sc_element #(.OP(sc_pkg::SCE_AND)) u_decay (.a(s_i), .b(s_a), .d(1'b0),   .c(s_dec));
  sc_element #(.OP(sc_pkg::SCE_ADD)) u_add   (.a(s_i), .b(s_w), .d(s_half), .c(s_add));

  assign s_bit = add_mode ? s_add : s_dec;
  assign mode  = add_mode ? sc_pkg::DEC_ADD : sc_pkg::DEC_UNI;

  sc_counter #(.N(N)) u_cnt (
    .clk, .rst_n, .clr(cnt_clr), .en(cnt_en), .bit_i(s_bit),
    .mode, .count(), .value(i_next)
  );

  assign cnt_clr = step && !running;
  assign cnt_en  = running && (pcnt != LAST);
  assign load    = running && (pcnt == LAST);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running  <= 1'b0;
      pcnt     <= '0;
      add_mode <= 1'b0;
      pre_pend <= 1'b0;
      i_syn    <= '0;
    end else begin
      if (cnt_clr) begin
        running  <= 1'b1;
        pcnt     <= '0;
        add_mode <= pre_pend;
      end else if (load) begin
        running <= 1'b0;
        i_syn   <= i_next;
      end else if (cnt_en) begin
        pcnt <= pcnt + N'(1);
      end
      // A spike arriving in the cycle its predecessor is consumed stays pending.
      if (pre_spike)    pre_pend <= 1'b1;
      else if (cnt_clr) pre_pend <= 1'b0;
    end
  end

  assign busy = running;

  a_step_idle : assert property (@(posedge clk) disable iff (!rst_n) step |-> !running);
endmodule
