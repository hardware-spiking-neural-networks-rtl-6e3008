// sc_pstdp - pair-based STDP learning rule built from stochastic computing
// (SC-PSTDP): controller 2, the stochastic number generators and the
// stochastic arithmetic unit, plus the trace and weight registers.
//
// Discrete rule, one pass per time step:
//   x_j(t+1) = x_j(t) A_j (+ inc on a presynaptic spike)     presynaptic trace
//   y_i(t+1) = y_i(t) A_i (+ inc on a postsynaptic spike)    postsynaptic trace
//   presynaptic spike:  w(t+1) = w(t) - y_i(t) A_i B_i        depression
//   postsynaptic spike: w(t+1) = w(t) + x_j(t) A_j B_j        potentiation
// with A = 1 - h/tau (h = 0.1 ms, tau+ = tau- = 10 ms) and B_i = B_j = 0.3994.
// Every register value is turned into a bitstream by its own generator; the
// arithmetic unit (sc_pstdp_sau) forms the products, sums and the difference
// with gates; three counters read the results back: one for x_j, one for y_i
// and one for the new weight (decoded bipolar for depression, doubled for
// potentiation, both clamped to [0, 1]). Controller 2 (sc_pstdp_ctrl) picks
// which stream each counter reads in each state:
//   S1: x <- x A_j, y <- y A_i;  S2: x <- x A_j + inc;  S4: y <- y A_i, w' <- dep;
//   S3: y <- y A_i + inc;  S5: x <- x A_j, w' <- pot;  S6: w <- w'.
// Thus each trace decays once per step and the weight change uses the trace of
// the other side, as the source design's arithmetic unit does.
// The gate network, the seven-state sequence and the constants follow the
// source design; the trace increment INC, the initial weight W_INIT, the use of
// A in the weight change (taken from the arithmetic-unit drawing rather than the
// equations, which omit it), the spike latches and the clamping are this
// design's choices.
// Interface: spike inputs are one-cycle pulses, remembered until a step uses
// them; step starts an update of L + 2 or 2L + 4 cycles (busy high). w changes
// only in S6, at the end of a spike step.
module sc_pstdp #(
  parameter int unsigned N      = sc_pkg::SC_N,
  parameter int unsigned A_J    = sc_pkg::to_fix(1.0 - 0.1 / 10.0, N),  // 1 - h/tau+
  parameter int unsigned A_I    = sc_pkg::to_fix(1.0 - 0.1 / 10.0, N),  // 1 - h/tau-
  parameter int unsigned B_I    = sc_pkg::to_fix(0.3994, N),
  parameter int unsigned B_J    = sc_pkg::to_fix(0.3994, N),
  parameter int unsigned INC    = sc_pkg::to_fix(0.5, N),              // trace jump per spike
  parameter int unsigned W_INIT = sc_pkg::to_fix(0.5, N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic         pre_spike,
  input  logic         post_spike,
  output logic [N-1:0] w,
  output logic [N-1:0] x_trace,
  output logic [N-1:0] y_trace,
  output logic         busy
);
  logic [2:0]   state;
  logic         cnt_clr, cnt_en, load, w_update, ack_pre, ack_post;
  logic         pre_pend, post_pend;
  logic         s_x, s_y, s_w, s_aj, s_ai, s_bi, s_bj, s_inc, s_half;
  logic         x_dec, y_dec, x_inc, y_inc, w_dep, w_pot;
  logic [N-1:0] x_val, y_val, w_val, w_new;
  sc_pkg::dec_mode_e x_mode, y_mode, w_mode;

  localparam logic [2:0] ST_S1 = 3'd1, ST_S2 = 3'd2, ST_S3 = 3'd3, ST_S4 = 3'd4, ST_S5 = 3'd5;

  sc_pstdp_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .step, .pre_pend, .post_pend, .state, .cnt_clr, .cnt_en,
    .load, .w_update, .ack_pre, .ack_post
  );

  sc_sng #(.N(N), .SEED(sc_pkg::seed(7, N))) u_sng_x    (.clk, .rst_n, .x(x_trace),        .sn(s_x));
  sc_sng #(.N(N), .SEED(sc_pkg::seed(8, N))) u_sng_y    (.clk, .rst_n, .x(y_trace),        .sn(s_y));
  sc_sng #(.N(N), .SEED(sc_pkg::seed(2, N))) u_sng_w    (.clk, .rst_n, .x(w),              .sn(s_w));
  sc_sng #(.N(N), .SEED(sc_pkg::seed(1, N))) u_sng_aj   (.clk, .rst_n, .x(N'(A_J)),        .sn(s_aj));
  sc_sng #(.N(N), .SEED(sc_pkg::seed(10, N))) u_sng_ai   (.clk, .rst_n, .x(N'(A_I)),        .sn(s_ai));
  sc_sng #(.N(N), .SEED(sc_pkg::seed(4, N))) u_sng_bi   (.clk, .rst_n, .x(N'(B_I)),        .sn(s_bi));
  sc_sng #(.N(N), .SEED(sc_pkg::seed(5, N))) u_sng_bj   (.clk, .rst_n, .x(N'(B_J)),        .sn(s_bj));
  sc_sng #(.N(N), .SEED(sc_pkg::seed(6, N))) u_sng_inc  (.clk, .rst_n, .x(N'(INC)),        .sn(s_inc));
  sc_sng #(.N(N), .SEED(sc_pkg::seed(9, N))) u_sng_half (.clk, .rst_n, .x(N'(1 << (N-1))), .sn(s_half));

  sc_pstdp_sau u_sau (
    .s_x, .s_y, .s_w, .s_aj, .s_ai, .s_bi, .s_bj, .s_inc, .s_half,
    .x_dec, .y_dec, .x_inc, .y_inc, .w_dep, .w_pot
  );

  assign x_mode = (state == ST_S2) ? sc_pkg::DEC_ADD : sc_pkg::DEC_UNI;
  assign y_mode = (state == ST_S3) ? sc_pkg::DEC_ADD : sc_pkg::DEC_UNI;
  assign w_mode = (state == ST_S4) ? sc_pkg::DEC_SUB : sc_pkg::DEC_ADD;

  sc_counter #(.N(N)) u_cnt_x (
    .clk, .rst_n, .clr(cnt_clr), .en(cnt_en), .bit_i((state == ST_S2) ? x_inc : x_dec),
    .mode(x_mode), .count(), .value(x_val)
  );
  sc_counter #(.N(N)) u_cnt_y (
    .clk, .rst_n, .clr(cnt_clr), .en(cnt_en), .bit_i((state == ST_S3) ? y_inc : y_dec),
    .mode(y_mode), .count(), .value(y_val)
  );
  sc_counter #(.N(N)) u_cnt_w (
    .clk, .rst_n, .clr(cnt_clr), .en(cnt_en), .bit_i((state == ST_S4) ? w_dep : w_pot),
    .mode(w_mode), .count(), .value(w_val)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_trace   <= '0;
      y_trace   <= '0;
      w         <= N'(W_INIT);
      w_new     <= N'(W_INIT);
      pre_pend  <= 1'b0;
      post_pend <= 1'b0;
    end else begin
      if (load) begin
        if (state == ST_S1 || state == ST_S2 || state == ST_S5) x_trace <= x_val;
        if (state == ST_S1 || state == ST_S3 || state == ST_S4) y_trace <= y_val;
        if (state == ST_S4 || state == ST_S5)                   w_new   <= w_val;
      end
      if (w_update) w <= w_new;
      if (pre_spike)     pre_pend  <= 1'b1;
      else if (ack_pre)  pre_pend  <= 1'b0;
      if (post_spike)    post_pend <= 1'b1;
      else if (ack_post) post_pend <= 1'b0;
    end
  end

  assign busy = (state != 3'd0);
endmodule
