// sc_snn - spiking neural network built entirely from stochastic computing
// (SC-SNN), with on-line pair-based STDP learning.
//
// Structure: N_PRE input neurons, N_POST output neurons, and one synapse with
// its own learning rule for every (input, output) pair, fully connected.
// Synapse s = j * N_PRE + k joins input k to output j:
//   i_ext[k] -> presynaptic SC-IF neuron k -> pre_spike[k]
//   pre_spike[k], weight[s] -> SC-Synapse s -> i_syn[s]
//   pre_spike[k], post_spike[j] -> SC-PSTDP s -> weight[s], x_trace[s], y_trace[s]
// Output neuron j is fed by the synaptic currents of row j, and its spike goes
// back to the learning rules of that row. The default N_PRE = N_POST = 1 is
// the two-neuron, one-synapse network; larger N_PRE gives the N_PRE x 1
// networks, and N_POST > 1 the two-layer networks with several outputs.
//
// Time: a step counter raises step once every STEP_CYCLES clock cycles; one
// step is one Euler step of h = 0.1 ms, so 10 000 cycles at 100 MHz run the
// network in real time. On step every block starts its bitstream period(s):
// neurons and synapses need L + 2 or L + 3 cycles, SC-PSTDP up to 2L + 4
// (L = 2^N - 1 = 4095), so STEP_CYCLES must be at least 2L + 5. A spike produced
// in step t is used by synapse and learning rule in step t + 1. Synapse and
// postsynaptic neuron read the weight and the current held from the previous
// step, because both registers change only at the end of a step's first period
// or later.
//
// With several inputs an output neuron sees the sum of its synaptic
// currents, clamped to full scale (1 nA). The block structure and all model
// constants follow the source design; the global step counter, the spike
// timing between blocks, the current summation and the N_POST generalisation
// are this design's choices.
module sc_snn #(
  parameter int unsigned N_PRE        = 1,
  parameter int unsigned N_POST       = 1,
  parameter int unsigned N            = sc_pkg::SC_N,
  parameter int unsigned STEP_CYCLES  = 10000,
  parameter real         H_MS         = 0.1,     // Euler time step
  parameter real         TAU_MS       = 10.0,    // synapse time constant
  parameter real         TAU_PLUS_MS  = 10.0,    // presynaptic trace time constant
  parameter real         TAU_MINUS_MS = 10.0,    // postsynaptic trace time constant
  parameter real         TAU_M_MS     = 10.0,    // membrane time constant
  parameter real         RM_MOHM      = 10.0,    // membrane resistance
  parameter real         C_SYN        = 100.0,   // synapse constant C (B = h C / tau must be 1)
  parameter real         B_I          = 0.3994,  // depression amplitude
  parameter real         B_J          = 0.3994,  // potentiation amplitude
  parameter real         V_TH_MV      = 0.9,     // threshold, fraction of the 1 mV full scale
  parameter real         V_REST_MV    = 0.0,     // resting potential
  parameter real         TRACE_INC    = 0.5,     // trace jump per spike
  parameter real         W_INIT       = 0.5,     // initial weight
  localparam int unsigned N_SYN       = N_PRE * N_POST
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_PRE-1:0][N-1:0] i_ext,
  output logic                    step,
  output logic [N_PRE-1:0]        pre_spike,
  output logic [N_POST-1:0]       post_spike,
  output logic [N_PRE-1:0][N-1:0] v_pre,
  output logic [N_POST-1:0][N-1:0] v_post,
  output logic [N_SYN-1:0][N-1:0] i_syn,
  output logic [N_SYN-1:0][N-1:0] weight,
  output logic [N_SYN-1:0][N-1:0] x_trace,
  output logic [N_SYN-1:0][N-1:0] y_trace
);
  localparam int unsigned L      = (1 << N) - 1;
  localparam int unsigned GAIN   = sc_pkg::to_fix(H_MS * RM_MOHM / TAU_M_MS, N);
  localparam int unsigned V_TH   = sc_pkg::to_fix(V_TH_MV, N);
  localparam int unsigned V_REST = sc_pkg::to_fix(V_REST_MV, N);
  localparam int unsigned A_SYN  = sc_pkg::to_fix(1.0 - H_MS / TAU_MS, N);
  localparam int unsigned A_J    = sc_pkg::to_fix(1.0 - H_MS / TAU_PLUS_MS, N);
  localparam int unsigned A_I    = sc_pkg::to_fix(1.0 - H_MS / TAU_MINUS_MS, N);
  localparam int unsigned B_I_FX = sc_pkg::to_fix(B_I, N);
  localparam int unsigned B_J_FX = sc_pkg::to_fix(B_J, N);
  localparam int unsigned INC_FX = sc_pkg::to_fix(TRACE_INC, N);
  localparam int unsigned W0_FX  = sc_pkg::to_fix(W_INIT, N);
  localparam int unsigned SUM_W  = N + $clog2(N_PRE + 1);

  // The synapse adds w itself on a spike, which is Eq. I(t+1) = I A + B w only for B = 1.
  localparam real B_SYN = H_MS * C_SYN / TAU_MS;

  logic [31:0]         step_cnt;
  logic [N_PRE-1:0]    pre_busy;
  logic [N_SYN-1:0]    syn_busy, stdp_busy;
  logic [N_POST-1:0]   post_busy;
  logic [N_POST-1:0][N-1:0] i_post;

  // ---- time-step generator
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step_cnt <= '0;
      step     <= 1'b0;
    end else begin
      step <= (step_cnt == STEP_CYCLES - 1);
      if (step_cnt == STEP_CYCLES - 1) step_cnt <= '0;
      else                             step_cnt <= step_cnt + 32'd1;
    end
  end

  // ---- input layer
  for (genvar k = 0; k < N_PRE; k++) begin : g_in
    sc_if_neuron #(.N(N), .GAIN(GAIN), .V_TH(V_TH), .V_REST(V_REST)) u_pre (
      .clk, .rst_n, .step, .i_in(i_ext[k]), .spike(pre_spike[k]), .v_m(v_pre[k]),
      .busy(pre_busy[k])
    );
  end

  // ---- synapses and learning rules, one per (output j, input k)
  for (genvar j = 0; j < N_POST; j++) begin : g_out
    for (genvar k = 0; k < N_PRE; k++) begin : g_syn
      localparam int unsigned S = j * N_PRE + k;

      sc_synapse #(.N(N), .A_I(A_SYN)) u_syn (
        .clk, .rst_n, .step, .pre_spike(pre_spike[k]), .w(weight[S]), .i_syn(i_syn[S]),
        .busy(syn_busy[S])
      );

      sc_pstdp #(
        .N(N), .A_J(A_J), .A_I(A_I), .B_I(B_I_FX), .B_J(B_J_FX), .INC(INC_FX), .W_INIT(W0_FX)
      ) u_stdp (
        .clk, .rst_n, .step, .pre_spike(pre_spike[k]), .post_spike(post_spike[j]),
        .w(weight[S]), .x_trace(x_trace[S]), .y_trace(y_trace[S]), .busy(stdp_busy[S])
      );
    end

    // output neuron input: clamped sum of the row's synaptic currents
    always_comb begin
      logic [SUM_W-1:0] i_sum;
      i_sum = '0;
      for (int k = 0; k < N_PRE; k++) i_sum = i_sum + SUM_W'(i_syn[j * N_PRE + k]);
      i_post[j] = (i_sum > SUM_W'(L)) ? N'(L) : i_sum[N-1:0];
    end

    sc_if_neuron #(.N(N), .GAIN(GAIN), .V_TH(V_TH), .V_REST(V_REST)) u_post (
      .clk, .rst_n, .step, .i_in(i_post[j]), .spike(post_spike[j]), .v_m(v_post[j]),
      .busy(post_busy[j])
    );
  end

  // A time step must leave room for the longest learning-rule pass.
  initial begin
    assert (STEP_CYCLES >= 2 * L + 5) else $error("STEP_CYCLES shorter than 2L + 5");
    assert (B_SYN > 0.999 && B_SYN < 1.001) else $error("h C / tau must be 1 for the SC-Synapse");
  end

  a_idle_at_step : assert property (@(posedge clk) disable iff (!rst_n)
    step |-> !(|pre_busy) && !(|syn_busy) && !(|stdp_busy) && !(|post_busy));
endmodule
