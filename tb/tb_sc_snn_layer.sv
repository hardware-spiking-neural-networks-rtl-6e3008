// tb_sc_snn_layer - a fully connected two-layer network with several outputs:
// 6 input neurons, 3 output neurons and 18 learning synapses (sc_snn with
// N_PRE = 6, N_POST = 3).
//
// Input k is driven with (k + 2) / 10 nA, so the six inputs fire at different
// rates. All synapses start from the same weight and all instances use the same
// generator seeds, so the three rows of synapses, and the three output neurons,
// must stay bit-identical for the whole run: the test compares every
// output spike, potential, current, weight and trace of rows 1 and 2 with row 0.
// It also checks the row summation: between two steps, output neuron 0 must
// move by 0.1 mV/nA times the clamped sum of its six synaptic currents (within
// 20 codes), or be back at rest after a spike. Counted mechanisms, each
// required at least once: output spikes, a row sum that saturates at 1 nA,
// potentiated and depressed weights. A step is shortened to 8 200 cycles (the
// minimum is 2 * 4095 + 5) to keep the run short.
module tb_sc_snn_layer;
  localparam int N = 12;
  localparam int L = (1 << N) - 1;
  localparam int NP = 6;
  localparam int NO = 3;
  localparam int NS = NP * NO;
  localparam int NSTEPS = 200;
  localparam int STEP = 8200;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  logic [NP-1:0][N-1:0] i_ext, v_pre;
  logic [NS-1:0][N-1:0] i_syn, weight, x_trace, y_trace;
  logic [NO-1:0][N-1:0] v_post;
  logic [NP-1:0]        pre_spike;
  logic [NO-1:0]        post_spike;
  logic                 step;

  always #5 clk = ~clk;

  sc_snn #(.N_PRE(NP), .N_POST(NO), .STEP_CYCLES(STEP)) dut (
    .clk, .rst_n, .i_ext, .step, .pre_spike, .post_spike, .v_pre, .v_post, .i_syn, .weight,
    .x_trace, .y_trace
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  initial begin : watchdog
    repeat ((NSTEPS + 5) * STEP) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_post, n_sat, n_pot, n_dep, row_diff, spike_diff;
    int v_prev, sum_prev, sum, expect_v;
    bit post_seen;
    for (int k = 0; k < NP; k++) i_ext[k] = 12'(sc_pkg::to_fix(real'(k + 2) / 10.0, N));
    n_post = 0; n_sat = 0; n_pot = 0; n_dep = 0; row_diff = 0; spike_diff = 0;
    v_prev = 0; sum_prev = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < NSTEPS; s++) begin
      post_seen = 0;
      do begin
        @(posedge clk);
        for (int j = 1; j < NO; j++) if (post_spike[j] != post_spike[0]) spike_diff++;
        if (post_spike[0]) begin
          post_seen = 1;
          n_post++;
        end
      end while (!step);
      // all blocks are idle here; the registers hold the results of step s - 1
      for (int j = 1; j < NO; j++) begin
        if (v_post[j] != v_post[0]) row_diff++;
        for (int k = 0; k < NP; k++)
          if (i_syn[j*NP+k] != i_syn[k] || weight[j*NP+k] != weight[k] ||
              x_trace[j*NP+k] != x_trace[k] || y_trace[j*NP+k] != y_trace[k]) row_diff++;
      end
      sum = 0;
      for (int k = 0; k < NP; k++) sum += int'(i_syn[k]);
      if (sum > L) begin
        sum = L;
        n_sat++;
      end
      if (s >= 2) begin
        if (post_seen) check(v_post[0] == 0, $sformatf("step %0d: output back at rest", s));
        else begin
          expect_v = v_prev + int'(0.1 * real'(sum_prev) + 0.5);
          check(iabs(int'(v_post[0]) - expect_v) <= 20,
                $sformatf("step %0d: v_post %0d vs %0d + 0.1 * %0d", s, v_post[0], v_prev, sum_prev));
        end
      end
      for (int k = 0; k < NP; k++) begin
        if (weight[k] > 12'd2048) n_pot++;
        if (weight[k] < 12'd2048) n_dep++;
      end
      v_prev = int'(v_post[0]);
      sum_prev = sum;
    end
    $display("output spikes %0d, saturated row sums %0d, potentiated %0d, depressed %0d (synapse-steps)",
             n_post, n_sat, n_pot, n_dep);
    check(spike_diff == 0, $sformatf("output spikes identical in all rows (%0d differences)", spike_diff));
    check(row_diff == 0, $sformatf("rows 1 and 2 identical to row 0 (%0d differences)", row_diff));
    check(n_post > 0, "output neurons fire");
    check(n_sat > 0, "row sum saturates at 1 nA");
    check(n_pot > 0, "weights potentiated");
    check(n_dep > 0, "weights depressed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
