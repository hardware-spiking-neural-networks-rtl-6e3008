// tb_sc_snn_net - the largest evaluated network, 40 input neurons and one
// output neuron (40 x 1), built from sc_snn with N_PRE = 40.
//
// Input k is driven with a current of (k + 1) / 40 nA, so the input neurons
// fire at 40 different rates. Over 300 steps the test checks that every input
// neuron fires with an interval of floor(0.9 mV / (0.1 mV/nA * i)) + 1 steps,
// within 2 steps plus 10 % (small currents give increments of a few dozen codes, where the stochastic error is largest)
// (inputs too weak to fire within the run are required to stay silent), that
// the output neuron fires, that every synapse whose input fired changed its
// weight, that weights potentiated and depressed, and that no learning rule
// has a postsynaptic trace while the first one has none (all 40 see the same
// output spikes; a coincident input spike may delay one by a step). A step is shortened to 8 200 cycles (the minimum is
// 2 * 4095 + 5) to keep the run short.
module tb_sc_snn_net;
  localparam int N = 12;
  localparam int NP = 40;
  localparam int NSTEPS = 300;
  localparam int STEP = 8200;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  logic [NP-1:0][N-1:0] i_ext, v_pre, i_syn, weight, x_trace, y_trace;
  logic [NP-1:0]        pre_spike;
  logic                 step, post_spike;
  logic [N-1:0]         v_post;

  always #5 clk = ~clk;

  sc_snn #(.N_PRE(NP), .STEP_CYCLES(STEP)) dut (
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

  initial begin : watchdog
    repeat ((NSTEPS + 5) * STEP) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last [NP], nspk [NP], bad_int [NP], w_min [NP], w_max [NP];
    int n_post, n_pot, n_dep, nominal, same_y;
    real cur;
    for (int k = 0; k < NP; k++) begin
      i_ext[k] = 12'(sc_pkg::to_fix(real'(k + 1) / real'(NP), N));
      last[k] = -1; nspk[k] = 0; bad_int[k] = 0; w_min[k] = 4095; w_max[k] = 0;
    end
    n_post = 0; same_y = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < NSTEPS; s++) begin
      do begin
        @(posedge clk);
        for (int k = 0; k < NP; k++) if (pre_spike[k]) begin
          cur = real'(k + 1) / real'(NP);
          nominal = int'($floor(0.9 / (0.1 * cur))) + 1;
          if (last[k] >= 0 && ((s - last[k]) - nominal > 2 + nominal / 10 ||
                               nominal - (s - last[k]) > 2 + nominal / 10))
            bad_int[k]++;
          last[k] = s;
          nspk[k]++;
        end
        if (post_spike) n_post++;
      end while (!step);
      for (int k = 0; k < NP; k++) begin
        if (int'(weight[k]) < w_min[k]) w_min[k] = int'(weight[k]);
        if (int'(weight[k]) > w_max[k]) w_max[k] = int'(weight[k]);
      end
      // without coincident spikes every learning rule sees the same output spikes
      for (int k = 1; k < NP; k++) if (y_trace[k] > 0 && y_trace[0] == 0) same_y++;
    end
    n_pot = 0; n_dep = 0;
    for (int k = 0; k < NP; k++) begin
      cur = real'(k + 1) / real'(NP);
      nominal = int'($floor(0.9 / (0.1 * cur))) + 1;
      if (nominal + 2 + nominal / 10 < NSTEPS) check(nspk[k] > 0, $sformatf("input %0d fires", k));
      else check(nspk[k] == 0, $sformatf("input %0d (too weak) silent", k));
      check(bad_int[k] == 0, $sformatf("input %0d: %0d intervals off nominal %0d", k, bad_int[k], nominal));
      if (nspk[k] > 0) check(w_max[k] != w_min[k], $sformatf("synapse %0d weight moved", k));
      if (w_max[k] > 2048) n_pot++;
      if (w_min[k] < 2048) n_dep++;
    end
    $display("output spikes %0d, synapses potentiated %0d, depressed %0d", n_post, n_pot, n_dep);
    check(n_post > 0, "output neuron fires");
    check(n_pot > 0 && n_dep > 0, "both weight directions occur");
    check(same_y == 0, "postsynaptic traces start together in every learning rule");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
