// tb_sc_snn_fig5 - 140 ms (1 400 steps) of one synapse with pair-based STDP,
// the stochastic hardware against the same discrete equations in real
// arithmetic.
//
// Seven presynaptic and seven postsynaptic spikes (times chosen by this test,
// some pre-before-post and some post-before-pre, a few ms apart) are fed to
// one SC-Synapse and one SC-PSTDP at 12-bit precision. After every step the
// presynaptic trace x, postsynaptic trace y, weight w and synaptic current I are
// compared with a floating-point model of
//   x' = x A (+0.5 on a pre spike), y' = y A (+0.5 on a post spike),
//   w' = w - y A B on a pre spike, w' = w + x A B on a post spike,
//   I' = I + w on a pre spike, else I A,       A = 0.99, B = 0.3994,
// all clamped to [0, 1]. The test reports RMSE and NRMSE (RMSE over the range of
// the reference) of each signal and fails if an NRMSE exceeds 2 %, a step
// differs by more than 0.03, or the weight does not move in both directions.
module tb_sc_snn_fig5;
  localparam int N = 12;
  localparam real FS = 4095.0;
  localparam int STEP = 8200;
  localparam int NSTEPS = 1400;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic step, pre_spike, post_spike, busy_s, busy_p;
  logic [N-1:0] w, x_trace, y_trace, i_syn;

  always #5 clk = ~clk;

  sc_synapse #(.N(N)) u_syn (.clk, .rst_n, .step, .pre_spike, .w, .i_syn, .busy(busy_s));
  sc_pstdp   #(.N(N)) u_stdp (.clk, .rst_n, .step, .pre_spike, .post_spike, .w, .x_trace, .y_trace,
                              .busy(busy_p));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real clamp01(real v);
    return (v < 0.0) ? 0.0 : ((v > 1.0) ? 1.0 : v);
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin : watchdog
    repeat ((NSTEPS + 10) * (STEP + 4)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  pre_t [7]  = '{205, 295, 505, 795, 1005, 1095, 1305};
    int  post_t [7] = '{265, 355, 605, 715, 985, 1075, 1325};
    real x, y, wr, ir, a, b;
    real se [4], vmin [4], vmax [4], hw [4], rf [4], nrmse;
    string nm [4] = '{"x", "y", "w", "I"};
    bit pre, post;
    int n_up, n_down, w_prev;
    a = 0.99; b = 0.3994;
    x = 0.0; y = 0.0; wr = 2048.0 / FS; ir = 0.0;
    for (int j = 0; j < 4; j++) begin se[j] = 0.0; vmin[j] = 1.0; vmax[j] = 0.0; end
    n_up = 0; n_down = 0;
    step = 0; pre_spike = 0; post_spike = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    w_prev = int'(w);
    for (int k = 0; k < NSTEPS; k++) begin
      pre = 0; post = 0;
      foreach (pre_t[i])  if (pre_t[i] == k)  pre = 1;
      foreach (post_t[i]) if (post_t[i] == k) post = 1;
      pre_spike <= pre;
      post_spike <= post;
      @(posedge clk);
      pre_spike <= 1'b0;
      post_spike <= 1'b0;
      step <= 1'b1;
      @(posedge clk);
      step <= 1'b0;
      repeat (STEP) @(posedge clk);
      // reference step (spikes never coincide in this test)
      if (pre) begin
        ir = clamp01(ir + wr);
        x  = clamp01(x * a + 0.5);
        wr = clamp01(wr - y * a * b);
        y  = y * a;
      end else if (post) begin
        ir = ir * a;
        y  = clamp01(y * a + 0.5);
        wr = clamp01(wr + x * a * b);
        x  = x * a;
      end else begin
        ir = ir * a; x = x * a; y = y * a;
      end
      #1;
      hw[0] = real'(x_trace) / FS; hw[1] = real'(y_trace) / FS;
      hw[2] = real'(w) / FS;       hw[3] = real'(i_syn) / FS;
      rf[0] = x; rf[1] = y; rf[2] = wr; rf[3] = ir;
      for (int j = 0; j < 4; j++) begin
        se[j] += (hw[j] - rf[j]) ** 2;
        if (rf[j] < vmin[j]) vmin[j] = rf[j];
        if (rf[j] > vmax[j]) vmax[j] = rf[j];
        if (rabs(hw[j] - rf[j]) > 0.03) begin
          check(0, $sformatf("step %0d %s: %0.4f vs %0.4f", k, nm[j], hw[j], rf[j]));
        end
      end
      if (int'(w) > w_prev) n_up++;
      if (int'(w) < w_prev) n_down++;
      w_prev = int'(w);
    end
    for (int j = 0; j < 4; j++) begin
      nrmse = $sqrt(se[j] / NSTEPS) / (vmax[j] - vmin[j]);
      $display("%s: RMSE %0.5f NRMSE %0.5f", nm[j], $sqrt(se[j] / NSTEPS), nrmse);
      check(nrmse < 0.02, $sformatf("%s NRMSE %0.4f", nm[j], nrmse));
    end
    $display("weight rose %0d times, fell %0d times, final %0.4f (reference %0.4f)",
             n_up, n_down, real'(w) / FS, wr);
    check(n_up > 0 && n_down > 0, "weight potentiated and depressed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
