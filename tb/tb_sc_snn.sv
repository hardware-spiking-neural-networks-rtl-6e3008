// tb_sc_snn - end-to-end test of the two-neuron, one-synapse SC-SNN with every
// parameter at its default (12-bit streams, 10 000 cycles per 0.1 ms step).
//
// The presynaptic neuron is driven with 0.3 nA for 300 steps and then with
// 1 nA for 200 steps. At every step strobe the testbench takes a snapshot of
// the network and checks each step against the model equations, using the
// snapshot of the step before (values change only inside a step):
//   * synaptic current: I' = min(I + w, 1) after a presynaptic spike,
//     I' = 0.99 I otherwise;
//   * postsynaptic potential: v' = v + 0.1 I, or a spike and rest above 0.9 mV;
//   * weight: + x A B after a lone postsynaptic spike, - y A B after a lone
//     presynaptic one (both clamped to [0, 1]), unchanged without spikes;
//   * presynaptic spike intervals match 0.9 mV / (0.1 mV/nA * i_ext).
// It counts how often each mechanism happened (presynaptic and postsynaptic
// spikes, current added and decayed, current clamped at full scale,
// potentiation, depression, membrane reset) and fails for any that never did.
module tb_sc_snn;
  localparam int N = 12;
  localparam int L = 4095;
  localparam int NSTEPS = 500;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  logic [0:0][N-1:0] i_ext, v_pre, i_syn, weight, x_trace, y_trace;
  logic              step, post_spike;
  logic [0:0]        pre_spike;
  logic [N-1:0]      v_post;

  always #5 clk = ~clk;

  sc_snn dut (.clk, .rst_n, .i_ext, .step, .pre_spike, .post_spike, .v_pre, .v_post,
              .i_syn, .weight, .x_trace, .y_trace);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  typedef struct {
    int  i, w, x, y, vpost;
    bit  pre, post;   // spikes produced during the step that ended at this snapshot
  } snap_t;

  bit pre_now, post_now;
  int n_pre, n_post, n_add, n_decay, n_clamp, n_pot, n_dep, n_reset;

  initial begin : watchdog
    repeat ((NSTEPS + 20) * 10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    snap_t s [$];
    snap_t cur, a, b;
    int last_pre, k, nominal, dw_exp;
    n_pre = 0; n_post = 0; n_add = 0; n_decay = 0; n_clamp = 0; n_pot = 0; n_dep = 0; n_reset = 0;
    i_ext[0] = 12'(sc_pkg::to_fix(0.3, N));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    last_pre = -1;
    k = 0;
    while (k < NSTEPS) begin
      pre_now = 0; post_now = 0;
      // collect spikes until the next step strobe
      do begin
        @(posedge clk);
        if (pre_spike[0]) pre_now = 1;
        if (post_spike)   post_now = 1;
      end while (!step);
      cur.i = int'(i_syn[0]); cur.w = int'(weight[0]); cur.x = int'(x_trace[0]);
      cur.y = int'(y_trace[0]); cur.vpost = int'(v_post);
      cur.pre = pre_now; cur.post = post_now;
      s.push_back(cur);
      if (pre_now) begin
        n_pre++;
        nominal = (i_ext[0] == '1) ? 9 : 30;
        if (last_pre >= 0 && (last_pre >= 300 || k < 300))
          check(iabs((k - last_pre) - nominal) <= 2,
                $sformatf("presynaptic interval %0d steps, nominal %0d", k - last_pre, nominal));
        last_pre = k;
      end
      if (post_now) n_post++;
      // step k-1 used the snapshot s[k-1]; its spikes (s[k-1].pre/post) were produced
      // in step k-2 and processed in step k-1, so s[k] = result, s[k-1] = operands.
      if (k >= 3) begin
        a = s[k-1];
        b = s[k];
        // synaptic current
        if (a.pre) begin
          check(iabs(b.i - ((a.i + a.w > L) ? L : a.i + a.w)) <= 30,
                $sformatf("step %0d: I + w: %0d vs %0d + %0d", k, b.i, a.i, a.w));
          n_add++;
          if (b.i == L) n_clamp++;
        end else begin
          check(iabs(b.i - int'(0.99 * real'(a.i) + 0.5)) <= 10,
                $sformatf("step %0d: decay %0d vs 0.99 * %0d", k, b.i, a.i));
          if (a.i > 0) n_decay++;
        end
        // postsynaptic membrane
        if (b.post) begin
          check(b.vpost == 0, "postsynaptic potential back at rest after spike");
          n_reset++;
        end else begin
          check(iabs(b.vpost - (a.vpost + int'(0.1 * real'(a.i) + 0.5))) <= 20,
                $sformatf("step %0d: v_post %0d vs %0d + 0.1 * %0d", k, b.vpost, a.vpost, a.i));
        end
        // weight: only lone spikes with nothing pending from earlier
        if (!s[k-2].pre && !s[k-2].post) begin
          if (a.post && !a.pre) begin
            dw_exp = int'(real'(a.x) * 0.99 * 0.3994 + 0.5);
            if (a.w + dw_exp > L) dw_exp = L - a.w;
            check(iabs((b.w - a.w) - dw_exp) <= 30,
                  $sformatf("step %0d: potentiation %0d vs %0d (x=%0d)", k, b.w - a.w, dw_exp, a.x));
            if (b.w > a.w) n_pot++;
          end else if (a.pre && !a.post) begin
            dw_exp = int'(real'(a.y) * 0.99 * 0.3994 + 0.5);
            if (dw_exp > a.w) dw_exp = a.w;
            check(iabs((a.w - b.w) - dw_exp) <= 30,
                  $sformatf("step %0d: depression %0d vs %0d (y=%0d)", k, a.w - b.w, dw_exp, a.y));
            if (b.w < a.w) n_dep++;
          end else if (!a.pre && !a.post) begin
            check(b.w == a.w, $sformatf("step %0d: weight moved without a spike", k));
          end
        end
      end
      k++;
      if (k == 300) i_ext[0] = '1;
    end
    $display("mechanisms: pre=%0d post=%0d add=%0d decay=%0d clamp=%0d pot=%0d dep=%0d reset=%0d",
             n_pre, n_post, n_add, n_decay, n_clamp, n_pot, n_dep, n_reset);
    $display("final weight %0d (initial 2048)", weight[0]);
    check(n_pre > 0, "presynaptic spikes happened");
    check(n_post > 0, "postsynaptic spikes happened");
    check(n_add > 0, "synaptic current additions happened");
    check(n_decay > 0, "synaptic current decay happened");
    check(n_clamp > 0, "synaptic current clamp happened");
    check(n_pot > 0, "potentiation happened");
    check(n_dep > 0, "depression happened");
    check(n_reset > 0, "membrane reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
