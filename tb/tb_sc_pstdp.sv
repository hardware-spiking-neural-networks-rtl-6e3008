// tb_sc_pstdp - checks the SC-PSTDP learning rule at 12-bit precision.
//   * after reset the weight is W_INIT and both traces are zero; without spikes
//     they stay so exactly;
//   * step lengths: L + 1 busy cycles without a spike, 2L + 3 with one;
//   * spike pairs with time difference dt (in steps) from -20 to +20: a
//     presynaptic spike dt steps before a postsynaptic one potentiates the
//     weight by INC * B_j * A^dt, the reverse order depresses it by
//     INC * B_i * A^dt (A = 0.99, INC = 0.5, B = 0.3994); each change is
//     compared with that value, and the traces with their decayed values;
//   * a pre and a post spike pending together are processed in two steps.
module tb_sc_pstdp;
  localparam int N = 12;
  localparam int L = 4095;
  localparam int STEP = 8200;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic step, pre_spike, post_spike, busy;
  logic [N-1:0] w, x_trace, y_trace;

  always #5 clk = ~clk;

  sc_pstdp #(.N(N)) dut (.clk, .rst_n, .step, .pre_spike, .post_spike, .w, .x_trace, .y_trace, .busy);

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

  // One step, with optional spike pulses delivered just before it.
  task automatic do_step(input bit pre, input bit post, output int busy_len);
    busy_len = 0;
    pre_spike <= pre;
    post_spike <= post;
    @(posedge clk);
    pre_spike <= 1'b0;
    post_spike <= 1'b0;
    step <= 1'b1;
    @(posedge clk);
    step <= 1'b0;
    for (int c = 0; c < STEP; c++) begin
      @(negedge clk);
      busy_len += int'(busy);
    end
  endtask

  task automatic do_reset();
    rst_n <= 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (400 * (STEP + 2)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int dts [10] = '{1, 2, 5, 10, 20, -1, -2, -5, -10, -20};
    int busy_len, w0, dw, exp_dw, n_pot, n_dep, exp_tr;
    real amp;
    step = 0; pre_spike = 0; post_spike = 0;
    do_reset();
    #1;
    check(int'(w) == 2048 && x_trace == '0 && y_trace == '0, "reset values");
    for (int s = 0; s < 3; s++) begin
      do_step(0, 0, busy_len);
      check(int'(w) == 2048 && x_trace == '0 && y_trace == '0, "no spike: nothing moves");
      check(busy_len == L + 1, $sformatf("no-spike busy %0d", busy_len));
    end
    n_pot = 0; n_dep = 0;
    foreach (dts[i]) begin
      do_reset();
      w0 = int'(w);
      amp = 0.5 * 0.3994 * (0.99 ** ((dts[i] < 0) ? -dts[i] : dts[i]));
      exp_dw = int'(amp * 4095.0 + 0.5);
      // first spike
      do_step(dts[i] > 0, dts[i] < 0, busy_len);
      check(busy_len == 2 * L + 3, $sformatf("spike step busy %0d", busy_len));
      check(iabs(int'(w) - w0) <= 8, $sformatf("first spike alone leaves w (%0d -> %0d)", w0, w));
      exp_tr = 2048;
      if (dts[i] > 0) check(iabs(int'(x_trace) - exp_tr) <= 12, $sformatf("x jump %0d", x_trace));
      else            check(iabs(int'(y_trace) - exp_tr) <= 12, $sformatf("y jump %0d", y_trace));
      w0 = int'(w);
      for (int s = 1; s < ((dts[i] < 0) ? -dts[i] : dts[i]); s++) do_step(0, 0, busy_len);
      exp_tr = int'(2048.0 * (0.99 ** (((dts[i] < 0) ? -dts[i] : dts[i]) - 1)));
      if (dts[i] > 0) check(iabs(int'(x_trace) - exp_tr) <= 25, $sformatf("x decayed %0d vs %0d", x_trace, exp_tr));
      else            check(iabs(int'(y_trace) - exp_tr) <= 25, $sformatf("y decayed %0d vs %0d", y_trace, exp_tr));
      // second spike
      do_step(dts[i] < 0, dts[i] > 0, busy_len);
      dw = int'(w) - w0;
      $display("dt=%0d steps: dw=%0d expected %s%0d", dts[i], dw, (dts[i] > 0) ? "+" : "-", exp_dw);
      if (dts[i] > 0) begin
        check(iabs(dw - exp_dw) <= 30, $sformatf("potentiation dt=%0d: %0d vs %0d", dts[i], dw, exp_dw));
        if (dw > 0) n_pot++;
      end else begin
        check(iabs(dw + exp_dw) <= 30, $sformatf("depression dt=%0d: %0d vs -%0d", dts[i], dw, exp_dw));
        if (dw < 0) n_dep++;
      end
    end
    check(n_pot == 5 && n_dep == 5, "sign of every weight change");
    // both spikes pending at once: pre processed first, post in the next step
    do_reset();
    do_step(1, 1, busy_len);
    check(iabs(int'(x_trace) - 2048) <= 12 && y_trace == '0, "both pending: pre branch first");
    do_step(0, 0, busy_len);
    check(iabs(int'(y_trace) - 2048) <= 12, "both pending: post branch next step");
    check(busy_len == 2 * L + 3, "post handled as spike step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
