// tb_sc_if_neuron - checks the SC-IF neuron at the default 12-bit precision.
//   * zero input: the potential stays exactly at rest and no spike occurs;
//   * constant 0.1 nA: each step adds about 0.1 mV/nA * 0.1 nA = 0.01 mV
//     (checked per step against the held potential, within SC tolerance), the
//     neuron fires when the potential passes 0.9 mV, returns to rest, and fires
//     periodically about every 90 steps (9 ms of model time);
//   * full-scale input (1 nA) fires about every 9 steps;
//   * busy lasts L + 1 cycles after the step, L + 2 when it fires (L = 4095).
module tb_sc_if_neuron;
  localparam int N = 12;
  localparam int L = 4095;
  localparam int STEP = 4100;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic step, spike, busy;
  logic [N-1:0] i_in, v_m;

  always #5 clk = ~clk;

  sc_if_neuron #(.N(N)) dut (.clk, .rst_n, .step, .i_in, .spike, .v_m, .busy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run one time step; report whether it fired and how many cycles busy was high.
  task automatic do_step(output bit fired, output int busy_len);
    fired = 0; busy_len = 0;
    @(posedge clk);
    step <= 1'b1;
    @(posedge clk);
    step <= 1'b0;
    for (int c = 0; c < STEP; c++) begin
      @(negedge clk);
      busy_len += int'(busy);
      if (spike) fired = 1;
    end
  endtask

  initial begin : watchdog
    repeat (700 * (STEP + 2) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit fired;
    int busy_len, last_spike, n_spk, max_err;
    int v_old, v_exp, err;
    step = 0;
    i_in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // zero input
    for (int s = 0; s < 5; s++) begin
      do_step(fired, busy_len);
      check(v_m == '0 && !fired, "zero input keeps rest");
      check(busy_len == L + 1, $sformatf("non-firing step busy %0d cycles", busy_len));
    end
    // 0.1 nA constant input
    i_in = 12'(sc_pkg::to_fix(0.1, N));
    last_spike = -1; n_spk = 0; max_err = 0;
    for (int s = 0; s < 400; s++) begin
      v_old = int'(v_m);
      do_step(fired, busy_len);
      if (fired) begin
        check(v_m == '0, "reset to rest after a spike");
        check(busy_len == L + 2, $sformatf("firing step busy %0d cycles", busy_len));
        check(v_old > 3686 - 120, $sformatf("fired near threshold (v before %0d)", v_old));
        if (last_spike >= 0)
          check(s - last_spike >= 80 && s - last_spike <= 100,
                $sformatf("spike interval %0d steps", s - last_spike));
        last_spike = s; n_spk++;
      end else begin
        // expected: v + 0.01 mV = 41 codes
        v_exp = v_old + 41;
        err = int'(v_m) - v_exp;
        if (err < 0) err = -err;
        if (err > max_err) max_err = err;
        check(err <= 15, $sformatf("step %0d: v %0d expected %0d", s, v_m, v_exp));
        check(int'(v_m) <= 3686 + 120, "no potential far above threshold without a spike");
      end
    end
    $display("0.1 nA: %0d spikes, max per-step error %0d codes", n_spk, max_err);
    check(n_spk >= 4 && n_spk <= 5, $sformatf("spike count %0d in 400 steps", n_spk));
    // full-scale input
    i_in = '1;
    n_spk = 0;
    for (int s = 0; s < 100; s++) begin
      do_step(fired, busy_len);
      if (fired) n_spk++;
    end
    check(n_spk >= 9 && n_spk <= 12, $sformatf("1 nA: %0d spikes in 100 steps", n_spk));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
