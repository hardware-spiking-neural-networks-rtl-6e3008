// tb_sc_synapse - checks the SC-Synapse at 12-bit precision:
//   * without spikes a zero current stays exactly zero;
//   * a presynaptic spike adds the weight (I + w, clamped at 1.0);
//   * between spikes the current decays by A_I = 0.99 per step, checked step by
//     step against the held value and over 50 steps against 0.99^50;
//   * a spike arriving while a step is running is kept for the next step;
//   * busy lasts L + 1 cycles after the step strobe.
module tb_sc_synapse;
  localparam int N = 12;
  localparam int L = 4095;
  localparam int STEP = 4100;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic step, pre_spike, busy;
  logic [N-1:0] w, i_syn;

  always #5 clk = ~clk;

  sc_synapse #(.N(N)) dut (.clk, .rst_n, .step, .pre_spike, .w, .i_syn, .busy);

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

  // One time step; optionally a spike pulse in the middle of it.
  task automatic do_step(input bit spike_mid, output int busy_len);
    busy_len = 0;
    @(posedge clk);
    step <= 1'b1;
    @(posedge clk);
    step <= 1'b0;
    for (int c = 0; c < STEP; c++) begin
      if (spike_mid && c == 100) pre_spike <= 1'b1;
      else                       pre_spike <= 1'b0;
      @(negedge clk);
      busy_len += int'(busy);
    end
  endtask

  initial begin : watchdog
    repeat (200 * (STEP + 2)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int busy_len, i0, i_old, i_exp, max_err;
    real ideal;
    step = 0; pre_spike = 0;
    w = 12'(sc_pkg::to_fix(0.7, N));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < 3; s++) begin
      do_step(1'b0, busy_len);
      check(i_syn == '0, "zero current stays zero");
      check(busy_len == L + 1, $sformatf("busy %0d cycles", busy_len));
    end
    // spike during this step -> used by the next step
    do_step(1'b1, busy_len);
    check(i_syn == '0, "spike is not used by the step already running");
    do_step(1'b0, busy_len);
    check(iabs(int'(i_syn) - int'(w)) <= 30, $sformatf("0 + w: %0d vs %0d", i_syn, w));
    // decay for 50 steps
    i0 = int'(i_syn);
    max_err = 0;
    for (int s = 0; s < 50; s++) begin
      i_old = int'(i_syn);
      do_step(1'b0, busy_len);
      i_exp = int'(real'(i_old) * 0.99 + 0.5);
      if (iabs(int'(i_syn) - i_exp) > max_err) max_err = iabs(int'(i_syn) - i_exp);
      check(iabs(int'(i_syn) - i_exp) <= 12, $sformatf("decay step %0d: %0d vs %0d", s, i_syn, i_exp));
    end
    ideal = real'(i0) * (0.99 ** 50);
    $display("after 50 steps: %0d, ideal %0.1f, max step error %0d", i_syn, ideal, max_err);
    check(iabs(int'(i_syn) - int'(ideal)) <= 60, "50-step decay close to 0.99^50");
    // two spikes in a row -> clamp at full scale
    w = 12'(sc_pkg::to_fix(0.9, N));
    do_step(1'b1, busy_len);
    i_old = int'(i_syn);
    do_step(1'b1, busy_len);
    i_exp = (i_old + int'(w) > L) ? L : i_old + int'(w);
    check(int'(i_syn) == L, $sformatf("I + w clamped at full scale: %0d vs %0d", i_syn, i_exp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
