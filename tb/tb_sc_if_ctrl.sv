// tb_sc_if_ctrl - checks controller 1 of the SC-IF neuron at N = 4 (L = 15):
// after a step the counter is cleared once, enabled for exactly L cycles, the
// load strobe follows in the next cycle, and a spike of one cycle follows only
// when the comparator reports v_m > v_th; the FSM is back in S0 after L + 2
// (no spike) or L + 3 (spike) cycles.
module tb_sc_if_ctrl;
  localparam int N = 4;
  localparam int L = 15;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic step, gt;
  logic [1:0] state;
  logic cnt_clr, cnt_en, v_load, spike;

  always #5 clk = ~clk;

  sc_if_ctrl #(.N(N)) dut (.clk, .rst_n, .step, .gt, .state, .cnt_clr, .cnt_en, .v_load, .spike);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One time step; returns the observed counts.
  task automatic one_step(input bit fire, output int n_clr, output int n_en,
                          output int n_load, output int n_spike, output int len);
    n_clr = 0; n_en = 0; n_load = 0; n_spike = 0; len = 0;
    gt   = fire;
    step = 1'b1;
    #1;
    n_clr += int'(cnt_clr);
    @(posedge clk); #1;
    step = 1'b0;
    len = 1;
    while (state != 2'd0 && len < 100) begin
      n_clr   += int'(cnt_clr);
      n_en    += int'(cnt_en);
      n_load  += int'(v_load);
      n_spike += int'(spike);
      if (v_load) check(n_en == L, "load directly after L counting cycles");
      @(posedge clk); #1;
      len++;
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_clr, n_en, n_load, n_spike, len;
    step = 0; gt = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check(state == 2'd0 && !cnt_en && !spike, "reset to S0, idle");
    repeat (7) @(posedge clk);
    #1;
    check(state == 2'd0, "S0 holds without step");
    for (int r = 0; r < 6; r++) begin
      one_step(r[0], n_clr, n_en, n_load, n_spike, len);
      check(n_clr == 1, $sformatf("one clear per step (%0d)", n_clr));
      check(n_en == L, $sformatf("count enable for L cycles (%0d)", n_en));
      check(n_load == 1, "one load per step");
      check(n_spike == int'(r[0]), $sformatf("spike only if gt (fire=%0d spikes=%0d)", r[0], n_spike));
      check(len == L + 2 + int'(r[0]), $sformatf("step length %0d", len));
      repeat (3) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
