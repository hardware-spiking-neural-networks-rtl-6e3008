// tb_sc_pstdp_precision - the SC-PSTDP learning rule at 8, 10 and 12 bits of
// bitstream precision, side by side. Each instance receives the same spike
// pairs (dt = +-1, 2, 5, 10, 20 steps, reset between pairs); the weight change
// is compared with 0.5 * 0.3994 * 0.99^|dt| and the RMS error, as a fraction of
// full scale, is reported per precision. Each precision must stay within a
// bound (8 bit: 0.03, 10 bit: 0.012, 12 bit: 0.003) and the 12-bit error must not
// exceed the 8-bit one. Bitstream periods are 255, 1023 and 4095 cycles.
module tb_sc_pstdp_precision;
  localparam int STEP = 8200;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic step, pre_spike, post_spike;
  logic [2:0] busy;
  logic [7:0]  w8, x8, y8;
  logic [9:0]  w10, x10, y10;
  logic [11:0] w12, x12, y12;

  always #5 clk = ~clk;

  sc_pstdp #(.N(8))  u8  (.clk, .rst_n, .step, .pre_spike, .post_spike, .w(w8),  .x_trace(x8),  .y_trace(y8),  .busy(busy[0]));
  sc_pstdp #(.N(10)) u10 (.clk, .rst_n, .step, .pre_spike, .post_spike, .w(w10), .x_trace(x10), .y_trace(y10), .busy(busy[1]));
  sc_pstdp #(.N(12)) u12 (.clk, .rst_n, .step, .pre_spike, .post_spike, .w(w12), .x_trace(x12), .y_trace(y12), .busy(busy[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic do_step(input bit pre, input bit post);
    pre_spike <= pre;
    post_spike <= post;
    @(posedge clk);
    pre_spike <= 1'b0;
    post_spike <= 1'b0;
    step <= 1'b1;
    @(posedge clk);
    step <= 1'b0;
    repeat (STEP) @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (200 * (STEP + 2)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int  dts [10] = '{1, 2, 5, 10, 20, -1, -2, -5, -10, -20};
    real se [3], w0 [3], dw, ideal;
    static real fs [3] = '{255.0, 1023.0, 4095.0};
    static real bound [3] = '{0.03, 0.012, 0.003};
    int  ad;
    for (int p = 0; p < 3; p++) se[p] = 0.0;
    step = 0; pre_spike = 0; post_spike = 0;
    foreach (dts[i]) begin
      rst_n <= 1'b0;
      repeat (2) @(posedge clk);
      rst_n <= 1'b1;
      @(posedge clk);
      ad = (dts[i] < 0) ? -dts[i] : dts[i];
      do_step(dts[i] > 0, dts[i] < 0);
      #1;
      w0[0] = real'(w8) / fs[0]; w0[1] = real'(w10) / fs[1]; w0[2] = real'(w12) / fs[2];
      for (int s = 1; s < ad; s++) do_step(0, 0);
      do_step(dts[i] < 0, dts[i] > 0);
      #1;
      ideal = 0.5 * 0.3994 * (0.99 ** ad) * ((dts[i] > 0) ? 1.0 : -1.0);
      dw = real'(w8) / fs[0] - w0[0];   se[0] += (dw - ideal) ** 2;
      dw = real'(w10) / fs[1] - w0[1];  se[1] += (dw - ideal) ** 2;
      dw = real'(w12) / fs[2] - w0[2];  se[2] += (dw - ideal) ** 2;
    end
    for (int p = 0; p < 3; p++) begin
      $display("%0d-bit: RMS error of weight change %0.5f", 8 + 2 * p, $sqrt(se[p] / 10.0));
      check($sqrt(se[p] / 10.0) < bound[p], $sformatf("%0d-bit error bound", 8 + 2 * p));
    end
    check(se[2] <= se[0], "12-bit at least as accurate as 8-bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
