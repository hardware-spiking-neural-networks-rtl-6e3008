// tb_sc_sng - checks the stochastic number generator: in any window of
// L = 2^N - 1 consecutive cycles the bitstream holds exactly x ones (0 and
// all-ones included), for N = 12 and N = 8 and several window phases; and that
// a short window gives roughly the right ratio.
module tb_sc_sng;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic [11:0] x12;
  logic [7:0]  x8;
  logic        sn12, sn8;

  always #5 clk = ~clk;

  sc_sng #(.N(12), .SEED('hACE)) dut12 (.clk, .rst_n, .x(x12), .sn(sn12));
  sc_sng #(.N(8),  .SEED('h11))  dut8  (.clk, .rst_n, .x(x8),  .sn(sn8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned vals12 [10] = '{0, 1, 2, 1000, 2047, 2048, 3000, 4054, 4094, 4095};
    int ones, ones8;
    x12 = '0; x8 = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    foreach (vals12[i]) begin
      x12 = 12'(vals12[i]);
      x8  = 8'(vals12[i] >> 4);
      repeat (i * 37) @(posedge clk);     // vary the phase of the window
      ones = 0; ones8 = 0;
      for (int c = 0; c < 4095; c++) begin
        @(negedge clk);
        ones += int'(sn12);
        if (c < 255) ones8 += int'(sn8);
      end
      check(ones == int'(vals12[i]), $sformatf("N=12 x=%0d ones=%0d", vals12[i], ones));
      check(ones8 == int'(x8), $sformatf("N=8 x=%0d ones=%0d", x8, ones8));
    end
    // a quarter-period window is only roughly right
    x12 = 12'd1024;
    ones = 0;
    for (int c = 0; c < 1024; c++) begin
      @(negedge clk);
      ones += int'(sn12);
    end
    check(ones > 200 && ones < 320, $sformatf("short window ratio %0d/1024", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
