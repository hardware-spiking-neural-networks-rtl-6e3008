// tb_sc_lfsr - checks that the LFSR is maximal-length: at 12 bits (default)
// and at 8 bits it visits every non-zero state exactly once per 2^N - 1 cycles,
// returns to its seed after exactly that many cycles and never reaches zero.
module tb_sc_lfsr;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic [11:0] q12;
  logic [7:0]  q8;
  bit          seen12 [4096];
  bit          seen8  [256];

  always #5 clk = ~clk;

  sc_lfsr #(.N(12), .SEED('h5A5)) dut12 (.clk, .rst_n, .q(q12));
  sc_lfsr #(.N(8),  .SEED('h3C))  dut8  (.clk, .rst_n, .q(q8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dup12, dup8, zero;
    logic [11:0] first12;
    logic [7:0]  first8;
    repeat (2) @(posedge clk);
    #1;
    check(q12 == 12'h5A5 && q8 == 8'h3C, "seed loaded in reset");
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    first12 = q12;
    first8  = q8;
    dup12 = 0; dup8 = 0; zero = 0;
    for (int c = 0; c < 4095; c++) begin
      if (seen12[q12]) dup12++;
      seen12[q12] = 1'b1;
      if (c < 255) begin
        if (seen8[q8]) dup8++;
        seen8[q8] = 1'b1;
      end
      if (q12 == 0 || q8 == 0) zero++;
      if (c == 254) begin
        @(posedge clk); #1;
        check(q8 == first8, "8-bit period is 255");
        c++;
        if (seen12[q12]) dup12++;
        seen12[q12] = 1'b1;
      end
      @(posedge clk); #1;
    end
    check(dup12 == 0, "12-bit states all distinct");
    check(dup8 == 0, "8-bit states all distinct");
    check(zero == 0, "never zero");
    check(q12 == first12, "12-bit period is 4095");
    for (int v = 1; v < 4096; v++) check(seen12[v], $sformatf("12-bit state %0d visited", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
