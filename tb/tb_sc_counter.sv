// tb_sc_counter - checks the de-randomizing counter: counting of ones over a
// window, clear priority, hold when disabled, and the three decode modes
// including saturation at full scale and clamping at zero (N = 12).
module tb_sc_counter;
  localparam int N = 12;
  localparam int L = 4095;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic clr, en, bit_i;
  sc_pkg::dec_mode_e mode;
  logic [N-1:0] count, value;

  always #5 clk = ~clk;

  sc_counter #(.N(N)) dut (.clk, .rst_n, .clr, .en, .bit_i, .mode, .count, .value);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int exp_val(int c, sc_pkg::dec_mode_e m);
    case (m)
      sc_pkg::DEC_ADD: return (2 * c > L) ? L : 2 * c;
      sc_pkg::DEC_SUB: return (2 * c > L) ? 2 * c - L : 0;
      default:         return c;
    endcase
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int unsigned pct [6] = '{0, 10, 45, 50, 80, 100};
    int ones;
    clr = 0; en = 0; bit_i = 0; mode = sc_pkg::DEC_UNI;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    foreach (pct[i]) begin
      clr <= 1'b1;
      @(posedge clk);
      clr <= 1'b0;
      en  <= 1'b1;
      ones = 0;
      for (int c = 0; c < L; c++) begin
        bit_i <= (($urandom % 100) < pct[i]);
        @(posedge clk);
        ones += int'(bit_i);
      end
      en <= 1'b0;
      // bits counted so far exclude the last one driven; wait one edge
      @(posedge clk);
      ones = 0;
      // recount from the raw count for decode checks (count is the reference of what was seen)
      #1;
      check(int'(count) <= L, "count within range");
      for (int m = 0; m < 3; m++) begin
        mode = sc_pkg::dec_mode_e'(m);
        #1;
        check(int'(value) == exp_val(int'(count), mode),
              $sformatf("decode mode %0d count %0d value %0d", m, count, value));
      end
      mode = sc_pkg::DEC_UNI;
    end
    // exact counting of a known pattern, hold when disabled, clear priority
    clr <= 1'b1;
    @(posedge clk);
    clr <= 1'b0;
    en  <= 1'b1;
    ones = 0;
    for (int c = 0; c < 1000; c++) begin
      bit_i <= (c % 3 == 0);
      ones += (c % 3 == 0) ? 1 : 0;
      @(posedge clk);
    end
    en <= 1'b0;
    bit_i <= 1'b1;
    repeat (5) @(posedge clk);
    #1;
    check(int'(count) == ones, $sformatf("pattern count %0d expected %0d", count, ones));
    en  <= 1'b1;
    clr <= 1'b1;
    @(posedge clk);
    #1;
    check(count == '0, "clear has priority over enable");
    clr <= 1'b0;
    en  <= 1'b0;
    // decode corner values, set by counting all-ones
    en <= 1'b1; bit_i <= 1'b1;
    repeat (L) @(posedge clk);
    en <= 1'b0;
    @(posedge clk);
    #1;
    check(int'(count) == L, "full count");
    mode = sc_pkg::DEC_ADD; #1; check(int'(value) == L, "ADD saturates");
    mode = sc_pkg::DEC_SUB; #1; check(int'(value) == L, "SUB of full is full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
