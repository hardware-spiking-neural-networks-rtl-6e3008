// tb_sc_pstdp_ctrl - checks controller 2 of SC-PSTDP at N = 4 (L = 15):
//   * no spike:        S0 -> S1 -> S0
//   * presynaptic:     S0 -> S2 -> S4 -> S6 -> S0
//   * postsynaptic:    S0 -> S3 -> S5 -> S6 -> S0
//   * both pending:    the presynaptic branch first, acknowledged alone
// Every counting state lasts L counting cycles plus one load cycle; S6 lasts one
// cycle with w_update; the counters are cleared on entry to every period.
module tb_sc_pstdp_ctrl;
  localparam int N = 4;
  localparam int L = 15;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic step, pre_pend, post_pend;
  logic [2:0] state;
  logic cnt_clr, cnt_en, load, w_update, ack_pre, ack_post;

  always #5 clk = ~clk;

  sc_pstdp_ctrl #(.N(N)) dut (.clk, .rst_n, .step, .pre_pend, .post_pend, .state, .cnt_clr,
                              .cnt_en, .load, .w_update, .ack_pre, .ack_post);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Runs one step and records the sequence of distinct states visited.
  task automatic run_step(input bit pre, input bit post, output logic [2:0] seq [8],
                          output int nseq, output int len, output int n_en, output int n_load,
                          output int n_clr, output int n_upd, output int n_apre, output int n_apost);
    logic [2:0] prev;
    nseq = 0; len = 0; n_en = 0; n_load = 0; n_clr = 0; n_upd = 0; n_apre = 0; n_apost = 0;
    for (int i = 0; i < 8; i++) seq[i] = '0;
    pre_pend = pre; post_pend = post; step = 1'b1;
    #1;
    n_clr += int'(cnt_clr); n_apre += int'(ack_pre); n_apost += int'(ack_post);
    @(posedge clk); #1;
    step = 1'b0; pre_pend = 1'b0; post_pend = 1'b0;
    prev = 3'd0;
    len = 1;
    while (state != 3'd0 && len < 200) begin
      if (state != prev) begin
        seq[nseq] = state;
        nseq++;
        prev = state;
      end
      n_en += int'(cnt_en); n_load += int'(load); n_clr += int'(cnt_clr); n_upd += int'(w_update);
      n_apre += int'(ack_pre); n_apost += int'(ack_post);
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
    logic [2:0] seq [8];
    int nseq, len, n_en, n_load, n_clr, n_upd, n_apre, n_apost;
    step = 0; pre_pend = 0; post_pend = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check(state == 3'd0, "reset to S0");
    // no spike
    run_step(0, 0, seq, nseq, len, n_en, n_load, n_clr, n_upd, n_apre, n_apost);
    check(nseq == 1 && seq[0] == 3'd1, "no spike visits S1 only");
    check(len == L + 2, $sformatf("no-spike step %0d cycles", len));
    check(n_en == L && n_load == 1 && n_clr == 2 && n_upd == 0 && n_apre == 0 && n_apost == 0,
          "no-spike strobes");
    // presynaptic
    run_step(1, 0, seq, nseq, len, n_en, n_load, n_clr, n_upd, n_apre, n_apost);
    check(nseq == 3 && seq[0] == 3'd2 && seq[1] == 3'd4 && seq[2] == 3'd6, "pre: S2 S4 S6");
    check(len == 2 * L + 4, $sformatf("pre step %0d cycles", len));
    check(n_en == 2 * L && n_load == 2 && n_clr == 3 && n_upd == 1 && n_apre == 1 && n_apost == 0,
          "pre strobes");
    // postsynaptic
    run_step(0, 1, seq, nseq, len, n_en, n_load, n_clr, n_upd, n_apre, n_apost);
    check(nseq == 3 && seq[0] == 3'd3 && seq[1] == 3'd5 && seq[2] == 3'd6, "post: S3 S5 S6");
    check(len == 2 * L + 4, $sformatf("post step %0d cycles", len));
    check(n_en == 2 * L && n_load == 2 && n_upd == 1 && n_apre == 0 && n_apost == 1, "post strobes");
    // both pending: pre branch taken, post not acknowledged
    run_step(1, 1, seq, nseq, len, n_en, n_load, n_clr, n_upd, n_apre, n_apost);
    check(seq[0] == 3'd2 && n_apre == 1 && n_apost == 0, "both pending: presynaptic first");
    // no step -> stays in S0
    repeat (20) @(posedge clk);
    #1;
    check(state == 3'd0 && !cnt_en, "idle without step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
