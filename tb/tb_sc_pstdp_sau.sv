// tb_sc_pstdp_sau - checks the SC-PSTDP arithmetic unit exhaustively: for all
// 512 combinations of its nine input bits each output must equal the gate
// formula it stands for.
module tb_sc_pstdp_sau;
  int   checks = 0, failures = 0;
  logic s_x, s_y, s_w, s_aj, s_ai, s_bi, s_bj, s_inc, s_half;
  logic x_dec, y_dec, x_inc, y_inc, w_dep, w_pot;

  sc_pstdp_sau dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit xa, ya;
    for (int v = 0; v < 512; v++) begin
      {s_x, s_y, s_w, s_aj, s_ai, s_bi, s_bj, s_inc, s_half} = 9'(v);
      #1;
      xa = s_x && s_aj;
      ya = s_y && s_ai;
      check(x_dec == xa, $sformatf("x_dec %0d", v));
      check(y_dec == ya, $sformatf("y_dec %0d", v));
      check(x_inc == (s_half ? xa : s_inc), $sformatf("x_inc %0d", v));
      check(y_inc == (s_half ? ya : s_inc), $sformatf("y_inc %0d", v));
      check(w_dep == (s_half ? s_w : !(ya && s_bi)), $sformatf("w_dep %0d", v));
      check(w_pot == (s_half ? s_w : (xa && s_bj)), $sformatf("w_pot %0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
