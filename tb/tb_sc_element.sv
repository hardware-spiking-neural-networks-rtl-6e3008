// tb_sc_element - checks the four stochastic computing elements against their
// truth tables and against the eight-bit example streams of the SC operations
// (AND and XNOR multiply, MUX add, NOT+MUX subtract).
module tb_sc_element;
  int   checks = 0, failures = 0;
  logic a, b, d;
  logic c_and, c_xnor, c_add, c_sub;

  sc_element #(.OP(sc_pkg::SCE_AND))  u_and  (.a, .b, .d, .c(c_and));
  sc_element #(.OP(sc_pkg::SCE_XNOR)) u_xnor (.a, .b, .d, .c(c_xnor));
  sc_element #(.OP(sc_pkg::SCE_ADD))  u_add  (.a, .b, .d, .c(c_add));
  sc_element #(.OP(sc_pkg::SCE_SUB))  u_sub  (.a, .b, .d, .c(c_sub));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run 8-bit example streams through one element type; bit 0 of a vector is
  // the first bit of the stream.
  task automatic run(input int op, input logic [7:0] va, input logic [7:0] vb,
                     input logic [7:0] vd, input logic [7:0] vc, input string name);
    logic [7:0] got;
    for (int i = 0; i < 8; i++) begin
      a = va[7-i]; b = vb[7-i]; d = vd[7-i];
      #1;
      case (op)
        0: got[7-i] = c_and;
        1: got[7-i] = c_xnor;
        2: got[7-i] = c_add;
        default: got[7-i] = c_sub;
      endcase
    end
    check(got == vc, $sformatf("%s: got %b expected %b", name, got, vc));
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // truth tables
    for (int v = 0; v < 8; v++) begin
      {a, b, d} = 3'(v);
      #1;
      check(c_and == (a & b), "AND truth table");
      check(c_xnor == (a == b), "XNOR truth table");
      check(c_add == (d ? a : b), "ADD truth table");
      check(c_sub == (d ? a : !b), "SUB truth table");
    end
    // example streams (written first bit leftmost)
    run(0, 8'b01101010, 8'b10111011, 8'b00000000, 8'b00101010, "AND 4/8 x 6/8 = 3/8");
    run(1, 8'b10010101, 8'b10100000, 8'b00000000, 8'b11001010, "XNOR 0 x -4/8 = 0");
    run(2, 8'b11111011, 8'b00100110, 8'b10010101, 8'b10110011, "ADD (7/8 + 3/8)/2 = 5/8");
    run(3, 8'b11000001, 8'b00110111, 8'b10010110, 8'b11001000, "SUB (-2/8 - 2/8)/2 = -2/8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
