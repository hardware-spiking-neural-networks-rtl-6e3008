// sc_element - one stochastic computing element (SCE): a single gate on
// bitstreams.
//
//   SCE_AND  : c = a & b          unipolar multiply, p(c) = p(a) p(b)
//   SCE_XNOR : c = ~(a ^ b)       bipolar multiply
//   SCE_ADD  : c = d ? a : b      scaled add, p(c) = (p(a) + p(b)) / 2 for p(d) = 1/2
//   SCE_SUB  : c = d ? a : ~b     scaled subtract, bipolar (a - b) / 2 for p(d) = 1/2
//
// The four gate structures and the port names A, B, D, C follow the source
// design; with a select stream of one-half the MUX input 1 is A and input 0 is
// B. Purely combinational; d is ignored by the two multipliers.
module sc_element #(
  parameter sc_pkg::sce_op_e OP = sc_pkg::SCE_AND
) (
  input  logic a,
  input  logic b,
  input  logic d,
  output logic c
);
  always_comb begin
    unique case (OP)
      sc_pkg::SCE_AND:  c = a & b;
      sc_pkg::SCE_XNOR: c = ~(a ^ b);
      sc_pkg::SCE_ADD:  c = d ? a : b;
      sc_pkg::SCE_SUB:  c = d ? a : ~b;
      default:          c = 1'b0;
    endcase
  end
endmodule
