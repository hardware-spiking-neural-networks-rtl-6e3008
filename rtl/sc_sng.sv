// sc_sng - stochastic number generator: an LFSR and a comparator.
//
// Each cycle the comparator outputs 1 when the pseudo-random number is less than
// the binary input x. The pseudo-random number is the LFSR state minus one, so
// it takes every value 0 .. 2^N - 2 once per period of L = 2^N - 1 cycles and
// the bitstream holds exactly x ones in any window of L consecutive cycles
// (x in 0 .. L). The LFSR-plus-comparator structure and the "less than" rule
// follow the source design; subtracting one (so that the all-ones code means a
// stream of all ones) is this design's choice. sn is combinational from the
// LFSR register and x.
module sc_sng #(
  parameter int unsigned N    = sc_pkg::SC_N,
  parameter int unsigned SEED = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x,
  output logic         sn
);
  logic [N-1:0] lfsr_q;
  logic [N-1:0] rnd;

  sc_lfsr #(.N(N), .SEED(SEED)) u_lfsr (.clk(clk), .rst_n(rst_n), .q(lfsr_q));

  assign rnd = lfsr_q - N'(1);
  assign sn  = (rnd < x);
endmodule
