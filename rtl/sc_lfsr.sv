// sc_lfsr - maximal-length linear feedback shift register, the pseudo-random
// number source of a stochastic number generator.
//
// N-bit Fibonacci LFSR shifting towards the MSB; the new LSB is the XOR of the
// tap bits given by sc_pkg::lfsr_taps(N) (x^12 + x^6 + x^4 + x + 1 for the
// 12-bit default). It visits every non-zero state once per 2^N - 1 cycles, so a
// comparator against it sees each value 1 .. 2^N - 1 exactly once per period.
// The LFSR length of 12 bits follows the source design; the polynomial and the
// seed are this design's choice. It runs on every clock; rst_n (synchronous,
// active low) loads SEED. q is the registered state.
module sc_lfsr #(
  parameter int unsigned N    = sc_pkg::SC_N,
  parameter int unsigned SEED = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] q
);
  localparam logic [N-1:0] TAPS = N'(sc_pkg::lfsr_taps(N));
  localparam logic [N-1:0] INIT = (N'(SEED) == '0) ? N'(1) : N'(SEED);

  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n) q <= INIT;
    else        q <= {q[N-2:0], fb};
  end

  // The all-zero state is a lock-up state that must never be reached.
  a_nonzero : assert property (@(posedge clk) disable iff (!rst_n) q != '0);
endmodule
