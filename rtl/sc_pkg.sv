// sc_pkg - shared types and helpers for the stochastic-computing (SC) spiking
// network.
//
// Every quantity of the network (membrane potential, synaptic current, trace,
// weight, coefficient) is held between time steps as an N-bit unsigned binary
// number X that stands for the unipolar probability X / (2^N - 1); the all-ones
// code is 1.0. During one bitstream period of 2^N - 1 clock cycles each number
// is turned into a bitstream, the bitstreams pass through AND/XNOR/MUX/NOT gates,
// and a counter turns the result back into a binary number.
//
// The scale of the stored numbers (1.0 = 1 mV for potentials, 1 nA for
// currents) and the three decode modes are this design's own choices; the gate
// set and the 12-bit default length follow the source design.
package sc_pkg;

  // Gate performed by one stochastic computing element.
  typedef enum logic [1:0] {
    SCE_AND  = 2'd0,  // unipolar multiply
    SCE_XNOR = 2'd1,  // bipolar multiply
    SCE_ADD  = 2'd2,  // scaled add: D ? A : B  ->  (A + B) / 2
    SCE_SUB  = 2'd3   // scaled subtract: D ? A : !B (bipolar)
  } sce_op_e;

  // How a counter reading c (ones in a period of L = 2^N - 1 cycles) is decoded.
  typedef enum logic [1:0] {
    DEC_UNI = 2'd0,  // value = c                       (unipolar product)
    DEC_ADD = 2'd1,  // value = min(2c, L)              (undo the 1/2 of a MUX add)
    DEC_SUB = 2'd2   // value = max(2c - L, 0)          (bipolar read of A - B)
  } dec_mode_e;

  // Default bitstream precision (LFSR length).
  localparam int unsigned SC_N = 12;

  // Fixed-point code of a real number r in [0, 1] with n bits: round(r * (2^n - 1)).
  function automatic int unsigned to_fix(real r, int unsigned n);
    real full;
    full = real'((1 << n) - 1);
    if (r <= 0.0) return 0;
    if (r >= 1.0) return (1 << n) - 1;
    return int'(r * full + 0.5);
  endfunction

  // Feedback tap mask of a maximal-length Fibonacci LFSR of n bits (bit k-1 set
  // for tap k of the polynomial). 12 bits: x^12 + x^6 + x^4 + x + 1.
  function automatic int unsigned lfsr_taps(int unsigned n);
    case (n)
      4:  return 'h00C;   // x^4 + x^3 + 1
      5:  return 'h014;   // x^5 + x^3 + 1
      6:  return 'h030;   // x^6 + x^5 + 1
      7:  return 'h060;   // x^7 + x^6 + 1
      8:  return 'h0B8;   // x^8 + x^6 + x^5 + x^4 + 1
      9:  return 'h110;   // x^9 + x^5 + 1
      10: return 'h240;   // x^10 + x^7 + 1
      11: return 'h500;   // x^11 + x^9 + 1
      12: return 'h829;   // x^12 + x^6 + x^4 + x + 1
      13: return 'h100D;  // x^13 + x^4 + x^3 + x + 1
      14: return 'h2015;  // x^14 + x^5 + x^3 + x + 1
      15: return 'h6000;  // x^15 + x^14 + 1
      16: return 'hD008;  // x^16 + x^15 + x^13 + x^4 + 1
      default: return 'h829;
    endcase
  endfunction

  // Seeds of the LFSRs of the generators of one block. Each generator of a
  // block gets its own seed so that its bitstream is not a copy of another's.
  // With all LFSRs of a block stepping together, the ones counted after a gate
  // depend only on the two seeds, not on when the period starts; the pairs
  // (7, 1) and (8, 10) give the smallest error for the AND with 0.99 that
  // makes currents and traces decay, and (7, 11) with (4, 2) for the MUX the
  // smallest error of the neuron's current-times-gain increment, so the blocks
  // use them there.
  function automatic int unsigned seed(int unsigned idx, int unsigned n);
    int unsigned s;
    case (idx % 12)
      0:  s = 'h001;
      1:  s = 'h5A5;
      2:  s = 'hACE;
      3:  s = 'h3C3;
      4:  s = 'h9F1;
      5:  s = 'h6D2;
      6:  s = 'h2B7;
      7:  s = 'hE4C;
      8:  s = 'h713;
      9:  s = 'hB38;
      10: s = 'h46E;
      default: s = 'hC5B;
    endcase
    s = s & ((1 << n) - 1);
    return (s == 0) ? 1 : s;
  endfunction

endpackage
