// sc_counter - de-randomizer: turns a bitstream back into a binary number.
//
// While en is high the counter adds bit_i every cycle; clr (priority over en)
// empties it. After one period of L = 2^N - 1 counted cycles, count holds the
// number of ones, c, and value decodes it according to mode:
//   DEC_UNI : value = c                    (stream was a unipolar number)
//   DEC_ADD : value = min(2c, L)           (stream was a MUX sum (A + B) / 2)
//   DEC_SUB : value = max(2c - L, 0)       (stream was NOT+MUX, read as bipolar A - B)
// Saturation at 0 and 1.0 keeps every stored quantity inside [0, 1].
// Counting the ones follows the source design; the decode modes are this
// design's way of undoing the 1/2 scale of the MUX adder. count is registered;
// value is combinational from count and mode.
module sc_counter #(
  parameter int unsigned N = sc_pkg::SC_N
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                en,
  input  logic                bit_i,
  input  sc_pkg::dec_mode_e   mode,
  output logic [N-1:0]        count,
  output logic [N-1:0]        value
);
  localparam logic [N:0] L = {1'b0, {N{1'b1}}};

  logic [N:0] twice;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) count <= '0;
    else if (en)       count <= count + N'(bit_i);
  end

  assign twice = {count, 1'b0};

  always_comb begin
    unique case (mode)
      sc_pkg::DEC_ADD: value = (twice > L) ? L[N-1:0] : twice[N-1:0];
      sc_pkg::DEC_SUB: value = (twice > L) ? N'(twice - L) : '0;
      default:         value = count;
    endcase
  end
endmodule
