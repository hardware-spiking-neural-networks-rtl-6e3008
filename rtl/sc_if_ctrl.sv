// sc_if_ctrl - controller 1 of the SC-IF neuron: a three-state FSM.
//
//   S0  initial / waiting state. A time-step strobe (step) clears the
//       de-randomizing counter and moves to S1.
//   S1  membrane update: the counter integrates the adder bitstream for one
//       period of L = 2^N - 1 cycles (cnt_en), then, in one more cycle
//       (v_load), the new potential is stored. If the comparator reports
//       v_m > v_th (gt) the FSM goes to S2, otherwise back to S0.
//   S2  fire: spike is high for one cycle and the potential is reset to the
//       resting value; then S0.
// A step therefore takes L + 2 cycles, or L + 3 when the neuron fires; step
// must not come again before the FSM is back in S0.
// The three states and their roles follow the source design; the one-period
// timing, the extra load cycle and the return from S1 to S0 are this design's
// choices. Outputs are decoded from the state register.
module sc_if_ctrl #(
  parameter int unsigned N = sc_pkg::SC_N
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,
  input  logic       gt,
  output logic [1:0] state,
  output logic       cnt_clr,
  output logic       cnt_en,
  output logic       v_load,
  output logic       spike
);
  typedef enum logic [1:0] {S0 = 2'd0, S1 = 2'd1, S2 = 2'd2} if_state_e;

  localparam logic [N-1:0] LAST = '1;  // pcnt value of the load cycle

  if_state_e    st;
  logic [N-1:0] pcnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= S0;
      pcnt <= '0;
    end else begin
      unique case (st)
        S0: if (step) begin
          st   <= S1;
          pcnt <= '0;
        end
        S1: begin
          if (pcnt != LAST) pcnt <= pcnt + N'(1);
          else              st   <= gt ? S2 : S0;
        end
        S2:      st <= S0;
        default: st <= S0;
      endcase
    end
  end

  assign state   = st;
  assign cnt_clr = (st == S0) && step;
  assign cnt_en  = (st == S1) && (pcnt != LAST);
  assign v_load  = (st == S1) && (pcnt == LAST);
  assign spike   = (st == S2);

  // A new time step may only start once the previous one is finished.
  a_step_idle : assert property (@(posedge clk) disable iff (!rst_n) step |-> st == S0);
endmodule
