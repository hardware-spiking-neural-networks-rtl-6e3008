// sc_pstdp_ctrl - controller 2 of the SC-PSTDP learning rule: a seven-state FSM.
//
//   S0  initial / waiting state. On a time-step strobe it clears the counters
//       and branches: presynaptic spike pending -> S2, else postsynaptic spike
//       pending -> S3, else S1. The spike taken is acknowledged (ack_pre /
//       ack_post); a spike of the other kind stays pending for the next step.
//   S1  no spike: the traces decay for one bitstream period, then S0.
//   S2  presynaptic trace increased for one period, then S4.
//   S3  postsynaptic trace increased for one period, then S5.
//   S4  depression: weight change from the postsynaptic trace, one period, then S6.
//   S5  potentiation: weight change from the presynaptic trace, one period, then S6.
//   S6  the new weight is written (w_update, one cycle), then S0.
// Each period is L = 2^N - 1 counting cycles (cnt_en) and one cycle (load) in
// which the datapath stores the counter readings; the counters are cleared in
// that same cycle. A step takes L + 2 cycles without a spike and 2L + 4 with
// one. The seven states and the branch conditions follow the source design;
// the return S1 -> S0, the priority of a presynaptic spike and the period
// timing are this design's choices. Outputs are decoded from the state.
module sc_pstdp_ctrl #(
  parameter int unsigned N = sc_pkg::SC_N
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,
  input  logic       pre_pend,
  input  logic       post_pend,
  output logic [2:0] state,
  output logic       cnt_clr,
  output logic       cnt_en,
  output logic       load,
  output logic       w_update,
  output logic       ack_pre,
  output logic       ack_post
);
  typedef enum logic [2:0] {
    S0 = 3'd0, S1 = 3'd1, S2 = 3'd2, S3 = 3'd3, S4 = 3'd4, S5 = 3'd5, S6 = 3'd6
  } pstdp_state_e;

  localparam logic [N-1:0] LAST = '1;

  pstdp_state_e st;
  logic [N-1:0] pcnt;
  logic         counting;

  assign counting = (st == S1) || (st == S2) || (st == S3) || (st == S4) || (st == S5);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= S0;
      pcnt <= '0;
    end else begin
      pcnt <= '0;
      unique case (st)
        S0: if (step) begin
          if (pre_pend)       st <= S2;
          else if (post_pend) st <= S3;
          else                st <= S1;
        end
        S1, S2, S3, S4, S5: begin
          if (pcnt != LAST) pcnt <= pcnt + N'(1);
          else begin
            unique case (st)
              S2:      st <= S4;
              S3:      st <= S5;
              S4, S5:  st <= S6;
              default: st <= S0;
            endcase
          end
        end
        S6:      st <= S0;
        default: st <= S0;
      endcase
    end
  end

  assign state    = st;
  assign cnt_en   = counting && (pcnt != LAST);
  assign load     = counting && (pcnt == LAST);
  assign cnt_clr  = ((st == S0) && step) || load;
  assign w_update = (st == S6);
  assign ack_pre  = (st == S0) && step && pre_pend;
  assign ack_post = (st == S0) && step && !pre_pend && post_pend;

  a_step_idle : assert property (@(posedge clk) disable iff (!rst_n) step |-> st == S0);
endmodule
