// div_fsm: state machine of the mantissa divider.
//
// Eleven states S0..S10.  Each state decides what the shared multiplier
// computes (see mant_div); the mode decides which states are needed:
//     QP : S0 S1 S2 S3 S4 S5 S6 S7 S8 S9 S10   (11 cycles)
//     DPE: S0 S1 S2 S3 S4 S5 S6    S8 S9 S10   (10 cycles, no x^8 factor)
//     DP : S0 S1 S2 S3 S4    S6    S8 S9 S10   ( 9 cycles, no x^6 and x^8)
//     SP : S0 S1 S2 S3             S8 S9 S10   ( 7 cycles)
// S10 is the Done state; the FSM rests there after reset and between
// operations and leaves it for S0 when `start` is high.  The state list,
// the skips and the cycle counts follow the design; idling in S10 is this
// design's choice.  `done` is high in S10.
module div_fsm
  import fpdiv_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  mode_e  mode,
  output state_e state,
  output logic   done
);
  state_e nxt;

  always_comb begin
    unique case (state)
      S0:  nxt = S1;
      S1:  nxt = S2;
      S2:  nxt = S3;
      S3:  nxt = (mode == MODE_SP) ? S8 : S4;
      S4:  nxt = (mode == MODE_DP) ? S6 : S5;
      S5:  nxt = S6;
      S6:  nxt = (mode == MODE_QP) ? S7 : S8;
      S7:  nxt = S8;
      S8:  nxt = S9;
      S9:  nxt = S10;
      S10: nxt = start ? S0 : S10;
      default: nxt = S10;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S10;
    else        state <= nxt;
  end

  assign done = (state == S10);
endmodule
