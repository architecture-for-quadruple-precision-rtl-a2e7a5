// mant_div: series-expansion mantissa divider with one shared 114x114
// multiplier.
//
// Method.  The divisor significand is split as m2 = a1 + a2 (a1 = hidden bit
// and 8 leading fraction bits).  With r = a1^-1 from recip_lut and
// x = r*m2 - 1 (equal to a1^-1*a2 for an exact r), the quotient is
//     q = m1/m2 = A/(1+x) = A - A*(x - x^2)(1 + x^2 + x^4 + x^6)(1 + x^8)
// with A = m1*r.  Since x < 2^-8 the truncated series is accurate to about
// 2^-136 for QP.  The lower precisions drop factors: DPE keeps x^2..x^6,
// DP keeps x^2 and x^4, SP keeps only (x - x^2).  Terms, as named here:
//     A = m1*r   B = x   C = x^2   D = x^4   E = x^6   F = x^8
//     G = B - C  H_T = 1 + C + D   H = H_T + E   I = 1 + F
//     J = G*H    K = J*I   L = A*K   M = A - L   (M = q)
//
// Schedule.  div_fsm steps through S0..S10; in every state the operand
// registers in1/in2 are loaded, and the product of the registers is seen on
// the multiplier output during the next state, where it is captured:
//     S0: in1=m1,  in2=r
//     S1: A=P;     in1=m2,  in2=r
//     S2: B=P;     in1=in2=B
//     S3: C=P, G=B-C;      in1=in2=C
//     S4: D=P, H_T=1+C+D;  in1=C, in2=D           (SP skips S4..S7)
//     S5: E=P;     in1=in2=D                     (DP skips S5)
//     S6: F=P, I=1+F;      in1=G, in2 = DP ? H_T : H_T+E
//     S7: J=P;     in1=J,  in2=I                 (QP only)
//     S8: K=P (QP) or J=P; in1 = SP ? G : K/J, in2 = A
//     S9: L=P
//     S10: M = A - L, registered; q_valid is high the next cycle.
// This state-by-state assignment follows the design.  The fixed-point
// formats are this design's own (value = integer * 2^-s):
//     m1, m2, r : s=112    A : 128 bits s=126    B, G : 114 bits s=121
//     C copy for D, E : s=110    D copy for E, F : s=124
//     H_T, H, I : s=113 (1 integer bit)    J, K : s=120
//     L, M : s=126 (M is 2.126, value in (0.5, 2)).
// Forming x as r*m2 - 1 rather than r*a2 (also this design's choice) makes
// the rounding error of the 113-bit table entry cancel; the table rounds up,
// so x >= 0.  All truncations together keep |M - q| below about 2^-117.
//
// Interface: `start` is taken while `idle` (S10); m1, m2, r and mode must be
// stable until the next start.  The edge that takes start moves the FSM to
// S0; M is registered at the edge that leaves (or stays in) S10, so q_valid
// rises 7 / 9 / 10 / 11 edges after start for SP / DP / DPE / QP and lasts
// one cycle; q then holds M until the next result.
module mant_div
  import fpdiv_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  mode_e             mode,
  input  logic [112:0]      m1,
  input  logic [112:0]      m2,
  input  logic [112:0]      recip,
  output logic              idle,
  output state_e            state,
  output logic              q_valid,
  output logic [127:0]      q
);
  logic [113:0] in1, in2;
  logic [227:0] p;
  logic [127:0] a_q;          // A, s=126
  logic [113:0] b_q;          // B, s=121
  logic [113:0] g_q;          // G, s=121
  logic [95:0]  c_d;          // C, s=110 (operand copy)
  logic [98:0]  c_h;          // C, s=113
  logic [95:0]  d_d;          // D, s=124 (operand copy)
  logic [113:0] ht_q;         // H_T, s=113
  logic [70:0]  e_h;          // E, s=113
  logic [113:0] i_q;          // I, s=113
  logic [121:0] l_q;          // L, s=126
  logic         l_valid;
  logic         fsm_done;

  // combinational values of the states that form them
  logic [113:0] g_next, ht_next, h_full, i_next, jk_next;

  div_fsm u_fsm (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start),
    .mode (mode),
    .state(state),
    .done (fsm_done)
  );

  mult114 u_mult (.a(in1), .b(in2), .p(p));

  assign idle = fsm_done;

  assign g_next  = b_q - 114'(p[227:121]);
  assign ht_next = {1'b1, 113'd0} + 114'(c_h) + 114'(p[191:107]);
  assign h_full  = ht_q + 114'(e_h);
  assign i_next  = {1'b1, 113'd0} + 114'(p[191:135]);
  // K (QP: J*I, s=233) or J (DP/DPE: G*H, s=234), both to s=120
  assign jk_next = (mode == MODE_QP) ? p[226:113] : p[227:114];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in1     <= '0;
      in2     <= '0;
      a_q     <= '0;
      b_q     <= '0;
      g_q     <= '0;
      c_d     <= '0;
      c_h     <= '0;
      d_d     <= '0;
      ht_q    <= '0;
      e_h     <= '0;
      i_q     <= '0;
      l_q     <= '0;
      l_valid <= 1'b0;
      q_valid <= 1'b0;
      q       <= '0;
    end else begin
      l_valid <= (state == S9);
      q_valid <= l_valid;
      if (l_valid) q <= a_q - 128'(l_q);
      unique case (state)
        S0: begin
          in1 <= {1'b0, m1};
          in2 <= {1'b0, recip};
        end
        S1: begin
          a_q <= p[225:98];
          in1 <= {1'b0, m2};
          in2 <= {1'b0, recip};
        end
        S2: begin
          b_q <= p[216:103];
          in1 <= p[216:103];
          in2 <= p[216:103];
        end
        S3: begin
          g_q <= g_next;
          c_d <= p[227:132];
          c_h <= p[227:129];
          in1 <= 114'(p[227:132]);
          in2 <= 114'(p[227:132]);
        end
        S4: begin
          ht_q <= ht_next;
          d_d  <= p[191:96];
          in1  <= 114'(c_d);
          in2  <= 114'(p[191:96]);
        end
        S5: begin
          e_h <= p[191:121];
          in1 <= 114'(d_d);
          in2 <= 114'(d_d);
        end
        S6: begin
          i_q <= i_next;
          in1 <= g_q;
          in2 <= (mode == MODE_DP) ? ht_q : h_full;
        end
        S7: begin
          in1 <= p[227:114];      // J
          in2 <= i_q;
        end
        S8: begin
          in1 <= (mode == MODE_SP) ? g_q : jk_next;
          in2 <= a_q[127:14];
        end
        S9: begin
          l_q <= (mode == MODE_SP) ? {1'b0, p[227:107]} : p[227:106];
          in1 <= '0;
          in2 <= '0;
        end
        default: begin
          in1 <= '0;
          in2 <= '0;
        end
      endcase
    end
  end

`ifndef SYNTHESIS
  // The series variable must stay below 2^-7 (B field), and the operands
  // must not change while an operation is in flight.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S3) |-> (b_q[113] == 1'b0))
    else $error("mant_div: series variable out of range");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state != S10 && state != S0) |-> $stable(m2))
    else $error("mant_div: divisor changed during an operation");
`endif
endmodule
