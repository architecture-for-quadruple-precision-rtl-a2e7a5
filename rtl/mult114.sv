// mult114: single-stage 114 x 114 unsigned multiplier, p = a * b.
//
// The operands are cut into three 38-bit parts, a = a2*2^76 + a1*2^38 + a0,
// and combined by a 3-partition Karatsuba step that needs six products:
//     p00 = a0*b0, p11 = a1*b1, p22 = a2*b2               (38 x 38)
//     m01 = (a0+a1)(b0+b1), m02 = (a0+a2)(b0+b2),
//     m12 = (a1+a2)(b1+b2)                                (39 x 39)
//     a*b = p22*2^152 + (m12-p11-p22)*2^114
//         + (m02-p00-p22+p11)*2^76 + (m01-p00-p11)*2^38 + p00
// Every one of the six products is a kara39 unit (one 19x19, one 20x20 and
// one 21x21 multiplier), 18 small multipliers in all, the number of DSP
// blocks quoted for this multiplier.  This decomposition follows the design;
// the low/high split of the 39-bit parts is this design's choice.
// Combinational, no pipeline registers: the product of the operand
// registers is used in the next FSM state.
module mult114 (
  input  logic [113:0] a,
  input  logic [113:0] b,
  output logic [227:0] p
);
  logic [37:0] a0, a1, a2, b0, b1, b2;
  logic [38:0] sa01, sa02, sa12, sb01, sb02, sb12;
  logic [77:0] p00, p11, p22, m01, m02, m12;
  logic [78:0] t1, t2, t3;

  assign {a2, a1, a0} = a;
  assign {b2, b1, b0} = b;
  assign sa01 = 39'(a0) + 39'(a1);
  assign sa02 = 39'(a0) + 39'(a2);
  assign sa12 = 39'(a1) + 39'(a2);
  assign sb01 = 39'(b0) + 39'(b1);
  assign sb02 = 39'(b0) + 39'(b2);
  assign sb12 = 39'(b1) + 39'(b2);

  kara39 u_p00 (.x({1'b0, a0}), .y({1'b0, b0}), .p(p00));
  kara39 u_p11 (.x({1'b0, a1}), .y({1'b0, b1}), .p(p11));
  kara39 u_p22 (.x({1'b0, a2}), .y({1'b0, b2}), .p(p22));
  kara39 u_m01 (.x(sa01), .y(sb01), .p(m01));
  kara39 u_m02 (.x(sa02), .y(sb02), .p(m02));
  kara39 u_m12 (.x(sa12), .y(sb12), .p(m12));

  // middle coefficients; each is a non-negative sum of cross products
  assign t1 = 79'(m01) - 79'(p00) - 79'(p11);
  assign t2 = 79'(m02) - 79'(p00) - 79'(p22) + 79'(p11);
  assign t3 = 79'(m12) - 79'(p11) - 79'(p22);

  assign p = (228'(p22) << 152) + (228'(t3) << 114) + (228'(t2) << 76)
           + (228'(t1) << 38) + 228'(p00);
endmodule
