// kara39: 39 x 39 unsigned multiplier by one 2-partition Karatsuba step.
//
// Each operand is split into a low 20-bit and a high 19-bit part:
//     x = xh*2^20 + xl,  y = yh*2^20 + yl
//     x*y = hh*2^40 + (mm - hh - ll)*2^20 + ll
// with hh = xh*yh (19x19), ll = xl*yl (20x20) and mm = (xh+xl)*(yh+yl)
// (21x21).  Three small multipliers replace four; each is sized to fit one
// DSP block plus a little logic.  The same unit serves as the 38 x 38
// multiplier of the 114-bit multiplier (upper bit tied to zero).
// Combinational.
module kara39 (
  input  logic [38:0] x,
  input  logic [38:0] y,
  output logic [77:0] p
);
  logic [18:0] xh, yh;
  logic [19:0] xl, yl;
  logic [20:0] xs, ys;
  logic [37:0] hh;
  logic [39:0] ll;
  logic [41:0] mm;
  logic [41:0] mid;

  assign xh = x[38:20];
  assign xl = x[19:0];
  assign yh = y[38:20];
  assign yl = y[19:0];
  assign xs = 21'(xh) + 21'(xl);
  assign ys = 21'(yh) + 21'(yl);

  assign hh  = 38'(xh) * 38'(yh);   // 19 x 19
  assign ll  = 40'(xl) * 40'(yl);   // 20 x 20
  assign mm  = 42'(xs) * 42'(ys);   // 21 x 21
  assign mid = mm - 42'(hh) - 42'(ll);

  assign p = (78'(hh) << 40) + (78'(mid) << 20) + 78'(ll);
endmodule
