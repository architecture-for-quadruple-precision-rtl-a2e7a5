// lzc: leading-zero counter.
//
// Counts the zeros above the most significant one of `d`.  An all-zero
// input returns W.  Purely combinational; a plain priority scan that
// synthesis turns into a tree.  Used to normalise sub-normal significands.
module lzc #(
  parameter int unsigned W  = 112,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  d,
  output logic [CW-1:0] count
);
  always_comb begin
    count = CW'(W);
    for (int i = 0; i < W; i++) begin
      if (d[i]) count = CW'(W - 1 - i);
    end
  end
endmodule
