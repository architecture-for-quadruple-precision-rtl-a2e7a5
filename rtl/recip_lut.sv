// recip_lut: reciprocal look-up table of the mantissa divider.
//
// The divisor significand is split as m2 = a1 + a2, where a1 = 1.xxxxxxxx is
// its hidden bit and 8 leading fraction bits.  The table returns a1^-1 for
// the index i = m2[111:104], i.e. a1 = (256 + i) / 256, as a 113-bit number
// with 112 fraction bits.  The table size, 256 x 113, is the design's; the
// entry formula is this design's choice:
//
//     recip[i] = ceil(2^120 / (256 + i))
//
// Rounding up makes recip * a1 >= 1, so the mantissa divider can form the
// series variable as recip * m2 - 1 without going negative.  Entry 0 is
// exactly 2^112 (a1 = 1).  The table is computed at elaboration time and
// read combinationally; it synthesises to a 256 x 113 ROM.
module recip_lut #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 113
) (
  input  logic [$clog2(DEPTH)-1:0] idx,
  output logic [WIDTH-1:0]         recip
);
  localparam int unsigned IW = $clog2(DEPTH);

  // ceil(2^(WIDTH-1+IW) / (DEPTH + i)) by restoring long division.
  function automatic logic [WIDTH-1:0] entry(int unsigned i);
    logic [WIDTH+IW:0] num;
    logic [WIDTH+IW:0] den;
    logic [WIDTH+IW:0] rem;
    logic [WIDTH+IW:0] quo;
    num = '0;
    num[WIDTH - 1 + IW] = 1'b1;
    den = (WIDTH + IW + 1)'(DEPTH + i);
    rem = '0;
    quo = '0;
    for (int b = WIDTH + IW; b >= 0; b--) begin
      rem = {rem[WIDTH+IW-1:0], num[b]};
      if (rem >= den) begin
        rem    = rem - den;
        quo[b] = 1'b1;
      end
    end
    if (rem != '0) quo = quo + 1'b1;
    return quo[WIDTH-1:0];
  endfunction

  logic [WIDTH-1:0] rom [DEPTH];

  for (genvar g = 0; g < DEPTH; g++) begin : g_rom
    localparam logic [WIDTH-1:0] ENTRY = entry(g);
    assign rom[g] = ENTRY;
  end

  assign recip = rom[idx];
endmodule
