// fp_unpack: first-stage operand unpacking for the multi-precision divider.
//
// Extracts sign, exponent and fraction of one operand from the unified
// 128-bit register format (sign at bit 127, exponent field ending at bit 112,
// fraction starting at bit 111; field widths depend on the mode), classifies
// it as zero, infinity or NaN, and normalises sub-normal operands so that the
// mantissa divider always receives a significand 1.xxx with the hidden one at
// bit 112.  Bits outside the fields of the selected mode are ignored.
//
// Interface: combinational.  `exp` is the biased exponent as a signed value;
// for a sub-normal input it is 1 - (shift applied), so it can be zero or
// negative.  For zero, infinity and NaN `exp`/`mant` carry no meaning.
//
// The field positions follow the register format of the design; the
// sub-normal normalisation by leading-zero count and shift is this design's
// choice of the "typical method".
module fp_unpack
  import fpdiv_pkg::*;
(
  input  mode_e                       mode,
  input  logic [WORD_W-1:0]           x,
  output logic                        sign,
  output logic signed [EXP_W-1:0]     exp,
  output logic [MANT_W-1:0]           mant,
  output logic                        is_zero,
  output logic                        is_inf,
  output logic                        is_nan
);
  logic [14:0]  exp_mask, e_field;
  logic [111:0] frac_mask, frac;
  logic [6:0]   lz;
  logic         e_zero, e_max, f_zero;

  always_comb begin
    exp_mask  = exp_max(mode);
    frac_mask = ~((112'(1) << frac_lsb(mode)) - 112'(1));
  end

  assign sign    = x[127];
  assign e_field = x[126:112] & exp_mask;
  assign frac    = x[111:0] & frac_mask;

  lzc #(.W(112)) u_lzc (.d(frac), .count(lz));

  assign e_zero  = (e_field == '0);
  assign e_max   = (e_field == exp_mask);
  assign f_zero  = (frac == '0);
  assign is_zero = e_zero && f_zero;
  assign is_inf  = e_max && f_zero;
  assign is_nan  = e_max && !f_zero;

  always_comb begin
    if (e_zero) begin
      // sub-normal: value 0.f * 2^(1-bias) = 1.f' * 2^(1-bias-(lz+1))
      mant = MANT_W'({1'b0, frac} << (lz + 7'd1));
      exp  = -EXP_W'(signed'({1'b0, lz}));
    end else begin
      mant = {1'b1, frac};
      exp  = EXP_W'(signed'({1'b0, e_field}));
    end
  end
endmodule
