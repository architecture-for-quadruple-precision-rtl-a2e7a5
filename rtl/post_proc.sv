// post_proc: post-processing stage of the divider.
//
// Takes the significand quotient M (2.126 fixed point, value in (0.5, 2))
// from mant_div together with the sign, exponent and special class decided
// in the first stage, and produces the packed result:
//   1. normalisation: if M < 1 it is shifted left by one and the exponent
//      drops by one;
//   2. sub-normal results: if the exponent is below 1 the significand is
//      shifted right by 1 - exponent (the amount `rshift` comes from the
//      exponent unit, plus one when step 1 shifted left), the bits shifted
//      out feed the sticky;
//   3. rounding to nearest, ties to even, at the precision of the mode
//      (24, 53, 65 or 113 significant bits); a carry out of the significand
//      raises the exponent (or turns a sub-normal into a normal number);
//   4. final processing: overflow to infinity, special results (zero,
//      infinity, quiet NaN) and packing into the unified register format.
// Because M itself is an approximation (error far below half an ulp), the
// rounded result is faithful: within one ulp of the exact quotient.
//
// Interface: combinational; the top registers its outputs.  The steps
// follow the design's description of this stage; the tie-to-even rule, the
// NaN encoding (quiet NaN, positive, top fraction bit set) and the flags
// are this design's choices.  There is no inexact flag: M carries an error
// of a small fraction of an ulp, so its low bits cannot tell an exact
// quotient from an inexact one; for the same reason the underflow flag is
// raised for every tiny result, exact or not.
module post_proc
  import fpdiv_pkg::*;
(
  input  mode_e                    mode,
  input  logic [127:0]             q,
  input  logic                     sign,
  input  logic signed [EXP_W-1:0]  exp,
  input  logic [7:0]               rshift,
  input  special_e                 special,
  input  logic                     invalid,
  input  logic                     div_by_zero,
  output logic [WORD_W-1:0]        result,
  output flags_t                   flags
);
  logic [126:0]            n_norm;     // 1.126
  logic signed [EXP_W-1:0] e_norm;
  logic [8:0]              sh;         // right shift for sub-normal results
  logic [126:0]            n_sh;
  logic                    sticky_sh;
  int unsigned             pos;        // weight position of the result lsb
  logic [126:0]            n_trunc;
  logic                    guard, sticky, rnd_up;
  logic [113:0]            rounded;
  logic                    tiny;
  logic signed [EXP_W-1:0] e_fin;
  logic [14:0]             e_field;
  logic [111:0]            frac;
  int unsigned             prec;

  always_comb begin
    // 1. normalise
    if (q[126]) begin
      n_norm = q[126:0];
      e_norm = exp;
    end else begin
      n_norm = {q[125:0], 1'b0};
      e_norm = exp - EXP_W'(1);
    end

    // 2. sub-normal right shift
    // rshift = 1 - exp from the exponent unit (0 if exp >= 1), one more if
    // the normalisation above lowered the exponent to or below zero
    tiny = (e_norm < EXP_W'(1));
    sh   = 9'(rshift) + 9'(tiny && !q[126]);
    if (sh > 9'd127) sh = 9'd127;
    n_sh      = n_norm >> sh;
    sticky_sh = |(n_norm & ~({127{1'b1}} << sh));

    // 3. round to nearest even at the precision of the mode
    prec    = 112 - frac_lsb(mode) + 1;
    pos     = 127 - prec;
    n_trunc = n_sh >> pos;
    guard   = n_sh[pos-1];
    sticky  = sticky_sh | (|(n_sh & ~({127{1'b1}} << (pos - 1))));
    rnd_up  = guard && (sticky || n_trunc[0]);
    rounded = 114'(n_trunc) + 114'(rnd_up);

    e_fin = tiny ? EXP_W'(0) : e_norm;
    if (rounded[prec]) begin
      // carry out of a normal significand
      rounded = rounded >> 1;
      e_fin   = e_fin + EXP_W'(1);
    end else if (tiny && rounded[prec-1]) begin
      // a sub-normal rounded up to the smallest normal number
      e_fin = EXP_W'(1);
    end
    frac = 112'(rounded) & ~({112{1'b1}} << (prec - 1));

    // 4. final processing
    flags             = '0;
    flags.invalid     = invalid;
    flags.div_by_zero = div_by_zero;
    e_field           = 15'(e_fin);
    result            = '0;
    unique case (special)
      SPEC_NAN: begin
        result[126:112] = exp_max(mode);
        result[111]     = 1'b1;
      end
      SPEC_INF: begin
        result[127]     = sign;
        result[126:112] = exp_max(mode);
      end
      SPEC_ZERO: begin
        result[127] = sign;
      end
      default: begin
        result[127] = sign;
        if (e_fin >= EXP_W'(signed'({3'b0, exp_max(mode)}))) begin
          result[126:112] = exp_max(mode);
          flags.overflow  = 1'b1;
        end else begin
          result[126:112] = e_field;
          result[111:0]   = frac << frac_lsb(mode);
          flags.underflow = tiny;
        end
      end
    endcase
  end
endmodule
