// fpdiv_ref_pkg: reference arithmetic for the divider testbenches.
//
// Works on the unified 128-bit register format with plain wide-integer
// arithmetic, independently of the RTL: it unpacks an operand to an integer
// significand and exponent, divides the significands exactly by long
// division at 240 extra bits, and packs the truncated quotient.  A faithful
// divider must return either that truncated quotient or, when the division
// is inexact, the next representable number above it.
package fpdiv_ref_pkg;

  // mode: 0 SP, 1 DP, 2 DPE, 3 QP
  function automatic int ew_of(int mode);
    return (mode == 0) ? 8 : (mode == 1) ? 11 : 15;
  endfunction
  function automatic int fw_of(int mode);   // fraction bits
    return (mode == 0) ? 23 : (mode == 1) ? 52 : (mode == 2) ? 64 : 112;
  endfunction
  function automatic int bias_of(int mode);
    return (1 << (ew_of(mode) - 1)) - 1;
  endfunction
  function automatic int emax_of(int mode);
    return (1 << ew_of(mode)) - 1;
  endfunction

  function automatic logic [127:0] pack(int mode, bit s, int e_field, logic [111:0] frac);
    logic [127:0] w;
    w = '0;
    w[127] = s;
    w[126:112] = 15'(e_field);
    w[111:0] = frac << (112 - fw_of(mode));
    return w;
  endfunction

  // random operand with biased exponent in [elo, ehi] and random fraction
  function automatic logic [127:0] rand_op(int mode, int elo, int ehi);
    logic [111:0] f;
    int e;
    f = 112'({$urandom, $urandom, $urandom, $urandom});
    f = f & ((112'(1) << fw_of(mode)) - 112'(1));
    e = elo + int'($urandom % (ehi - elo + 1));
    return pack(mode, 1'($urandom), e, f);
  endfunction

  // significand (integer, hidden bit at fw) and exponent of a finite operand:
  // value = sig * 2^(e - fw)
  function automatic void unpack(int mode, logic [127:0] w, output logic [112:0] sig, output int e);
    int ef;
    logic [111:0] f;
    ef = int'(w[126:112]) & emax_of(mode);
    f  = w[111:0] >> (112 - fw_of(mode));
    if (ef == 0) begin
      sig = 113'(f);
      e   = 1 - bias_of(mode);
    end else begin
      sig = 113'(f) | (113'(1) << fw_of(mode));
      e   = ef - bias_of(mode);
    end
  endfunction

  // Truncated quotient of two finite non-zero operands, packed without sign.
  // Sets inexact when the exact quotient is not representable, ovf when the
  // truncated quotient is above the largest finite number.
  function automatic logic [127:0] div_trunc(int mode, logic [127:0] a, logic [127:0] b,
                                            output bit inexact, output bit ovf);
    logic [112:0] sa, sb;
    int ea, eb, msb, eb_res, drop, p;
    logic [511:0] num, qq, rr, t;
    unpack(mode, a, sa, ea);
    unpack(mode, b, sb, eb);
    p   = fw_of(mode) + 1;
    num = 512'(sa) << 240;
    qq  = num / 512'(sb);
    rr  = num % 512'(sb);
    msb = 0;
    for (int i = 0; i < 512; i++) if (qq[i]) msb = i;
    // value = qq * 2^(ea - eb - 240); its leading bit has weight msb - 240 + ea - eb
    eb_res = msb - 240 + ea - eb + bias_of(mode);
    drop   = msb - (p - 1);
    if (eb_res < 1) drop = drop + (1 - eb_res);
    if (drop > 500) drop = 500;
    t = qq >> drop;
    inexact = (rr != 0) || ((qq & ~({512{1'b1}} << drop)) != 0);
    ovf = 0;
    if (eb_res < 1) begin
      return pack(mode, 0, 0, 112'(t));
    end else begin
      if (eb_res >= emax_of(mode)) ovf = 1;
      return pack(mode, 0, eb_res, 112'(t) & ((112'(1) << fw_of(mode)) - 112'(1)));
    end
  endfunction

  // next representable magnitude above a packed positive value
  function automatic logic [127:0] next_up(int mode, logic [127:0] w);
    logic [127:0] u;
    u = (w >> (112 - fw_of(mode))) + 128'(1);
    return u << (112 - fw_of(mode));
  endfunction

endpackage
