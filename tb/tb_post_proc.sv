// tb_post_proc: checks normalisation, rounding and packing.
//
// The expected result is computed here from the value M * 2^(exp-126) as
// integers: the significand is cut to the precision of the mode (plus the
// extra right shift of a sub-normal result), rounded to nearest with ties
// to even from the exact remainder, and packed; overflow gives infinity.
// Random M in (0.5, 2) with exponents around the normal range, exact ties,
// all-ones significands that carry into the exponent, and the special
// classes are covered.
module tb_post_proc;
  import fpdiv_pkg::*;
  import fpdiv_ref_pkg::*;
  mode_e mode;
  logic [127:0] q, result;
  logic [7:0] rshift;
  logic sign, invalid, div_by_zero;
  logic signed [17:0] exp;
  special_e special;
  flags_t flags;
  int checks = 0, failures = 0;
  int n_tie = 0, n_carry = 0, n_sub = 0, n_ovf = 0;

  post_proc dut (.mode, .q, .sign, .exp, .rshift, .special, .invalid, .div_by_zero, .result, .flags);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // expected packed result of a finite M
  function automatic logic [127:0] expect_res(int m, logic [127:0] mm, int e, bit s,
                                              output bit tie, output bit carry);
    int p, msb, er, drop;
    logic [255:0] t, rem, half, mw;
    p = fw_of(m) + 1;
    msb = mm[126] ? 126 : 125;
    er = e - (126 - msb);
    drop = msb - (p - 1);
    if (er < 1) drop = drop + (1 - er);
    if (drop > 200) drop = 200;
    mw   = 256'(mm);
    t    = mw >> drop;
    rem  = mw & ((256'(1) << drop) - 256'(1));
    half = 256'(1) << (drop - 1);
    tie  = (rem == half);
    carry = 0;
    if (rem > half || (rem == half && t[0])) t = t + 256'(1);
    if (er >= 1) begin
      if (t == (256'(1) << p)) begin t = t >> 1; er = er + 1; carry = 1; end
      if (er >= emax_of(m)) return pack(m, s, emax_of(m), '0);
      return pack(m, s, er, 112'(t) & ((112'(1) << fw_of(m)) - 112'(1)));
    end else begin
      if (t == (256'(1) << (p - 1))) return pack(m, s, 1, '0);
      return pack(m, s, 0, 112'(t));
    end
  endfunction

  task automatic try(input int m, input logic [127:0] mm, input int e);
    logic [127:0] ex;
    bit tie, carry;
    mode = mode_e'(m); q = mm; exp = 18'(e); sign = 1'($urandom);
    rshift = (e >= 1) ? 8'd0 : (1 - e > 200) ? 8'd200 : 8'(1 - e);
    special = SPEC_NONE; invalid = 0; div_by_zero = 0;
    #1;
    ex = expect_res(m, mm, e, sign, tie, carry);
    check(result == ex, $sformatf("mode %0d M=%h exp=%0d: %h expected %h", m, mm, e, result, ex));
    if (tie) n_tie++;
    if (carry) n_carry++;
    if (ex[126:112] == 0) begin n_sub++; check(flags.underflow, "underflow flag"); end
    if (ex[126:112] == 15'(emax_of(m))) begin n_ovf++; check(flags.overflow, "overflow flag"); end
  endtask

  initial begin
    logic [127:0] mm;
    int p, bs;
    #1;
    for (int m = 0; m < 4; m++) begin
      p = fw_of(m) + 1; bs = bias_of(m);
      for (int i = 0; i < 4000; i++) begin
        mm = {$urandom, $urandom, $urandom, $urandom};
        mm[127] = 1'b0;
        if (i % 2) mm[126] = 1'b1; else mm[126:125] = 2'b01;
        case (i % 5)
          0: try(m, mm, 2 - int'($urandom % (p + 6)));               // sub-normal range
          1: try(m, mm, emax_of(m) - 2 + int'($urandom % 3));         // overflow edge
          default: try(m, mm, 2 + int'($urandom % (emax_of(m) - 4)));
        endcase
        // exact tie: keep p bits, then a single one just below them
        mm = mm & ~((128'(1) << (127 - p)) - 128'(1));
        mm[126] = 1'b1;
        mm[126 - p] = 1'b1;
        try(m, mm, bs);
        // all ones: rounds up into the next binade
        mm = '0; mm[126:0] = '1;
        try(m, mm, bs);
      end
      // special classes
      q = '0; exp = '0; rshift = '0;
      special = SPEC_NAN; sign = 1; #1;
      check(result == pack(m, 0, emax_of(m), 112'(1) << (fw_of(m) - 1)), "NaN");
      special = SPEC_INF; #1;
      check(result == pack(m, 1, emax_of(m), '0), "infinity");
      special = SPEC_ZERO; #1;
      check(result == pack(m, 1, 0, '0), "zero");
      invalid = 1; div_by_zero = 1; #1;
      check(flags.invalid && flags.div_by_zero, "flags pass through");
    end
    check(n_tie > 0 && n_carry > 0 && n_sub > 0 && n_ovf > 0, "coverage");
    $display("ties=%0d carries=%0d subnormal=%0d overflow=%0d", n_tie, n_carry, n_sub, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
