// tb_fp_unpack: checks operand unpacking in all four modes.  Normal
// operands must give {1, fraction} and the exponent field; sub-normal ones
// a significand with the hidden bit set that, shifted back right by
// 1 - exp, gives the fraction again; zero, infinity and NaN must be
// classified; bits outside the mode's fields must be ignored.
module tb_fp_unpack;
  import fpdiv_pkg::*;
  import fpdiv_ref_pkg::*;
  mode_e        mode;
  logic [127:0] x;
  logic         sign, is_zero, is_inf, is_nan;
  logic signed [17:0] exp;
  logic [112:0] mant;
  int checks = 0, failures = 0;

  fp_unpack dut (.mode, .x, .sign, .exp, .mant, .is_zero, .is_inf, .is_nan);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [111:0] f;
    logic [127:0] junk;
    int fw, ew, e;
    for (int m = 0; m < 4; m++) begin
      mode = mode_e'(m);
      fw = fw_of(m); ew = ew_of(m);
      for (int i = 0; i < 3000; i++) begin
        f = {$urandom, $urandom, $urandom, $urandom};
        f = f & ((112'(1) << fw) - 112'(1));
        case (i % 4)
          0, 1: e = 1 + int'($urandom % (emax_of(m) - 1));
          2:    e = 0;
          default: e = (i % 8 == 3) ? emax_of(m) : 0;
        endcase
        if (i % 16 == 7) f = '0;
        x = pack(m, 1'($urandom), e, f);
        // junk in the bits no field of this mode uses
        junk = {$urandom, $urandom, $urandom, $urandom};
        junk[127] = 1'b0;
        junk[111:0] = junk[111:0] & ((112'(1) << (112 - fw)) - 112'(1));
        junk[126:112] = junk[126:112] & ~15'((1 << ew) - 1);
        x = x | junk;
        #1;
        check(sign == x[127], "sign");
        if (e == emax_of(m)) begin
          check(is_inf == (f == 0) && is_nan == (f != 0) && !is_zero,
                $sformatf("mode %0d inf/nan %h", m, x));
        end else if (e == 0 && f == 0) begin
          check(is_zero && !is_inf && !is_nan, $sformatf("mode %0d zero %h", m, x));
        end else if (e == 0) begin
          check(!is_zero && !is_inf && !is_nan && mant[112] && exp <= 0 &&
                (mant >> (1 - exp)) == (113'(f) << (112 - fw)) &&
                (mant & ((113'(1) << (1 - exp)) - 113'(1))) == 0,
                $sformatf("mode %0d subnormal %h: exp=%0d mant=%h", m, x, exp, mant));
        end else begin
          check(!is_zero && !is_inf && !is_nan && exp == e &&
                mant == ((113'(1) << 112) | (113'(f) << (112 - fw))),
                $sformatf("mode %0d normal %h: exp=%0d mant=%h", m, x, exp, mant));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
