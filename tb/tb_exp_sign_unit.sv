// tb_exp_sign_unit: checks the unified bias (127 / 1023 / 16383 / 16383),
// the quotient sign and exponent e_a - e_b + bias on random exponents, and
// the right-shift amount 1 - exponent of sub-normal results, and the table
// of special results and flags.
module tb_exp_sign_unit;
  import fpdiv_pkg::*;
  mode_e mode;
  logic sign_a, sign_b, zero_a, inf_a, nan_a, zero_b, inf_b, nan_b;
  logic signed [17:0] exp_a, exp_b, exp_q;
  logic sign_q, invalid, div_by_zero;
  logic [14:0] bias;
  logic [7:0] rshift;
  special_e special;
  int checks = 0, failures = 0;

  exp_sign_unit dut (.*);

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

  // expected class for operand classes {zero, inf, nan} of a and b
  task automatic try_special(input bit za, ia, na, zb, ib, nb,
                             input special_e s, input bit inv, input bit dbz);
    {zero_a, inf_a, nan_a, zero_b, inf_b, nan_b} = {za, ia, na, zb, ib, nb};
    #1;
    check(special == s && invalid == inv && div_by_zero == dbz,
          $sformatf("special %b%b%b/%b%b%b -> %0d", za, ia, na, zb, ib, nb, special));
  endtask

  initial begin
    int bs[4] = '{127, 1023, 16383, 16383};
    zero_a = 0; inf_a = 0; nan_a = 0; zero_b = 0; inf_b = 0; nan_b = 0;
    #1;
    for (int m = 0; m < 4; m++) begin
      mode = mode_e'(m);
      for (int i = 0; i < 500; i++) begin
        sign_a = 1'($urandom); sign_b = 1'($urandom);
        exp_a = 18'(int'($urandom % 32767) - 112);
        exp_b = 18'(int'($urandom % 32767) - 112);
        #1;
        check(bias == 15'(bs[m]), $sformatf("bias mode %0d = %0d", m, bias));
        check(sign_q == (sign_a ^ sign_b), "sign");
        check(int'(exp_q) == int'(exp_a) - int'(exp_b) + bs[m],
              $sformatf("exp %0d - %0d + %0d = %0d", exp_a, exp_b, bs[m], exp_q));
        check(int'(rshift) == ((int'(exp_q) >= 1) ? 0 : (1 - int'(exp_q) > 200) ? 200 : 1 - int'(exp_q)),
              $sformatf("rshift for exp %0d = %0d", exp_q, rshift));
        check(special == SPEC_NONE && !invalid && !div_by_zero, "normal operands");
      end
    end
    try_special(0,0,1, 0,0,0, SPEC_NAN, 0, 0);
    try_special(0,0,0, 0,0,1, SPEC_NAN, 0, 0);
    try_special(1,0,0, 0,0,1, SPEC_NAN, 0, 0);
    try_special(1,0,0, 1,0,0, SPEC_NAN, 1, 0);
    try_special(0,1,0, 0,1,0, SPEC_NAN, 1, 0);
    try_special(0,1,0, 0,0,0, SPEC_INF, 0, 0);
    try_special(0,1,0, 1,0,0, SPEC_INF, 0, 0);
    try_special(0,0,0, 1,0,0, SPEC_INF, 0, 1);
    try_special(1,0,0, 0,0,0, SPEC_ZERO, 0, 0);
    try_special(0,0,0, 0,1,0, SPEC_ZERO, 0, 0);
    try_special(1,0,0, 0,1,0, SPEC_ZERO, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
