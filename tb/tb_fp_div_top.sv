// tb_fp_div_top: end-to-end test of the multi-precision divider at its
// default (and only) configuration.
//
// Drives operations through the valid/ready handshake and checks, for every
// result, that it is faithful: equal to the truncated exact quotient or, if
// the division is inexact, to the next number above it (sign separately).
// In SP mode, whose series stops at x^2, a result one ulp above that pair
// is accepted and counted.  The reference divides the integer significands exactly (fpdiv_ref_pkg).
// Covered: random normal operands in all four modes, sub-normal operands and
// results, overflow, zero / infinity / NaN operands and the flags, round-up
// carries into the exponent.  The latency (9/11/12/13 cycles) and the issue
// interval of a back-to-back stream (8/10/11/12 cycles) are measured per
// mode.  Each mechanism is counted; one that never happened is a failure.
module tb_fp_div_top;
  import fpdiv_pkg::*;
  import fpdiv_ref_pkg::*;

  localparam int N_RAND = 100000;  // random normal divisions per mode

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic         in_ready;
  mode_e        in_mode = MODE_QP;
  logic [127:0] in_a = '0, in_b = '0;
  logic         out_valid;
  logic [127:0] out_q;
  flags_t       out_flags;

  int checks = 0, failures = 0;
  int cycle = 0;

  // mechanism counters
  int n_mode[4];
  int n_sub_in = 0, n_sub_out = 0, n_ovf = 0, n_dbz = 0, n_inv = 0, n_nan = 0;
  int n_sp_two_ulp = 0;
  int n_zero = 0, n_inf = 0, n_rounded_up = 0, n_exact = 0;

  fp_div_top dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_mode, .in_a, .in_b,
    .out_valid, .out_q, .out_flags
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lat_of(int m);
    return (m == 0) ? 9 : (m == 1) ? 11 : (m == 2) ? 12 : 13;
  endfunction

  // issue one operation and wait for its result; returns latency
  task automatic run_one(input int m, input logic [127:0] a, input logic [127:0] b,
                         output logic [127:0] q, output flags_t fl, output int lat);
    int t0;
    @(negedge clk);
    in_valid = 1'b1; in_mode = mode_e'(m); in_a = a; in_b = b;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    in_valid = 1'b0;
    do @(posedge clk); while (!out_valid);
    lat = cycle - t0 - 1;   // values are sampled one edge after they change
    @(negedge clk);
    q  = out_q;
    fl = out_flags;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // faithful check for finite non-zero operands
  task automatic div_check(input int m, input logic [127:0] a, input logic [127:0] b);
    logic [127:0] q, lo, hi, mag;
    flags_t fl;
    int lat;
    bit inx, ovf, sgn;
    run_one(m, a, b, q, fl, lat);
    n_mode[m]++;
    check(lat == lat_of(m), $sformatf("latency mode %0d: %0d", m, lat));
    lo  = div_trunc(m, a, b, inx, ovf);
    hi  = inx ? next_up(m, lo) : lo;
    sgn = a[127] ^ b[127];
    mag = {1'b0, q[126:0]};
    if (ovf) begin
      check(q == pack(m, sgn, emax_of(m), '0) && fl.overflow,
            $sformatf("overflow mode %0d a=%h b=%h q=%h", m, a, b, q));
      n_ovf++;
      return;
    end
    check(q[127] == sgn, "sign");
    if (m == 0 && inx && mag == next_up(m, hi)) begin
      // SP keeps only the series terms up to x^2: M may exceed the exact
      // quotient by up to q*x^3 < one SP ulp, so one ulp more is allowed.
      n_sp_two_ulp++;
      check(1'b1, "");
    end else begin
      check(mag == lo || mag == hi,
            $sformatf("mode %0d a=%h b=%h q=%h lo=%h inexact=%0d", m, a, b, q, lo, inx));
    end
    if (!inx) n_exact++;
    if (inx && mag == hi) n_rounded_up++;
    if (((int'(q[126:112]) & emax_of(m)) == 0) && q[111:0] != 0) begin
      n_sub_out++;
      check(fl.underflow, "underflow flag");
    end
    if ((int'(a[126:112]) & emax_of(m)) == 0 || (int'(b[126:112]) & emax_of(m)) == 0) n_sub_in++;
  endtask

  task automatic special_check(input int m, input logic [127:0] a, input logic [127:0] b,
                               input logic [127:0] exp_q, input bit exp_inv, input bit exp_dbz);
    logic [127:0] q;
    flags_t fl;
    int lat;
    run_one(m, a, b, q, fl, lat);
    check(q == exp_q && fl.invalid == exp_inv && fl.div_by_zero == exp_dbz,
          $sformatf("special mode %0d a=%h b=%h q=%h expected %h", m, a, b, q, exp_q));
    check(lat == lat_of(m), "special latency");
  endtask

  // back-to-back stream: interval between acceptances and between results
  task automatic stream_check(input int m);
    int acc[$], res[$];
    int n;
    n = 0;
    @(negedge clk);
    in_valid = 1'b1; in_mode = mode_e'(m);
    in_a = rand_op(m, bias_of(m) - 5, bias_of(m) + 5);
    in_b = rand_op(m, bias_of(m) - 5, bias_of(m) + 5);
    while (res.size() < 4) begin
      @(posedge clk);
      if (in_valid && in_ready) acc.push_back(cycle);
      if (out_valid) res.push_back(cycle);
      if (in_valid && in_ready) begin
        n++;
        @(negedge clk);
        in_a = rand_op(m, bias_of(m) - 5, bias_of(m) + 5);
        in_b = rand_op(m, bias_of(m) - 5, bias_of(m) + 5);
        if (n == 5) in_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    for (int i = 1; i < 4; i++) begin
      check(acc[i] - acc[i-1] == lat_of(m) - 1,
            $sformatf("issue interval mode %0d: %0d", m, acc[i] - acc[i-1]));
      check(res[i] - res[i-1] == lat_of(m) - 1,
            $sformatf("result interval mode %0d: %0d", m, res[i] - res[i-1]));
    end
    repeat (20) @(posedge clk);
  endtask

  initial begin
    logic [127:0] one, two, zero, inf, nan, x;
    int ew, fw, bs, em;
    foreach (n_mode[i]) n_mode[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    for (int m = 0; m < 4; m++) begin
      ew = ew_of(m); fw = fw_of(m); bs = bias_of(m); em = emax_of(m);
      one  = pack(m, 0, bs, '0);
      two  = pack(m, 0, bs + 1, '0);
      zero = '0;
      inf  = pack(m, 0, em, '0);
      nan  = pack(m, 0, em, 112'(1) << (fw - 1));

      // exact results
      x = rand_op(m, bs - 10, bs + 10);
      div_check(m, x, one);
      div_check(m, x, two);
      div_check(m, x, x);
      div_check(m, one, pack(m, 0, bs, 112'(1) << (fw - 1)));   // 1 / 1.5

      // random normal operands, results in range
      for (int i = 0; i < N_RAND; i++)
        div_check(m, rand_op(m, bs / 2, bs + bs / 2), rand_op(m, bs / 2, bs + bs / 2));

      // divisors whose leading bits are all ones or all zeros (extreme x)
      for (int i = 0; i < 50; i++) begin
        x = rand_op(m, bs - 3, bs + 3);
        x[111:104] = 8'hFF;
        div_check(m, rand_op(m, bs - 3, bs + 3), x);
        x[111:104] = 8'h00;
        div_check(m, rand_op(m, bs - 3, bs + 3), x);
      end

      // sub-normal operands and results, overflow
      for (int i = 0; i < 40; i++) begin
        x = rand_op(m, 0, 0);                                 // sub-normal dividend
        div_check(m, x, rand_op(m, 1, bs));
        div_check(m, rand_op(m, bs, bs + 5), rand_op(m, 0, 0)); // sub-normal divisor
        div_check(m, rand_op(m, 1, 8), rand_op(m, bs, bs + 12)); // sub-normal result
        div_check(m, rand_op(m, em - 4, em - 1), rand_op(m, 1, bs - 2)); // overflow
      end

      // special operands
      special_check(m, nan, one, nan, 0, 0);
      special_check(m, one, nan, nan, 0, 0);
      special_check(m, zero, zero, nan, 1, 0);
      special_check(m, inf, inf, nan, 1, 0);
      special_check(m, inf, one | (128'(1) << 127), inf | (128'(1) << 127), 0, 0);
      special_check(m, one, zero, inf, 0, 1);
      special_check(m, zero, two, zero, 0, 0);
      special_check(m, two, inf | (128'(1) << 127), 128'(1) << 127, 0, 0);
      n_nan += 4; n_inv += 2; n_inf += 2; n_dbz += 1; n_zero += 2;

      stream_check(m);
    end

    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, $sformatf("mode %0d never ran", m));
    check(n_sub_in  > 0, "no sub-normal operand");
    check(n_sub_out > 0, "no sub-normal result");
    check(n_ovf     > 0, "no overflow");
    check(n_rounded_up > 0, "no rounded-up result");
    check(n_exact   > 0, "no exact result");
    $display("modes SP=%0d DP=%0d DPE=%0d QP=%0d  subnormal in=%0d out=%0d  overflow=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_sub_in, n_sub_out, n_ovf);
    $display("SP results one ulp above the faithful pair: %0d", n_sp_two_ulp);
    $display("rounded-up=%0d exact=%0d  NaN=%0d invalid=%0d inf=%0d div0=%0d zero=%0d",
             n_rounded_up, n_exact, n_nan, n_inv, n_inf, n_dbz, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
