// tb_mant_div: checks the series-expansion mantissa divider on its own.
//
// For random normalised significands (low bits cleared to the precision of
// the mode) the quotient M (2.126 fixed point) is compared with the exact
// quotient floor(m1 * 2^126 / m2).  The allowed error is the truncation of
// the series plus rounding of the fixed-point terms: 2^-116 for QP, 2^-69
// for DPE, 2^-54 for DP and 2^-22 for SP (where the series stops at x^2).
// The reciprocal is computed here as ceil(2^120 / (256 + i)).  Also checks
// that q_valid rises 7 / 9 / 10 / 11 clock edges after the edge that takes
// start (one per FSM state S0..S10 visited) for SP / DP / DPE / QP.
module tb_mant_div;
  import fpdiv_pkg::*;
  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  mode_e        mode = MODE_QP;
  logic [112:0] m1 = '0, m2 = '0, recip = '0;
  logic         idle, q_valid;
  state_e       state;
  logic [127:0] q;
  int checks = 0, failures = 0;
  int cycle = 0;

  mant_div dut (.clk, .rst_n, .start, .mode, .m1, .m2, .recip, .idle, .state, .q_valid, .q);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [112:0] ref_recip(logic [7:0] i);
    logic [130:0] n, d;
    n = 131'(1) << 120;
    d = 131'(256 + int'(i));
    return 113'((n + d - 131'(1)) / d);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic one(input int m, input logic [112:0] a, input logic [112:0] b);
    int fw, t0, cyc;
    logic [255:0] qref, err, bound;
    fw = (m == 0) ? 23 : (m == 1) ? 52 : (m == 2) ? 64 : 112;
    a = a | (113'(1) << 112);
    b = b | (113'(1) << 112);
    a = a & ~((113'(1) << (112 - fw)) - 113'(1));
    b = b & ~((113'(1) << (112 - fw)) - 113'(1));
    @(negedge clk);
    mode = mode_e'(m); m1 = a; m2 = b; recip = ref_recip(b[111:104]);
    start = 1'b1;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    do @(posedge clk); while (!q_valid);
    cyc = cycle - t0 - 1;
    qref  = (256'(a) << 126) / 256'(b);
    err   = (256'(q) > qref) ? 256'(q) - qref : qref - 256'(q);
    bound = 256'(1) << ((m == 0) ? 104 : (m == 1) ? 72 : (m == 2) ? 57 : 10);
    check(err <= bound, $sformatf("mode %0d m1=%h m2=%h q=%h ref=%h", m, a, b, q, qref));
    check(cyc == ((m == 0) ? 7 : (m == 1) ? 9 : (m == 2) ? 10 : 11),
          $sformatf("mode %0d cycles %0d", m, cyc));
    @(negedge clk);
  endtask

  initial begin
    logic [112:0] a, b;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 4; m++) begin
      one(m, '0, '0);
      one(m, '1, '1);
      one(m, '0, '1);
      one(m, '1, '0);
      for (int i = 0; i < 3000; i++) begin
        a = {$urandom, $urandom, $urandom, $urandom};
        b = {$urandom, $urandom, $urandom, $urandom};
        if (i % 3 == 0) b[111:104] = 8'hFF;
        if (i % 3 == 1) b[103:96]  = 8'hFF;   // large a2
        one(m, a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
