// tb_div_fsm: runs the FSM once per mode and compares the visited state
// sequence with the expected one (QP all of S0..S10, DPE without S7, DP
// without S5 and S7, SP without S4..S7); checks that the FSM waits in S10
// without start and that done is high only in S10.  The cycle counts,
// S10 included, must be 11 / 10 / 9 / 7 for QP / DPE / DP / SP.
module tb_div_fsm;
  import fpdiv_pkg::*;
  logic   clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  mode_e  mode = MODE_QP;
  state_e state;
  logic   done;
  int checks = 0, failures = 0;

  div_fsm dut (.clk, .rst_n, .start, .mode, .state, .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input mode_e m, input int cycles, input int exp_seq[$]);
    int seq[$];
    @(negedge clk);
    mode = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (state != S10) begin
      seq.push_back(int'(state));
      check(!done, "done outside S10");
      @(negedge clk);
    end
    check(done, "done in S10");
    check(seq == exp_seq, $sformatf("mode %0d sequence %p", m, seq));
    check(seq.size() + 1 == cycles, $sformatf("mode %0d takes %0d cycles", m, seq.size() + 1));
    // stays in S10 without start
    repeat (3) @(negedge clk);
    check(state == S10, "idle in S10");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(state == S10 && done, "reset state");
    run(MODE_QP,  11, '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9});
    run(MODE_DPE, 10, '{0, 1, 2, 3, 4, 5, 6, 8, 9});
    run(MODE_DP,  9, '{0, 1, 2, 3, 4, 6, 8, 9});
    run(MODE_SP,  7, '{0, 1, 2, 3, 8, 9});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
