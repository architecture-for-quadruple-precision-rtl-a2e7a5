// tb_mult114: checks the Karatsuba 114 x 114 multiplier against the
// simulator's own wide multiplication on corner and random operands.
module tb_mult114;
  logic [113:0] a, b;
  logic [227:0] p;
  int checks = 0, failures = 0;

  mult114 dut (.a, .b, .p);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [113:0] x, input logic [113:0] y);
    logic [227:0] ref_p;
    a = x; b = y;
    #1;
    ref_p = 228'(x) * 228'(y);
    checks++;
    if (p !== ref_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, ref_p);
    end
  endtask

  initial begin
    logic [113:0] x, y;
    try('0, '0);
    try('1, '1);
    try('1, 114'd1);
    try({1'b1, 113'd0}, {1'b1, 113'd0});
    // all-ones / all-zeros in each 38-bit part and 19/20-bit sub-part
    for (int i = 0; i < 64; i++) begin
      x = '0; y = '0;
      for (int k = 0; k < 6; k++) begin
        if (i[k])       x[k*19 +: 19] = '1;
        if (i[(k+2)%6]) y[k*19 +: 19] = '1;
      end
      try(x, y);
      try(~x, y);
    end
    for (int i = 0; i < 20000; i++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom, $urandom};
      try(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
