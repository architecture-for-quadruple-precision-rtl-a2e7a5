// tb_recip_lut: checks every entry r of the reciprocal table against its
// definition, the smallest r with r * (256 + i) >= 2^120, i.e.
// (r - 1) * (256 + i) < 2^120 <= r * (256 + i).
module tb_recip_lut;
  logic [7:0]   idx;
  logic [112:0] recip;
  int checks = 0, failures = 0;

  recip_lut dut (.idx, .recip);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [130:0] hi, lo, two120;
    two120 = 131'(1) << 120;
    for (int i = 0; i < 256; i++) begin
      idx = 8'(i);
      #1;
      hi = 131'(recip) * 131'(256 + i);
      lo = 131'(recip - 113'd1) * 131'(256 + i);
      checks++;
      if (!(hi >= two120 && lo < two120)) begin
        failures++;
        $display("FAIL entry %0d = %h", i, recip);
      end
    end
    checks++;
    idx = 8'd0;
    #1;
    if (recip != 113'(1) << 112) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
