// tb_thcom_comparator: exhaustive check of the common-threshold comparator.
// Every pair (charge, threshold) of 8-bit values is applied and D is
// compared with the expected "charge strictly above threshold".
module tb_thcom_comparator;
  logic [7:0] c, th;
  logic       d;
  int checks = 0, failures = 0;

  thcom_comparator #(.CW(8)) dut (.c(c), .th_com(th), .d(d));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        c = 8'(i); th = 8'(j);
        #1;
        checks++;
        if (d !== (i > j)) begin
          failures++;
          if (failures < 10) $display("FAIL c=%0d th=%0d d=%0b", i, j, d);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
