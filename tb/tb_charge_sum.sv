// tb_charge_sum: the four-pixel adder against an integer sum, on corner
// cases (all zero, all full scale, one pixel at a time) and random charges.
module tb_charge_sum;
  logic [3:0][7:0] c;
  logic [9:0]      sum;
  int checks = 0, failures = 0;

  charge_sum #(.CW(8), .NPIX(4), .SW(10)) dut (.c(c), .sum(sum));

  task automatic check(input int a0, a1, a2, a3);
    int exp;
    c[0] = 8'(a0); c[1] = 8'(a1); c[2] = 8'(a2); c[3] = 8'(a3);
    exp = a0 + a1 + a2 + a3;
    #1;
    checks++;
    if (int'(sum) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %0d+%0d+%0d+%0d got %0d", a0, a1, a2, a3, sum);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0, 0);
    check(255, 255, 255, 255);
    for (int k = 0; k < 8; k++) begin
      check(1 << k, 0, 0, 0); check(0, 1 << k, 0, 0);
      check(0, 0, 1 << k, 0); check(0, 0, 0, 1 << k);
    end
    repeat (5000)
      check(int'($urandom_range(0, 255)), int'($urandom_range(0, 255)),
            int'($urandom_range(0, 255)), int'($urandom_range(0, 255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
