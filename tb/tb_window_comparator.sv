// tb_window_comparator: LT and UT against "sum > th1" and "sum > th2" on
// every sum value around fixed thresholds (including equality) and on random
// triples.
module tb_window_comparator;
  logic [9:0] sum, th1, th2;
  logic       lt, ut;
  int checks = 0, failures = 0;

  window_comparator #(.SW(10)) dut (.sum(sum), .th1(th1), .th2(th2), .lt(lt), .ut(ut));

  task automatic check(input int s, a, b);
    sum = 10'(s); th1 = 10'(a); th2 = 10'(b);
    #1;
    checks++;
    if (lt !== (s > a) || ut !== (s > b)) begin
      failures++;
      if (failures < 10) $display("FAIL sum=%0d th1=%0d th2=%0d lt=%0b ut=%0b", s, a, b, lt, ut);
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
    for (int s = 0; s < 1024; s++) check(s, 40, 300);
    repeat (5000)
      check(int'($urandom_range(0, 1023)), int'($urandom_range(0, 1023)),
            int'($urandom_range(0, 1023)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
