// tb_event_counter: the 14-bit LFSR event counter.
// Checks the reset value, that the state holds while inc is low, that each
// counted event gives the next state of x^14+x^5+x^3+x+1 (reference computed
// bit by bit here), and that the sequence first returns to its start after
// exactly 16383 steps.
module tb_event_counter;
  logic        clk = 0, rst = 1, inc = 0;
  logic [13:0] q, ref_q;
  int checks = 0, failures = 0;

  event_counter dut (.clk(clk), .rst(rst), .inc(inc), .q(q));

  always #5 clk = ~clk;

  function automatic logic [13:0] next(input logic [13:0] s);
    return {s[12:0], s[13] ^ s[4] ^ s[2] ^ s[0]};
  endfunction

  task automatic expect_q(input string what);
    checks++;
    if (q !== ref_q) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%h expected %h", what, q, ref_q);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    ref_q = 14'd1;
    expect_q("reset");
    // random inc pattern
    for (int n = 0; n < 2000; n++) begin
      inc = 1'($urandom_range(0, 1));
      @(posedge clk); #1;
      if (inc) ref_q = next(ref_q);
      expect_q("step");
    end
    // period from the current state
    inc = 1;
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
    end while (q != ref_q && period < 20000);
    checks++;
    if (period != 16383) begin
      failures++;
      $display("FAIL period %0d", period);
    end
    inc = 0;
    // synchronous reset back to 1
    rst = 1; @(posedge clk); #1 rst = 0;
    ref_q = 14'd1;
    expect_q("reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
