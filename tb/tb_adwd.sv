// tb_adwd: window discriminator on random LT/UT pulse trains.
// Each pulse holds LT high for 1..20 cycles; half of them also raise UT for
// a sub-interval (sometimes from the very first LT cycle, like a fast pulse
// that crosses both thresholds between two samples). The expected outcome
// of every pulse is fixed when it is generated: in-window if UT never rose,
// rejected otherwise. The checker requires evt_valid / evt_reject exactly
// in the cycle after the clock edge that first samples LT low (a latency of
// one cycle), no pulse anywhere else, and busy high exactly while a pulse
// is being tracked.
module tb_adwd;
  logic clk = 0, rst = 1, lt = 0, ut = 0;
  logic evt_valid, evt_reject, busy;
  int checks = 0, failures = 0;
  int n_valid = 0, n_reject = 0;

  adwd dut (.clk(clk), .rst(rst), .lt(lt), .ut(ut),
            .evt_valid(evt_valid), .evt_reject(evt_reject), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drives one cycle of inputs and checks outputs after the next edge.
  task automatic cycle(input logic l, input logic u,
                       input logic exp_v, input logic exp_r, input logic exp_busy);
    lt = l; ut = u;
    @(posedge clk); #1;
    checks++;
    if (evt_valid !== exp_v || evt_reject !== exp_r || busy !== exp_busy) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t valid=%0b/%0b reject=%0b/%0b busy=%0b/%0b", $time,
                 evt_valid, exp_v, evt_reject, exp_r, busy, exp_busy);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // no event at all
    repeat (5) cycle(0, 0, 0, 0, 0);
    for (int p = 0; p < 400; p++) begin
      int len, us, ue;
      logic over;
      len  = $urandom_range(1, 20);
      over = 1'($urandom_range(0, 1));
      us   = (p % 7 == 0) ? 0 : $urandom_range(0, len - 1);
      ue   = $urandom_range(us, len - 1);
      for (int t = 0; t < len; t++)
        cycle(1, over && t >= us && t <= ue, 0, 0, 1);
      // LT sampled low: the outcome shows after this edge
      cycle(0, 0, !over, over, 0);
      if (over) n_reject++; else n_valid++;
      repeat ($urandom_range(0, 4)) cycle(0, 0, 0, 0, 0);
    end
    checks++;
    if (n_valid == 0 || n_reject == 0) failures++;
    $display("in-window pulses %0d, rejected pulses %0d", n_valid, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
