// tb_cs_quad_example: the four-pixel cell on one photon like the source's
// worked example: a single shaped pulse whose charge is split 35 / 25 / 20 /
// 15 % over P(0,0), P(0,1), P(-1,0), P(-1,1), with a summed peak of about 65.
// The thresholds put the peak inside the energy window (th1 = 10,
// th2 = 100) with a common threshold th_com = 3, so:
//   - LT makes exactly one pulse and UT never rises; one evt_valid, no
//     evt_reject;
//   - the pixel with the largest share is the first to rise above th_com and
//     the last to fall below it;
//   - exactly one decision: P(0,0) gets 65535, the others 0, and only its
//     event counter steps (from 1 to 3, the next state of the LFSR);
//   - the decision comes one cycle after the first cycle with the window
//     closed and all pixels under th_com.
// The pulse shape (linear rise over 12 samples, decay 9/10 per sample) is
// this testbench's own.
module tb_cs_quad_example;
  import cs_pkg::*;
  logic clk = 0, rst = 1;
  logic [NPIX-1:0][CHARGE_W-1:0] c = '0;
  logic [CHARGE_W+1:0] sum;
  logic [NPIX-1:0] d, winner;
  logic lt, ut, evt_valid, evt_reject, eval_stb;
  logic [NPIX-1:0][OUT_W-1:0] out_d;
  logic [NPIX-1:0][EC_W-1:0]  ec_q;

  cs_quad dut (.clk(clk), .rst(rst), .c(c), .th_com(8'd3), .th1(10'd10), .th2(10'd100),
    .sum(sum), .d(d), .lt(lt), .ut(ut), .evt_valid(evt_valid), .evt_reject(evt_reject),
    .out_d(out_d), .winner(winner), .eval_stb(eval_stb), .ec_q(ec_q));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measurements of the event
  int share[NPIX] = '{35, 25, 20, 15};
  int v = 1000, s, peak = 0, lt_rise = 0, ut_rise = 0, n_valid = 0, n_reject = 0, n_stb = 0;
  int first_up[NPIX] = '{default: -1}, last_up[NPIX] = '{default: -1};
  int last_lt = -1, t_valid = -1, t_stb = -1, t_alllow = -1;
  logic lt_q = 0, ut_q = 0;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 120; t++) begin
      if (t <= 12) s = 1000 * t / 12;
      else begin v = v * 9 / 10; s = v; end
      for (int k = 0; k < NPIX; k++) c[k] = CHARGE_W'(68 * share[k] * s / 100000);
      #1;
      if (int'(sum) > peak) peak = int'(sum);
      if (lt && !lt_q) lt_rise++;
      if (ut && !ut_q) ut_rise++;
      if (lt) last_lt = t;
      lt_q = lt; ut_q = ut;
      for (int k = 0; k < NPIX; k++) if (d[k]) begin
        if (first_up[k] < 0) first_up[k] = t;
        last_up[k] = t;
      end
      if (evt_valid) begin n_valid++; t_valid = t; end
      if (evt_reject) n_reject++;
      if (t_valid >= 0 && t_alllow < 0 && d == '0) t_alllow = t;
      if (eval_stb) begin
        n_stb++; t_stb = t;
        chk(winner == 4'b0001, $sformatf("winner %b", winner));
        chk(out_d[0] == 16'd65535 && out_d[1] == 0 && out_d[2] == 0 && out_d[3] == 0, "out_d");
      end
      @(posedge clk); #1;
    end
    $display("sum peak %0d, LT pulses %0d, UT pulses %0d, D up %0d-%0d %0d-%0d %0d-%0d %0d-%0d",
             peak, lt_rise, ut_rise, first_up[0], last_up[0], first_up[1], last_up[1],
             first_up[2], last_up[2], first_up[3], last_up[3]);
    chk(peak >= 60 && peak <= 70, "sum peak near 65");
    chk(lt_rise == 1 && ut_rise == 0, "one LT pulse, no UT");
    chk(n_valid == 1 && n_reject == 0 && n_stb == 1, "one accepted event, one decision");
    chk(t_valid == last_lt + 2, "ADWD latency");
    chk(t_stb == t_alllow + 1, "decision latency");
    for (int k = 1; k < NPIX; k++) begin
      chk(first_up[0] <= first_up[k], "largest pixel rises first");
      chk(last_up[0] >= last_up[k], "largest pixel falls last");
    end
    chk(ec_q[0] == 14'd3 && ec_q[1] == 14'd1 && ec_q[2] == 14'd1 && ec_q[3] == 14'd1, "event counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
