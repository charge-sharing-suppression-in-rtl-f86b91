// tb_cs_quad: end-to-end test of the four-pixel charge-sharing cell at its
// default sizes.
//
// Each event is one photon whose charge cloud is split over the four pixels.
// A shaped pulse (linear rise over 6..14 samples, then a geometric decay of
// 8/10 or 9/10 per sample) is scaled by a total charge Q and by each
// pixel's share: a permutation of 35/25/20/15 %, the split used in the
// source's simulation, or occasionally an equal split or a single pixel.
// For every event the expected behaviour is worked out here from the samples
// alone:
//   - the class from the peak of the four-pixel sum: inside the window
//     (th1 < peak <= th2), above it, or below it;
//   - the winner as the pixel with the most samples above th_com (lowest
//     index on ties);
//   - the cycles: evt_valid/evt_reject two samples after the last sample
//     with sum > th1, eval_stb one cycle after the first cycle from then on
//     with every pixel under th_com.
// Every cycle sum, d, lt, ut and the event strobes are compared with these;
// after each decision out_d, winner and every event counter are checked
// (counters against a bit-level LFSR reference stepped once per win).
// Three threshold settings make every mechanism occur: a plain setting, one
// with a low common threshold (pixels still above it when the window closes,
// so the decision waits; and sub-window pulses whose counts are discarded),
// and one with a high common threshold (accepted events with no winner).
// Each mechanism's count is printed and must be non-zero.
module tb_cs_quad;
  import cs_pkg::*;
  localparam int CW = CHARGE_W;
  localparam int MAXLEN = 256;

  logic clk = 0, rst = 1;
  logic [NPIX-1:0][CW-1:0] c = '0;
  logic [CW-1:0] th_com;
  logic [CW+1:0] th1, th2, sum;
  logic [NPIX-1:0] d, winner;
  logic lt, ut, evt_valid, evt_reject, eval_stb;
  logic [NPIX-1:0][OUT_W-1:0] out_d;
  logic [NPIX-1:0][EC_W-1:0]  ec_q;

  cs_quad dut (.clk(clk), .rst(rst), .c(c), .th_com(th_com), .th1(th1), .th2(th2),
    .sum(sum), .d(d), .lt(lt), .ut(ut), .evt_valid(evt_valid), .evt_reject(evt_reject),
    .out_d(out_d), .winner(winner), .eval_stb(eval_stb), .ec_q(ec_q));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_valid = 0, n_reject = 0, n_below = 0, n_discard = 0, n_pending = 0;
  int n_nowin = 0, n_tie = 0;
  int wins[NPIX] = '{default: 0};
  logic [EC_W-1:0] ref_ec[NPIX];

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic logic [EC_W-1:0] lfsr_next(input logic [EC_W-1:0] s);
    return {s[12:0], s[13] ^ s[4] ^ s[2] ^ s[0]};
  endfunction

  // One photon: total charge q, shares in percent, pulse rise tr, decay num/10.
  task automatic photon(input int q, input int share[NPIX], input int tr, input int dnum);
    int smp[MAXLEN][NPIX];
    int len, v, peak, last_lt, e_cyc, dec, w, best, total, ties;
    int cnt[NPIX];
    bit over, inwin, dhi;
    logic [NPIX-1:0][OUT_W-1:0] prev_out;
    // pulse shape, 0..1000
    len = 0; v = 1000;
    for (int t = 0; t < MAXLEN; t++) begin
      int s;
      if (t <= tr) s = 1000 * t / tr;
      else begin v = v * dnum / 10; s = v; end
      for (int k = 0; k < NPIX; k++) smp[t][k] = q * share[k] * s / 100000;
      if (t > tr && s == 0 && len == 0) len = t + 1;
    end
    // expectations
    peak = 0; last_lt = -1; cnt = '{default: 0};
    for (int t = 0; t < len; t++) begin
      int sm = 0;
      for (int k = 0; k < NPIX; k++) begin
        sm += smp[t][k];
        if (smp[t][k] > int'(th_com)) cnt[k]++;
      end
      if (sm > peak) peak = sm;
      if (sm > int'(th1)) last_lt = t;
    end
    over  = peak > int'(th2);
    inwin = !over && peak > int'(th1);
    e_cyc = last_lt + 2;
    dec   = -1;
    if (inwin) begin
      for (int t = e_cyc; t < MAXLEN && dec < 0; t++) begin
        dhi = 0;
        for (int k = 0; k < NPIX; k++) if (t < len && smp[t][k] > int'(th_com)) dhi = 1;
        if (!dhi) dec = t;
      end
      if (dec > e_cyc) n_pending++;
    end
    w = -1; best = 0; ties = 0;
    for (int k = 0; k < NPIX; k++)
      if (cnt[k] > best) begin best = cnt[k]; w = k; ties = 0; end
      else if (cnt[k] == best && best > 0) ties++;
    total = ((dec + 3 > len) ? dec + 3 : len) + 3;
    prev_out = out_d;
    // play the samples
    for (int t = 0; t < total; t++) begin
      int sm = 0;
      for (int k = 0; k < NPIX; k++) begin
        c[k] = (t < len) ? CW'(smp[t][k]) : '0;
        sm += (t < len) ? smp[t][k] : 0;
      end
      #1;
      chk(int'(sum) == sm, "sum");
      chk(lt == (sm > int'(th1)) && ut == (sm > int'(th2)), "lt/ut");
      for (int k = 0; k < NPIX; k++)
        chk(d[k] == ((t < len ? smp[t][k] : 0) > int'(th_com)), "d");
      chk(evt_valid == (inwin && t == e_cyc), $sformatf("evt_valid at sample %0d", t));
      chk(evt_reject == (over && t == e_cyc), $sformatf("evt_reject at sample %0d", t));
      chk(eval_stb == (inwin && t == dec + 1), $sformatf("eval_stb at sample %0d", t));
      if (inwin && t == dec + 1) begin
        for (int k = 0; k < NPIX; k++) begin
          chk(out_d[k] == ((k == w) ? 16'hFFFF : 16'h0), $sformatf("out_d[%0d]", k));
          chk(winner[k] == (k == w), $sformatf("winner %b expected %0d", winner, w));
        end
        if (w >= 0) ref_ec[w] = lfsr_next(ref_ec[w]);
      end else if (!inwin || t <= dec) begin
        chk(out_d == prev_out, "outputs changed without a decision");
      end
      if (inwin && t == dec + 3)
        for (int k = 0; k < NPIX; k++) chk(ec_q[k] == ref_ec[k], $sformatf("ec_q[%0d]", k));
      @(posedge clk); #1;
    end
    if (inwin) begin
      n_valid++;
      if (w >= 0) wins[w]++; else n_nowin++;
      if (ties > 0 && w >= 0) n_tie++;
    end else if (over) n_reject++;
    else begin
      n_below++;
      if (best > 0) n_discard++;
    end
  endtask

  task automatic random_photon(input int qmax);
    int share[NPIX], base[NPIX], r;
    base = '{35, 25, 20, 15};
    r = $urandom_range(0, 19);
    if (r == 0)      base = '{24, 24, 24, 24};
    else if (r == 1) base = '{95, 0, 0, 0};
    // random permutation
    for (int k = NPIX - 1; k > 0; k--) begin
      int j = $urandom_range(0, k), tmp = base[k];
      base[k] = base[j]; base[j] = tmp;
    end
    share = base;
    // keep every pixel sample within the 8-bit charge range
    for (int k = 0; k < NPIX; k++)
      if (share[k] > 0 && qmax * share[k] / 100 > 255) qmax = 25500 / share[k];
    photon($urandom_range(10, qmax), share, $urandom_range(6, 14), $urandom_range(8, 9));
  endtask

  initial begin
    int share[NPIX];
    for (int k = 0; k < NPIX; k++) ref_ec[k] = EC_W'(1);
    th_com = 8'd10; th1 = 10'd40; th2 = 10'd300;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // an event like the source's example: shares 35/25/20/15 %, summed peak
    // of about 65
    share = '{35, 25, 20, 15};
    photon(68, share, 12, 9);
    // plain setting
    repeat (150) random_photon(600);
    // low common threshold: decisions wait for the pixels, small pulses
    // are discarded
    th_com = 8'd3; th1 = 10'd100; th2 = 10'd400;
    repeat (120) random_photon(500);
    // high common threshold: accepted events without a winner
    th_com = 8'd200; th1 = 10'd40; th2 = 10'd600;
    repeat (10) random_photon(500);

    $display("accepted %0d (waited %0d, no winner %0d, tie %0d), rejected %0d, below window %0d (discarded counts %0d)",
             n_valid, n_pending, n_nowin, n_tie, n_reject, n_below, n_discard);
    $display("wins per pixel %0d %0d %0d %0d; counters %h %h %h %h",
             wins[0], wins[1], wins[2], wins[3], ec_q[0], ec_q[1], ec_q[2], ec_q[3]);
    chk(n_valid > 0, "no accepted event");
    chk(n_reject > 0, "no rejected event");
    chk(n_below > 0, "no event below the window");
    chk(n_discard > 0, "no discarded counts");
    chk(n_pending > 0, "no decision waited for the pixels");
    chk(n_nowin > 0, "no accepted event without a winner");
    chk(n_tie > 0, "no tie");
    for (int k = 0; k < NPIX; k++) chk(wins[k] > 0, "a pixel never won");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
