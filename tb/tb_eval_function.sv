// tb_eval_function: evaluation function on synthetic comparator patterns.
// Each event raises D of pixel k for dur[k] cycles starting at offs[k], and
// the discriminator inputs (busy, then a one-cycle evt_valid or evt_reject)
// are driven as the window discriminator would. The expected winner is the
// pixel with the longest D pulse (lowest index on equal lengths), computed
// here from the durations alone. Checked: eval_stb exactly one cycle after
// the first cycle that has both the event end and all D low (also when
// evt_valid comes while a D is still high), out_d = 65535 for the winner and
// 0 elsewhere, no decision and unchanged outputs for rejected events and for
// pulses without an event, and counters cleared after each of these (a large
// discarded count must not win the next event). A second instance with
// 4-bit counters checks saturation: both long pulses saturate, so the tie
// rule decides there while the 16-bit instance sees the longer pulse.
module tb_eval_function;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  logic [N-1:0] d = '0;
  logic evt_valid = 0, evt_reject = 0, busy = 0;
  logic [N-1:0][15:0] out_d;
  logic [N-1:0][3:0]  out_s;
  logic [N-1:0] winner, winner_s;
  logic eval_stb, eval_stb_s;
  int checks = 0, failures = 0;
  int n_valid = 0, n_reject = 0, n_none = 0, n_pending = 0, n_nowin = 0;
  int wins[N] = '{default: 0};

  eval_function dut (.clk(clk), .rst(rst), .d(d), .evt_valid(evt_valid),
    .evt_reject(evt_reject), .busy(busy), .out_d(out_d), .winner(winner), .eval_stb(eval_stb));
  eval_function #(.NPIX(N), .OW(4)) dut_s (.clk(clk), .rst(rst), .d(d), .evt_valid(evt_valid),
    .evt_reject(evt_reject), .busy(busy), .out_d(out_s), .winner(winner_s), .eval_stb(eval_stb_s));

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // mode: 0 none, 1 valid, 2 reject. evt_t: cycle of the evt pulse.
  task automatic run_event(input int dur[N], input int offs[N], input int mode,
                           input int evt_t, input int exp_w, input int exp_ws);
    int last_hi, dec, total;
    logic [N-1:0][15:0] prev;
    logic [N-1:0] prev_w;
    prev = out_d; prev_w = winner;
    last_hi = 0;
    for (int k = 0; k < N; k++)
      if (dur[k] > 0 && offs[k] + dur[k] > last_hi) last_hi = offs[k] + dur[k];
    dec   = (evt_t > last_hi) ? evt_t : last_hi;   // first cycle with all D low
    total = dec + 4;
    if (mode == 1 && evt_t < last_hi) n_pending++;
    for (int n = 0; n < total; n++) begin
      for (int k = 0; k < N; k++) d[k] = (n >= offs[k] && n < offs[k] + dur[k]);
      busy       = (mode != 0) && n < evt_t;
      evt_valid  = (mode == 1) && n == evt_t;
      evt_reject = (mode == 2) && n == evt_t;
      @(posedge clk); #1;
      if (mode == 1 && n == dec) begin
        chk(eval_stb === 1'b1, "eval_stb missing");
        for (int k = 0; k < N; k++) begin
          chk(out_d[k] === ((k == exp_w) ? 16'hFFFF : 16'h0), $sformatf("out_d[%0d]=%h", k, out_d[k]));
          chk(winner[k] === (k == exp_w), $sformatf("winner=%b expected pixel %0d", winner, exp_w));
        end
        if (exp_ws >= 0) chk(winner_s === N'(1 << exp_ws), $sformatf("saturating winner=%b", winner_s));
      end else begin
        chk(eval_stb === 1'b0, "unexpected eval_stb");
        if (mode != 1 || n < dec)
          chk(out_d === prev && winner === prev_w, "outputs changed without a decision");
      end
    end
    d = '0; busy = 0; evt_valid = 0; evt_reject = 0;
    case (mode)
      0: n_none++;
      1: begin n_valid++; if (exp_w >= 0) wins[exp_w]++; else n_nowin++; end
      default: n_reject++;
    endcase
  endtask

  function automatic int longest(input int dur[N]);
    int w = -1, best = 0;
    for (int k = 0; k < N; k++) if (dur[k] > best) begin best = dur[k]; w = k; end
    return w;
  endfunction

  initial begin
    int dur[N], offs[N];
    repeat (2) @(posedge clk);
    #1 rst = 0;
    #1 chk(out_d === '0 && winner === '0 && eval_stb === 0, "reset values");

    // a plain event: pixel 2 longest
    dur = '{5, 8, 12, 3}; offs = '{2, 1, 0, 4};
    run_event(dur, offs, 1, 14, 2, 2);
    // equal longest pulses: lowest index wins
    dur = '{4, 9, 9, 2}; offs = '{0, 0, 0, 0};
    run_event(dur, offs, 1, 11, 1, 1);
    // pending: evt_valid while pixel 0 is still high
    dur = '{20, 6, 4, 2}; offs = '{0, 1, 2, 3};
    run_event(dur, offs, 1, 10, 0, 0);
    // a rejected event with a huge pixel-3 count, then a small event that
    // pixel 3 must not win
    dur = '{3, 3, 3, 40}; offs = '{0, 0, 0, 0};
    run_event(dur, offs, 2, 42, -1, -1);
    dur = '{3, 6, 2, 5}; offs = '{0, 0, 0, 0};
    run_event(dur, offs, 1, 8, 1, 1);
    // a pulse with no event (discarded), then the same check
    dur = '{30, 0, 0, 0}; offs = '{0, 0, 0, 0};
    run_event(dur, offs, 0, 0, -1, -1);
    dur = '{2, 3, 7, 5}; offs = '{1, 0, 0, 0};
    run_event(dur, offs, 1, 9, 2, 2);
    // accepted event with no pixel above the common threshold
    dur = '{0, 0, 0, 0}; offs = '{0, 0, 0, 0};
    run_event(dur, offs, 1, 6, -1, -1);
    // saturation: both pulses exceed 15 cycles
    dur = '{17, 20, 1, 1}; offs = '{0, 0, 0, 0};
    run_event(dur, offs, 1, 22, 1, 0);
    // random events
    for (int e = 0; e < 300; e++) begin
      int mode, evt_t, last, first;
      last = 0; first = 1;
      for (int k = 0; k < N; k++) begin
        dur[k]  = $urandom_range(0, 14);
        offs[k] = $urandom_range(0, 4);
        if (offs[k] + dur[k] > last) last = offs[k] + dur[k];
        if (dur[k] > 0 && offs[k] + 1 > first) first = offs[k] + 1;
      end
      // the window closes only after every D pulse has started
      mode  = (e % 5 == 0) ? 2 : ((e % 7 == 0) ? 0 : 1);
      evt_t = (e % 3 == 0) ? $urandom_range(first, last + 1) : last + $urandom_range(0, 3);
      if (mode == 0) evt_t = 0;
      run_event(dur, offs, mode, evt_t, longest(dur), longest(dur));
    end
    // synchronous reset clears outputs
    rst = 1; @(posedge clk); #1 rst = 0;
    chk(out_d === '0 && winner === '0, "outputs after reset");

    $display("valid %0d (pending %0d, no winner %0d), reject %0d, none %0d, wins %0d %0d %0d %0d",
             n_valid, n_pending, n_nowin, n_reject, n_none, wins[0], wins[1], wins[2], wins[3]);
    chk(n_pending > 0 && n_reject > 0 && n_none > 0 && n_nowin > 0, "a case never happened");
    for (int k = 0; k < N; k++) chk(wins[k] > 0, "a pixel never won");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
