// cs_quad: shared digital cell of a four-pixel neighborhood with
// charge-sharing suppression.
//
// When a photon hits near a pixel corner, its charge cloud is split among up
// to four pixels and each of them alone may see too little charge, or the
// wrong energy. This cell sits between four pixels P(0,0), P(0,1), P(-1,0),
// P(-1,1) (bus index 0..3, see cs_pkg::pix_idx_e) and:
//   1. adds the four charges (charge_sum) and window-discriminates the sum
//      with two global thresholds th1 < th2 (window_comparator, adwd), so
//      the event's energy is judged on the whole cloud;
//   2. compares each charge with a common threshold th_com
//      (thcom_comparator) and measures how long each pixel stays above it
//      (eval_function), to find the pixel that collected the most charge;
//   3. gives the whole event to that pixel only: its output value becomes
//      65535 and its event counter (event_counter, 14-bit LFSR) steps once,
//      while the other three pixels get 0 and do not count.
// An event above the window is discarded without any count.
//
// Interface: c carries one unsigned digitized sample of each pixel's shaped
// pulse per clk cycle. Thresholds are static inputs. rst is synchronous and
// active high.
// Timing: sum, d, lt and ut are combinational from c. evt_valid/evt_reject
// pulse one cycle after LT is sampled low. The decision is made in the first
// cycle that has the event end known and all d low; out_d, winner and
// eval_stb follow one cycle later, and the winner's ec_q steps on the next
// edge after that.
//
// The partitioning into adder, window comparators, ADWD, evaluation
// function and event counter follows the source's architecture; sampling
// every analog quantity on one system clock is this design's choice.
module cs_quad
  import cs_pkg::*;
#(
  parameter int unsigned CW  = CHARGE_W,
  parameter int unsigned OW  = OUT_W,
  parameter int unsigned ECW = EC_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [NPIX-1:0][CW-1:0]    c,           // pixel charge samples
  input  logic [CW-1:0]              th_com,      // common threshold
  input  logic [CW+1:0]              th1,         // lower window threshold
  input  logic [CW+1:0]              th2,         // upper window threshold
  output logic [CW+1:0]              sum,         // neighborhood sum
  output logic [NPIX-1:0]            d,           // common-threshold outputs
  output logic                       lt,
  output logic                       ut,
  output logic                       evt_valid,   // in-window event ended
  output logic                       evt_reject,  // over-window event ended
  output logic [NPIX-1:0][OW-1:0]    out_d,       // 65535 for the winner
  output logic [NPIX-1:0]            winner,
  output logic                       eval_stb,
  output logic [NPIX-1:0][ECW-1:0]   ec_q         // per-pixel event counters
);
  logic busy;

  charge_sum #(.CW(CW), .NPIX(NPIX), .SW(CW+2)) u_sum (.c(c), .sum(sum));

  window_comparator #(.SW(CW+2)) u_win (
    .sum(sum), .th1(th1), .th2(th2), .lt(lt), .ut(ut));

  adwd u_adwd (
    .clk(clk), .rst(rst), .lt(lt), .ut(ut),
    .evt_valid(evt_valid), .evt_reject(evt_reject), .busy(busy));

  for (genvar k = 0; k < NPIX; k++) begin : g_pix
    thcom_comparator #(.CW(CW)) u_thc (.c(c[k]), .th_com(th_com), .d(d[k]));

    event_counter #(.W(ECW)) u_ec (
      .clk(clk), .rst(rst), .inc(eval_stb && winner[k]), .q(ec_q[k]));
  end

  eval_function #(.NPIX(NPIX), .OW(OW)) u_ef (
    .clk(clk), .rst(rst), .d(d),
    .evt_valid(evt_valid), .evt_reject(evt_reject), .busy(busy),
    .out_d(out_d), .winner(winner), .eval_stb(eval_stb));
endmodule
