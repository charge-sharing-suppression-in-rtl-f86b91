// eval_function: decides which pixel of the neighborhood collected the
// largest share of a charge cloud.
//
// One OW-bit counter per pixel counts clock cycles while that pixel's
// common-threshold comparator output D is high: the time a shaped pulse stays
// above a common threshold grows with its charge, so the longest count marks
// the pixel with the largest charge. The counters saturate at all ones.
//
// A decision is made in the first cycle in which all D inputs are low and the
// window discriminator has reported the end of an event (evt_valid or
// evt_reject in that cycle, or earlier while some D was still high, which is
// then remembered as pending):
//   accepted event: the counters are compared; the pixel with the largest
//     count gets out_d = 2**OW-1 (65535) and a one-hot winner bit, every
//     other pixel gets 0; eval_stb pulses. Equal largest counts go to the
//     lowest pixel index. If no pixel crossed the threshold, all outputs
//     are 0, winner is 0, and eval_stb still pulses.
//   rejected event: no decision, the outputs keep their values.
// In both cases every counter is cleared so the next event starts from zero.
// Counts gathered while the discriminator is idle and no event is pending
// (a pixel over the common threshold while the sum stays under th1) are
// discarded as soon as all D are low again.
//
// Timing: out_d, winner and eval_stb are registered and change one cycle
// after the decision cycle; eval_stb is high for one cycle. Synchronous
// active-high reset clears counters and outputs.
//
// The counters, the all-D-low trigger, the 65535/0 outputs and the reset of
// counters and outputs follow the source. The source's D inputs act as
// counter clocks; here they are count enables sampled on the system clock.
// The tie rule, the pending flag, the reject path and the discard of idle
// counts are this design's own choices.
module eval_function #(
  parameter int unsigned NPIX = cs_pkg::NPIX,
  parameter int unsigned OW   = cs_pkg::OUT_W
) (
  input  logic                     clk,
  input  logic                     rst,         // synchronous, active high
  input  logic [NPIX-1:0]          d,           // common-threshold comparators
  input  logic                     evt_valid,   // from adwd
  input  logic                     evt_reject,  // from adwd
  input  logic                     busy,        // from adwd
  output logic [NPIX-1:0][OW-1:0]  out_d,       // per-pixel output value
  output logic [NPIX-1:0]          winner,      // one-hot winning pixel
  output logic                     eval_stb     // one-cycle decision strobe
);
  typedef enum logic [1:0] {P_NONE = 2'd0, P_VALID = 2'd1, P_REJECT = 2'd2} pend_e;

  logic [NPIX-1:0][OW-1:0] cnt;
  pend_e                   pend;

  logic all_low, any_cnt, do_valid, do_reject, do_discard;
  logic [NPIX-1:0] win_n;

  always_comb begin
    all_low    = (d == '0);
    any_cnt    = (cnt != '0);
    do_valid   = all_low && (evt_valid  || pend == P_VALID);
    do_reject  = all_low && (evt_reject || pend == P_REJECT);
    do_discard = all_low && !busy && pend == P_NONE && !evt_valid && !evt_reject && any_cnt;
  end

  // Largest count, lowest index on ties; no winner if all counts are zero.
  always_comb begin
    logic [OW-1:0] best;
    best  = '0;
    win_n = '0;
    for (int unsigned k = 0; k < NPIX; k++) begin
      if (cnt[k] > best) begin
        best  = cnt[k];
        win_n = '0;
        win_n[k] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      pend     <= P_NONE;
      out_d    <= '0;
      winner   <= '0;
      eval_stb <= 1'b0;
    end else begin
      eval_stb <= 1'b0;
      if (do_valid || do_reject || do_discard) begin
        cnt  <= '0;
        pend <= P_NONE;
        if (do_valid) begin
          eval_stb <= 1'b1;
          winner   <= win_n;
          for (int unsigned k = 0; k < NPIX; k++)
            out_d[k] <= win_n[k] ? {OW{1'b1}} : '0;
        end
      end else begin
        if (evt_valid)       pend <= P_VALID;
        else if (evt_reject) pend <= P_REJECT;
        for (int unsigned k = 0; k < NPIX; k++)
          if (d[k] && cnt[k] != {OW{1'b1}})
            cnt[k] <= cnt[k] + 1'b1;
      end
    end
  end

  a_winner_onehot: assert property (@(posedge clk) disable iff (rst)
    eval_stb |-> $onehot0(winner));
endmodule
