// adwd: all-digital window discriminator (synchronous form).
//
// Watches the lower (LT) and upper (UT) comparator outputs of the
// neighborhood sum and classifies each pulse by its sequence of edges:
//   no LT edge                : no event
//   LT+ -> LT-                : event inside the energy window -> evt_valid
//   LT+ -> UT+ -> UT- -> LT-  : event above the window         -> evt_reject
// A three-state machine (IDLE, INWIN, OVER) samples LT and UT on every
// rising clk edge. IDLE moves to INWIN on LT (or straight to OVER if UT is
// already high), INWIN moves to OVER on UT, and either returns to IDLE when
// LT falls. The state is decided only when LT falls, because only then is it
// known that UT never rose.
//
// Timing: if LT is sampled low at edge k while in INWIN (OVER), evt_valid
// (evt_reject) is high for exactly one cycle after edge k. busy is high from
// the edge after LT is first sampled high until evt_valid/evt_reject go
// high; it is low in the cycle of the pulse.
//
// The source describes this block as a self-timed asynchronous controller
// that emits a clock edge only for in-window pulses. Here it is clocked by
// the system clock and emits one-cycle pulses; the separate reject pulse is
// this design's addition so that the evaluation function can discard the
// counts of a rejected pulse.
module adwd (
  input  logic clk,
  input  logic rst,         // synchronous, active high
  input  logic lt,          // sum above th1
  input  logic ut,          // sum above th2
  output logic evt_valid,   // one-cycle pulse: in-window event ended
  output logic evt_reject,  // one-cycle pulse: over-window event ended
  output logic busy         // a pulse is in progress
);
  typedef enum logic [1:0] {IDLE = 2'd0, INWIN = 2'd1, OVER = 2'd2} state_e;

  state_e state, state_n;
  logic   valid_n, reject_n;

  always_comb begin
    state_n  = state;
    valid_n  = 1'b0;
    reject_n = 1'b0;
    unique case (state)
      IDLE:    if (ut)       state_n = OVER;
               else if (lt)  state_n = INWIN;
      INWIN:   if (ut)       state_n = OVER;
               else if (!lt) begin state_n = IDLE; valid_n = 1'b1; end
      OVER:    if (!lt && !ut) begin state_n = IDLE; reject_n = 1'b1; end
      default: state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      evt_valid  <= 1'b0;
      evt_reject <= 1'b0;
    end else begin
      state      <= state_n;
      evt_valid  <= valid_n;
      evt_reject <= reject_n;
    end
  end

  assign busy = (state != IDLE);

  // The two outcomes of one pulse are exclusive.
  a_one_outcome: assert property (@(posedge clk) disable iff (rst)
    !(evt_valid && evt_reject));
endmodule
