// event_counter: per-pixel event counter built as a linear feedback shift
// register.
//
// A W-bit Fibonacci LFSR that shifts one step for each clock cycle in which
// inc is high, so after n counted events the state is the n-th element of
// the LFSR sequence starting from the reset value 1. An LFSR needs only a
// shift register and a few XOR gates instead of a carry chain, which is why
// pixel counters use it; the count is recovered off-chip by looking the
// state up in the sequence. With the default W = 14 and feedback taps at
// bits 14, 5, 3 and 1 (x^14 + x^5 + x^3 + x + 1) the sequence has the
// maximal length 2**14 - 1 = 16383 before it repeats.
//
// Timing: q changes on the clock edge at which inc is sampled high.
// Synchronous active-high reset loads 1 (an LFSR must never hold all zeros).
//
// The 14-bit LFSR follows the source's single-pixel counter; the polynomial,
// reset value and the clock-enable form (instead of a gated counter clock)
// are this design's choices. TAPS must be changed together with W.
module event_counter #(
  parameter int unsigned   W    = cs_pkg::EC_W,
  parameter logic [W-1:0]  TAPS = W'(14'b10_0000_0001_0101)   // bits 14,5,3,1
) (
  input  logic         clk,
  input  logic         rst,   // synchronous, active high
  input  logic         inc,   // count one event
  output logic [W-1:0] q      // LFSR state
);
  always_ff @(posedge clk) begin
    if (rst)      q <= W'(1);
    else if (inc) q <= {q[W-2:0], ^(q & TAPS)};
  end

  a_never_zero: assert property (@(posedge clk) disable iff (rst) q != '0);
endmodule
