// window_comparator: the two global-threshold comparators on the sum.
//
// LT = 1 while sum > th1 and UT = 1 while sum > th2. With th2 > th1 a pulse
// whose peak lies between the thresholds produces only LT+ then LT-; a pulse
// above the window produces LT+, UT+, UT-, LT-. These two outputs feed the
// all-digital window discriminator. Combinational, no hysteresis.
//
// The upper comparator's polarity (UT high above th2) follows the event
// sequences of the source; the thresholds are run-time inputs.
module window_comparator #(
  parameter int unsigned SW = cs_pkg::SUM_W
) (
  input  logic [SW-1:0] sum,   // neighborhood sum
  input  logic [SW-1:0] th1,   // lower threshold
  input  logic [SW-1:0] th2,   // upper threshold
  output logic          lt,    // sum above th1
  output logic          ut     // sum above th2
);
  always_comb begin
    lt = (sum > th1);
    ut = (sum > th2);
  end
endmodule
