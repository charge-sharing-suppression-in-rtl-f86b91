// thcom_comparator: common-threshold comparator of one pixel.
//
// Produces D = 1 while the pixel's charge sample C is strictly greater than
// the common threshold th_com shared by the whole neighborhood, 0 otherwise.
// The evaluation function uses D both to measure how long each pixel stays
// above threshold and to know when the event is over.
//
// In the source this is an analog comparator on the shaped pulse; here the
// pulse arrives as an unsigned CW-bit sample per clock, so the comparator is
// a plain combinational magnitude compare with no delay and no hysteresis.
module thcom_comparator #(
  parameter int unsigned CW = cs_pkg::CHARGE_W
) (
  input  logic [CW-1:0] c,       // digitized pixel charge C(i,j)
  input  logic [CW-1:0] th_com,  // common threshold
  output logic          d        // D(i,j)
);
  always_comb d = (c > th_com);
endmodule
