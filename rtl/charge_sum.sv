// charge_sum: neighborhood charge adder, sum = C(0,0)+C(0,1)+C(-1,0)+C(-1,1).
//
// Adds the NPIX pixel charges of one neighborhood so that a charge cloud
// split over several pixels is seen again as one full-energy pulse. The
// output is $clog2(NPIX) bits wider than one charge, so it never wraps.
// Purely combinational; the result follows the inputs in the same cycle.
// In the source the summation is done on analog voltages or currents; the
// digital adder on sampled charges is this design's form of it.
module charge_sum #(
  parameter int unsigned CW   = cs_pkg::CHARGE_W,
  parameter int unsigned NPIX = cs_pkg::NPIX,
  parameter int unsigned SW   = CW + $clog2(NPIX)
) (
  input  logic [NPIX-1:0][CW-1:0] c,    // pixel charges
  output logic [SW-1:0]           sum   // neighborhood sum
);
  always_comb begin
    sum = '0;
    for (int unsigned k = 0; k < NPIX; k++)
      sum = sum + SW'(c[k]);
  end
endmodule
