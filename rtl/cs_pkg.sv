// cs_pkg: shared sizes for the charge-sharing suppression neighborhood.
//
// A neighborhood is four pixels around one shared digital cell (the
// 2 x 2 arrangement P(0,0), P(0,1), P(-1,0), P(-1,1)). Pixel charges enter
// as unsigned digitized samples of CHARGE_W bits; the neighborhood sum is two
// bits wider so four full-scale charges cannot overflow. The per-pixel
// output value is 16 bits, so the winning pixel is given 65535. The event
// counter is a 14-bit LFSR, as in the single-pixel counter this design
// builds on. The four pixel counts, 16-bit output and 14-bit counter follow
// the source; the 8-bit charge sample is this design's own choice.
package cs_pkg;
  localparam int unsigned NPIX     = 4;
  localparam int unsigned CHARGE_W = 8;
  localparam int unsigned SUM_W    = CHARGE_W + $clog2(NPIX);
  localparam int unsigned OUT_W    = 16;
  localparam int unsigned EC_W     = 14;

  // Pixel order used on every NPIX-wide bus.
  typedef enum logic [1:0] {
    PIX_00  = 2'd0,   // P(0,0)
    PIX_01  = 2'd1,   // P(0,1)
    PIX_M10 = 2'd2,   // P(-1,0)
    PIX_M11 = 2'd3    // P(-1,1)
  } pix_idx_e;
endpackage
