// hog_pkg: shared widths, types and constants of the HoG cell-descriptor
// pipeline and the grid arranger.
//
// Widths follow from 8-bit pixels: centred differences fit 9 signed bits,
// the approximate magnitude max(0.875a + 0.5b, a) of two values below 256
// stays below 351 (9 bits), a double vote is twice that (10 bits), and a sum
// of 64 double votes stays below 44 800, which fits the 16-bit histogram bins.
// Nine orientation bins over 0..180 degrees, 20 degrees wide, centred at
// 10, 30, ..., 170 degrees.
package hog_pkg;

  localparam int PIX_W  = 8;          // pixel intensity
  localparam int GRAD_W = PIX_W + 1;  // signed gradient component
  localparam int MAG_W  = PIX_W + 1;  // approximate magnitude
  localparam int VOTE_W = MAG_W + 1;  // one bin's vote (up to a double vote)
  localparam int BIN_W  = 16;         // one bin of a cell histogram
  localparam int NBINS  = 9;          // orientation bins over 0..180 degrees
  localparam int NBOUND = 2 * NBINS;  // sector boundaries at 5, 15, ..., 175 deg
  localparam int SEC_W  = 5;          // sector count 0..18

  // Fixed-point (Q1.14) cosine and sine of the sector boundaries
  // phi_j = 5 + 10*j degrees, j = 0..17:
  //   BOUND_COS[j] = round(cos(phi_j) * 2^14), BOUND_SIN[j] = round(sin(phi_j) * 2^14)
  localparam int COEF_FRAC = 14;
  localparam int BOUND_COS [NBOUND] = '{
    16322, 15826, 14849, 13421, 11585, 9397, 6924, 4240, 1428,
    -1428, -4240, -6924, -9397, -11585, -13421, -14849, -15826, -16322};
  localparam int BOUND_SIN [NBOUND] = '{
    1428, 4240, 6924, 9397, 11585, 13421, 14849, 15826, 16322,
    16322, 15826, 14849, 13421, 11585, 9397, 6924, 4240, 1428};

  typedef logic        [PIX_W-1:0]  pix_t;
  typedef logic signed [GRAD_W-1:0] grad_t;
  typedef logic        [MAG_W-1:0]  mag_t;
  typedef logic        [SEC_W-1:0]  sector_t;
  typedef logic        [VOTE_W-1:0] vote_t;
  typedef logic        [BIN_W-1:0]  bin_t;

  // Votes of one pixel on the nine bins, and the histogram of one cell.
  typedef vote_t [NBINS-1:0] vote_vec_t;
  typedef bin_t  [NBINS-1:0] cell_hist_t;

endpackage
