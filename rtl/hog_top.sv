// hog_top: HoG descriptor accelerator for a 256-pixel-wide region of
// interest, computing the unnormalized descriptor of a 128 x 64 detection
// window at every pixel position.
//
// Pixels of the region enter in progressive-scan order, one per in_valid
// (one per clock at full rate). cell_descriptor turns each pixel into the
// 9-bin histogram of the 8x8 cell ending there (11 cycles); hog_grid keeps
// enough of that stream to present all 16 x 8 cell histograms of the
// detection window ending there (2 more cycles). After accepting p[k] the
// outputs are:
//   cell_hist  = histogram of the cell whose newest gradient is centred at
//                p[k - IMG_W - 1]
//   grid[r][c] = cell output of k - (15-r)*8*IMG_W - (7-c)*8
// grid_valid follows in_valid by 13 cycles and cell_valid by 11. Windows
// slide across line ends without border handling: results are meaningful
// where the whole window lies inside the region, and the region's first
// WIN_LINES + 9 lines only fill the buffers. Block normalization is not done
// here. Structure and sizes follow the document; output ordering, latency
// and border behaviour are this design's.
module hog_top
  import hog_pkg::*;
#(
  parameter int IMG_W     = 256,
  parameter int CELL      = 8,
  parameter int WIN_LINES = 128,
  parameter int GRID_COLS = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  pix_t       in_pix,
  output logic       cell_valid,
  output cell_hist_t cell_hist,
  output logic       grid_valid,
  output cell_hist_t [WIN_LINES/CELL-1:0][GRID_COLS-1:0] grid
);
  cell_descriptor #(.IMG_W(IMG_W), .CELL(CELL)) u_cell (
    .clk, .rst_n, .in_valid, .in_pix, .out_valid(cell_valid), .hist(cell_hist));

  hog_grid #(.IMG_W(IMG_W), .CELL(CELL), .WIN_LINES(WIN_LINES), .GRID_COLS(GRID_COLS)) u_grid (
    .clk, .rst_n, .in_valid(cell_valid), .din(cell_hist), .out_valid(grid_valid), .grid);
endmodule
