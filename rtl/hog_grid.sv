// hog_grid: arranges the cell descriptor stream into the grid of cells of a
// detection window (WIN_LINES x GRID_COLS*CELL pixels, 128 x 64 by default).
//
// The window preparer gives the descriptors of WIN_LINES consecutive lines;
// every CELL-th of them (the bottom line of each cell row, GRID_ROWS =
// WIN_LINES/CELL taps) feeds a row_delay that spreads it over GRID_COLS
// columns spaced CELL pixels apart. The result is
// every cell histogram of the detection window whose bottom-right cell is the
// newest descriptor, refreshed for every pixel. After the enable that
// accepts h[k]:
//   grid[r][c] = h[k - (GRID_ROWS-1-r)*CELL*IMG_W - (GRID_COLS-1-c)*CELL]
// r = 0 top row, c = 0 left column. out_valid pulses two cycles after each
// in_valid. The structure (window constructor, one chain of cell delays per
// used tap) is the document's; the index order of the outputs is this design's.
module hog_grid
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
  input  cell_hist_t din,
  output logic       out_valid,
  output cell_hist_t [WIN_LINES/CELL-1:0][GRID_COLS-1:0] grid
);
  localparam int GRID_ROWS = WIN_LINES / CELL;

  logic                          tap_valid;
  cell_hist_t [WIN_LINES-1:0]    tap;
  logic       [GRID_ROWS-1:0]    row_valid;

  window_preparer #(.IMG_W(IMG_W), .WIN_LINES(WIN_LINES)) u_wp (
    .clk, .rst_n, .in_valid, .din, .out_valid(tap_valid), .tap);

  for (genvar r = 0; r < GRID_ROWS; r++) begin : g_row
    row_delay #(.CELL(CELL), .GRID_COLS(GRID_COLS)) u_row (
      .clk, .rst_n, .in_valid(tap_valid), .din(tap[r*CELL + CELL-1]),
      .out_valid(row_valid[r]), .col(grid[r]));
  end

  assign out_valid = row_valid[0];

  initial assert (WIN_LINES % CELL == 0) else $error("hog_grid: WIN_LINES must be a multiple of CELL");

  // All rows move together.
  a_rows_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                   row_valid == '0 || row_valid == '1);
endmodule
