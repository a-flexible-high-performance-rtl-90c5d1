// row_delay: one row of the descriptor grid (a 64-tick delay built from
// cell delays).
//
// The incoming cell descriptor is registered, and GRID_COLS-1 cell_delay
// elements are chained behind that register. The register and the output of
// each element are the row's columns, each CELL ticks older than the one
// before, so the row covers GRID_COLS*CELL pixels of one image line (64 by
// default). After the enable that accepts h[k]:
//   col[c] = h[k - (GRID_COLS-1-c)*CELL],  c = 0 left (oldest) .. GRID_COLS-1 right
// out_valid pulses one cycle after each in_valid. The chain of cell delays
// is the document's (a column of cell delays per tap); the register at its
// head is this design's.
module row_delay
  import hog_pkg::*;
#(
  parameter int CELL      = 8,
  parameter int GRID_COLS = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  cell_hist_t                  din,
  output logic                        out_valid,
  output cell_hist_t [GRID_COLS-1:0]  col
);
  cell_hist_t tap [GRID_COLS];   // tap[i] = h[k - i*CELL]

  always_ff @(posedge clk) begin
    if (in_valid) tap[0] <= din;
  end

  for (genvar i = 1; i < GRID_COLS; i++) begin : g_cd
    cell_delay #(.CELL(CELL)) u_cd (
      .clk, .en(in_valid), .din(tap[i-1]), .dout(tap[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_comb begin
    for (int c = 0; c < GRID_COLS; c++) col[c] = tap[GRID_COLS-1-c];
  end
endmodule
