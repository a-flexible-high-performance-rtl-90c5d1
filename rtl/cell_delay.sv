// cell_delay: delays the cell descriptor stream by CELL pixel ticks.
//
// A CELL-stage shift register of cell histograms that moves only on en
// (one tick per accepted pixel), the small delay element from which the
// grid rows are built. When its input is itself a register updated on the
// same enable (as inside row_delay), the output lags that register by
// exactly CELL ticks: after the enable that captures sample x[k],
// dout = x[k - CELL + 1] of the values presented at din. The function is
// the document's; a plain register shift (no RAM) is this design's choice.
module cell_delay
  import hog_pkg::*;
#(
  parameter int CELL = 8
) (
  input  logic       clk,
  input  logic       en,
  input  cell_hist_t din,
  output cell_hist_t dout
);
  cell_hist_t sr [CELL];

  always_ff @(posedge clk) begin
    if (en) begin
      sr[0] <= din;
      for (int i = 1; i < CELL; i++) sr[i] <= sr[i - 1];
    end
  end

  assign dout = sr[CELL-1];
endmodule
