// window8x8: 8x8 cell formation over the stream of per-pixel vote vectors.
//
// The same sliding-window structure as the 3x3 window, CELL rows high: the
// newest row is a shift register fed by the input, and each of the CELL-1
// rows above it takes its newest column from a line buffer (dual-port RAM
// delay line) and shifts it left through registers. All CELL*CELL vote
// vectors of the cell are readable at once by the adder trees.
//
// Interface: win[r][c], r = 0 top .. CELL-1 bottom, c = 0 left .. CELL-1
// right. After accepting vector v[k], win[r][c] = v[k - (CELL-1-r)*IMG_W -
// (CELL-1-c)]. out_valid pulses one cycle after each in_valid. No border
// handling: the window wraps across line ends like the pixel window does.
// The 8x8 arrangement is the document's; line buffers and raster wrap are
// this design's choice.
module window8x8
  import hog_pkg::*;
#(
  parameter int IMG_W = 256,
  parameter int CELL  = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  vote_vec_t                         in_votes,
  output logic                              out_valid,
  output vote_vec_t [CELL-1:0][CELL-1:0]    win
);
  localparam int VW = $bits(vote_vec_t);

  vote_vec_t                       lb_q [CELL];         // newest column of row r (RAM output, or the input register for the bottom row)
  vote_vec_t [CELL-1:0][CELL-2:0]  sr;                  // columns 0..CELL-2 of every row
  vote_vec_t                       newest;

  assign lb_q[CELL-1] = newest;

  // Row CELL-2 is fed straight from the input (delay IMG_W); every row above
  // is fed from the registered output of the row below, one sample late, so
  // its buffer is one word shorter.
  for (genvar r = 0; r < CELL - 1; r++) begin : g_lb
    if (r == CELL - 2) begin : g_first
      ram_delay #(.W(VW), .DEPTH(IMG_W)) u_lb (
        .clk, .rst_n, .en(in_valid), .din(in_votes), .dout(lb_q[r]));
    end else begin : g_chain
      ram_delay #(.W(VW), .DEPTH(IMG_W - 1)) u_lb (
        .clk, .rst_n, .en(in_valid), .din(lb_q[r + 1]), .dout(lb_q[r]));
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      newest <= in_votes;
      for (int r = 0; r < CELL; r++) begin
        sr[r][CELL-2] <= lb_q[r];
        for (int c = 0; c < CELL - 2; c++) sr[r][c] <= sr[r][c + 1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_comb begin
    for (int r = 0; r < CELL; r++) begin
      win[r][CELL-1] = lb_q[r];
      for (int c = 0; c < CELL - 1; c++) win[r][c] = sr[r][c];
    end
  end
endmodule
