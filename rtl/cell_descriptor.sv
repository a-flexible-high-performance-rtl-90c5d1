// cell_descriptor: the single-cell processing pipeline (block descriptor
// computation). For every incoming pixel it produces the 9-bin histogram of
// oriented gradients of the 8x8 cell whose bottom-right pixel is the newest
// gradient sample.
//
// Stages, each registered, one pixel per clock:
//   window3x3      3x3 window from two line buffers            1 cycle
//   gradient_xy    gx, gy by [-1 0 1] kernels                  1 cycle
//   grad_magnitude max(0.875a + 0.5b, a)    } in parallel      1 cycle
//   grad_direction 10-degree sector         }
//   vote_weighting two single votes or one double vote         1 cycle
//   window8x8      8x8 cell of vote vectors, seven line buffers 1 cycle
//   adder_tree x9  one 64-input tree per bin                   log2(64) = 6 cycles
// Total latency LATENCY = 11 cycles from in_valid to out_valid. in_valid may
// have gaps; the windows only move on accepted pixels and every output
// corresponds to exactly one input pixel. After accepting pixel p[k] the
// output histogram covers the gradients centred at pixels
// p[k - IMG_W - 1 - r*IMG_W - c], r, c = 0..CELL-1. The histogram is not
// normalized. The stage order is the document's; the widths, the pipelining
// and the per-stage timing are this design's.
module cell_descriptor
  import hog_pkg::*;
#(
  parameter int IMG_W = 256,
  parameter int CELL  = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  pix_t       in_pix,
  output logic       out_valid,
  output cell_hist_t hist
);
  localparam int NPIX    = CELL * CELL;

  logic            w3_valid, g_valid, m_valid, d_valid, v_valid, w8_valid;
  pix_t [2:0][2:0] w3;
  grad_t           gx, gy;
  mag_t            mag;
  sector_t         sector;
  vote_vec_t       votes;
  vote_vec_t [CELL-1:0][CELL-1:0] w8;
  logic [NBINS-1:0] tree_valid;

  window3x3 #(.IMG_W(IMG_W)) u_w3 (
    .clk, .rst_n, .in_valid, .in_pix, .out_valid(w3_valid), .win(w3));

  gradient_xy u_grad (
    .clk, .rst_n, .in_valid(w3_valid), .win(w3), .out_valid(g_valid), .gx, .gy);

  grad_magnitude u_mag (
    .clk, .rst_n, .in_valid(g_valid), .gx, .gy, .out_valid(m_valid), .mag);

  grad_direction u_dir (
    .clk, .rst_n, .in_valid(g_valid), .gx, .gy, .out_valid(d_valid), .sector);

  vote_weighting u_vote (
    .clk, .rst_n, .in_valid(m_valid), .mag, .sector, .out_valid(v_valid), .votes);

  window8x8 #(.IMG_W(IMG_W), .CELL(CELL)) u_w8 (
    .clk, .rst_n, .in_valid(v_valid), .in_votes(votes), .out_valid(w8_valid), .win(w8));

  for (genvar b = 0; b < NBINS; b++) begin : g_bin
    logic [NPIX-1:0][VOTE_W-1:0] bin_in;
    always_comb begin
      for (int r = 0; r < CELL; r++)
        for (int c = 0; c < CELL; c++)
          bin_in[r*CELL + c] = w8[r][c][b];
    end
    adder_tree #(.N(NPIX), .IW(VOTE_W), .OW(BIN_W)) u_tree (
      .clk, .rst_n, .in_valid(w8_valid), .in_data(bin_in),
      .out_valid(tree_valid[b]), .sum(hist[b]));
  end

  assign out_valid = tree_valid[0];

  // The magnitude and direction paths, and the nine trees, must stay aligned.
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                              m_valid == d_valid && (tree_valid == '0 || tree_valid == '1));
endmodule
