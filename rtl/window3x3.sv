// window3x3: 3x3 window formation over a progressive-scan pixel stream.
//
// Pixels arrive one per in_valid, line after line, IMG_W per line. Two line
// buffers (dual-port RAM delay lines) give the pixels one and two lines
// above the newest one, and three 3-pixel shift registers hold the window, so
// all nine pixels are readable at once. Each accepted pixel slides the window
// one position to the right, and in raster order on to the next line. The
// window has no border handling: at the start of a line its left columns still
// hold the end of the previous line, as a pure sliding window does.
//
// Interface: win[r][c], r = 0 top .. 2 bottom, c = 0 left .. 2 right. After
// accepting pixel p[k] the window holds win[r][c] = p[k - (2-r)*IMG_W - (2-c)],
// i.e. its centre is p[k - IMG_W - 1]. out_valid pulses one cycle after each
// in_valid; the window does not change in between. Line buffers built from
// RAM and registers follow the document; the raster-wrap border behaviour is
// this design's choice.
module window3x3
  import hog_pkg::*;
#(
  parameter int IMG_W = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  pix_t                 in_pix,
  output logic                 out_valid,
  output pix_t [2:0][2:0]      win
);
  pix_t         lb1_q, lb2_q;      // p[k-IMG_W], p[k-2*IMG_W]
  pix_t [2:0][1:0] sr;             // columns 0 and 1 of each row (col 2 of rows 0,1 are the RAM outputs)
  pix_t         newest;            // p[k]

  // Line buffer for row 1: input is the incoming pixel, delay IMG_W.
  ram_delay #(.W(PIX_W), .DEPTH(IMG_W)) u_lb1 (
    .clk, .rst_n, .en(in_valid), .din(in_pix), .dout(lb1_q));

  // Line buffer for row 0: fed from row 1's registered output, which is one
  // sample late, so one word shorter.
  ram_delay #(.W(PIX_W), .DEPTH(IMG_W - 1)) u_lb2 (
    .clk, .rst_n, .en(in_valid), .din(lb1_q), .dout(lb2_q));

  always_ff @(posedge clk) begin
    if (in_valid) begin
      newest   <= in_pix;
      sr[2][1] <= newest;   sr[2][0] <= sr[2][1];
      sr[1][1] <= lb1_q;    sr[1][0] <= sr[1][1];
      sr[0][1] <= lb2_q;    sr[0][0] <= sr[0][1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_comb begin
    win[2][2] = newest;
    win[1][2] = lb1_q;
    win[0][2] = lb2_q;
    for (int r = 0; r < 3; r++) begin
      win[r][1] = sr[r][1];
      win[r][0] = sr[r][0];
    end
  end
endmodule
