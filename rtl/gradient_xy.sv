// gradient_xy: horizontal and vertical gradient components of a 3x3 window.
//
// Applies the centred kernels [-1 0 1] and [-1 0 1]^T to the window centre:
//   gx = right - left   = win[1][2] - win[1][0]
//   gy = bottom - top   = win[2][1] - win[0][1]
// Both are signed GRAD_W-bit values in -255..255. One register stage:
// out_valid follows in_valid by one cycle. The kernels are the document's;
// taking the row below minus the row above for gy (image rows grow downward)
// is this design's choice, and with unsigned orientations it only mirrors the
// angle.
module gradient_xy
  import hog_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  pix_t [2:0][2:0] win,
  output logic            out_valid,
  output grad_t           gx,
  output grad_t           gy
);
  always_ff @(posedge clk) begin
    gx <= grad_t'({1'b0, win[1][2]}) - grad_t'({1'b0, win[1][0]});
    gy <= grad_t'({1'b0, win[2][1]}) - grad_t'({1'b0, win[0][1]});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
