// window_preparer: the 128x1 window constructor. It gives simultaneous
// access to the cell descriptor stream on a column of WIN_LINES consecutive
// image lines, the descriptors lying directly above one another.
//
// The newest descriptor is registered as the bottom tap; each tap above it is
// the registered output of a RAM delay line one image line long, fed by the
// tap below (IMG_W deep for the first line, IMG_W-1 for the others, because
// their input is already one sample late). With WIN_LINES = 128 that is 127
// line buffers and a 128-entry output column. After the enable that accepts
// h[k]:
//   tap[t] = h[k - (WIN_LINES-1-t)*IMG_W],  t = 0 top (oldest) .. WIN_LINES-1 bottom
// out_valid pulses one cycle after each in_valid. The line buffers have no
// reset: their outputs are meaningful once WIN_LINES lines have passed. The
// 128-line column built from RAM is the document's; the delay-line chaining
// and the timing are this design's.
module window_preparer
  import hog_pkg::*;
#(
  parameter int IMG_W     = 256,
  parameter int WIN_LINES = 128
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  cell_hist_t                     din,
  output logic                           out_valid,
  output cell_hist_t [WIN_LINES-1:0]     tap
);
  localparam int HW = $bits(cell_hist_t);

  cell_hist_t q [WIN_LINES];   // q[i] = h[k - i*IMG_W]

  always_ff @(posedge clk) begin
    if (in_valid) q[0] <= din;
  end

  for (genvar i = 1; i < WIN_LINES; i++) begin : g_line
    if (i == 1) begin : g_first
      ram_delay #(.W(HW), .DEPTH(IMG_W)) u_ram (
        .clk, .rst_n, .en(in_valid), .din(din), .dout(q[i]));
    end else begin : g_chain
      ram_delay #(.W(HW), .DEPTH(IMG_W - 1)) u_ram (
        .clk, .rst_n, .en(in_valid), .din(q[i-1]), .dout(q[i]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_comb begin
    for (int t = 0; t < WIN_LINES; t++) tap[t] = q[WIN_LINES-1-t];
  end
endmodule
