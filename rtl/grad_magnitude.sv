// grad_magnitude: approximate gradient magnitude without a square root.
//
//   m = sqrt(gx^2 + gy^2) ~ max(0.875*a + 0.5*b, a),
//   a = max(|gx|, |gy|), b = min(|gx|, |gy|)
// computed as max((8a - a + 4b) >> 3, a): shifts, adds and comparators only.
// The sum is formed exactly and truncated once, so the result is
// floor(0.875a + 0.5b) when that exceeds a. One register stage: out_valid
// follows in_valid by one cycle. The formula is the document's; taking
// a and b from the absolute values of the components, and truncating, is
// this design's reading of it.
module grad_magnitude
  import hog_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  grad_t gx,
  input  grad_t gy,
  output logic  out_valid,
  output mag_t  mag
);
  localparam int SW = MAG_W + 4;   // width of 8a - a + 4b

  logic [MAG_W-1:0] ax, ay, a, b;
  logic [SW-1:0]    s;
  logic [MAG_W-1:0] approx;

  always_comb begin
    ax = gx[GRAD_W-1] ? MAG_W'(-gx) : MAG_W'(gx);
    ay = gy[GRAD_W-1] ? MAG_W'(-gy) : MAG_W'(gy);
    a  = (ax > ay) ? ax : ay;
    b  = (ax > ay) ? ay : ax;
    s  = (SW'(a) << 3) - SW'(a) + (SW'(b) << 2);
    approx = MAG_W'(s >> 3);
  end

  always_ff @(posedge clk) mag <= (approx > a) ? approx : a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
