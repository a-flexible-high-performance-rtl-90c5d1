// grad_direction: unsigned gradient orientation as a 10-degree sector, with
// no atan2 and no division.
//
// The vector is first folded into the upper half plane (negated when gy < 0,
// or gy == 0 and gx < 0), so its angle theta lies in [0, 180). For each of
// the 18 sector boundaries phi_j = 5 + 10j degrees a fixed-point product test
//   gy*cos(phi_j) - gx*sin(phi_j) >= 0   <=>   theta >= phi_j
// is made in parallel (Q1.14 constants from hog_pkg), and the number of
// boundaries passed is the sector count 0..18:
//   sector = 0 or 18 : theta within 5 degrees of 0/180 (between bins 8 and 0)
//   sector = 2k+1    : theta within 5 degrees of bin k's centre 20k+10
//   sector = 2k+2    : theta between the centres of bins k and k+1
// A zero vector gives sector 18; its magnitude is zero, so its votes are too.
// One register stage: out_valid follows in_valid by one cycle. Replacing
// atan2 by multiplications and comparisons follows the document; the
// boundary-test formulation and the constants' precision are this design's.
module grad_direction
  import hog_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  grad_t   gx,
  input  grad_t   gy,
  output logic    out_valid,
  output sector_t sector
);
  localparam int PW = GRAD_W + 1 + COEF_FRAC + 3;   // product-difference width

  logic signed [GRAD_W:0] fx, fy;       // folded components, one bit wider for -(-256)
  logic [NBOUND-1:0]      passed;
  logic signed [PW-1:0]   d [NBOUND];
  sector_t                count;

  always_comb begin
    if (gy < 0 || (gy == 0 && gx < 0)) begin
      fx = -(GRAD_W+1)'(gx);
      fy = -(GRAD_W+1)'(gy);
    end else begin
      fx = (GRAD_W+1)'(gx);
      fy = (GRAD_W+1)'(gy);
    end
    count = '0;
    for (int j = 0; j < NBOUND; j++) begin
      d[j] = PW'(fy) * PW'(BOUND_COS[j]) - PW'(fx) * PW'(BOUND_SIN[j]);
      passed[j] = (d[j] >= 0);
      count = count + sector_t'(passed[j]);
    end
  end

  always_ff @(posedge clk) sector <= count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
