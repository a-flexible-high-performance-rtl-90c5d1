// vote_weighting: magnitude-weighted bin votes of one pixel.
//
// Instead of bilinear interpolation between bins, a pixel casts equal votes,
// each worth its magnitude, on the two bins whose centres are closest to its
// orientation; when the orientation is within 5 degrees of a bin centre it
// casts a double vote (twice the magnitude) on that bin alone. Every pixel
// so contributes 2*mag in total. From the sector count of grad_direction:
//   sector 0 or 18 -> bins 8 and 0 get mag each (orientation wraps at 180)
//   sector 2k+1    -> bin k gets 2*mag
//   sector 2k+2    -> bins k and k+1 get mag each
// One register stage: out_valid follows in_valid by one cycle; mag and
// sector must belong to the same pixel. The voting rule is the document's;
// weighting each single vote by the full magnitude is this design's reading.
module vote_weighting
  import hog_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  mag_t      mag,
  input  sector_t   sector,
  output logic      out_valid,
  output vote_vec_t votes
);
  vote_vec_t v;
  int unsigned k;

  always_comb begin
    v = '0;
    k = 0;
    if (sector == 0 || sector >= sector_t'(NBOUND)) begin
      v[NBINS-1] = vote_t'(mag);
      v[0]       = vote_t'(mag);
    end else if (sector[0]) begin
      k = int'(sector) >> 1;
      v[k] = vote_t'(mag) << 1;
    end else begin
      k = (int'(sector) >> 1) - 1;
      v[k]     = vote_t'(mag);
      v[k + 1] = vote_t'(mag);
    end
  end

  always_ff @(posedge clk) votes <= v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
