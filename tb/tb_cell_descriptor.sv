// tb_cell_descriptor: end-to-end check of the single-cell pipeline on a
// random 16-pixel-wide image with random idle cycles. Every output histogram
// is compared with a real-valued reference (atan2 orientation, exact
// magnitude formula, the voting rule, and a plain 8x8 sum), and every output
// must appear exactly 11 cycles after the pixel it belongs to. Cells touching
// an angle within 0.01 degree of a sector boundary are skipped.
module tb_cell_descriptor;
  import hog_pkg::*;
  import hog_ref_pkg::*;
  localparam int W = 16, CELL = 8, LAT = 11, NPIX = W * 40;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  pix_t in_pix;
  cell_hist_t hist;
  int checks = 0, failures = 0, skipped = 0;
  int pix [$];
  int votes [$];
  bit amb [$];
  int kinds [3];
  int in_cycle [$];
  int cycle = 0, nout = 0;

  cell_descriptor #(.IMG_W(W), .CELL(CELL)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5 * NPIX) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && in_valid) in_cycle.push_back(cycle);

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      votes_t h;
      bit ok;
      checks++;
      if (cycle - in_cycle[nout] != LAT) begin
        failures++;
        $display("output %0d after %0d cycles", nout, cycle - in_cycle[nout]);
      end
      h = ref_cell(votes, amb, W, CELL, nout, ok);
      if (!ok) skipped++;
      else for (int b = 0; b < NBINS; b++) begin
        checks++;
        if (int'(hist[b]) != h[b]) begin
          failures++;
          if (failures < 10) $display("k=%0d bin %0d: %0d expected %0d", nout, b, hist[b], h[b]);
        end
      end
      nout++;
    end
  end

  initial begin
    in_pix = 0;
    for (int n = 0; n < NPIX; n++) pix.push_back(int'($urandom_range(255)));
    ref_stream_votes(pix, W, votes, amb, kinds);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NPIX; n++) begin
      @(posedge clk);
      while ($urandom_range(4) == 0) begin in_valid <= 0; @(posedge clk); end
      in_valid <= 1;
      in_pix   <= pix_t'(pix[n]);
    end
    @(posedge clk) in_valid <= 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (nout != NPIX) begin failures++; $display("%0d outputs for %0d pixels", nout, NPIX); end
    $display("double votes %0d, split votes %0d, wrapped split votes %0d, skipped cells %0d",
             kinds[0], kinds[1], kinds[2], skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
