// tb_hog_top_full: the whole accelerator at its default size (256-pixel-wide
// region, 128 x 64 detection window of 16 x 8 cells) processing one complete
// 256 x 256 region at one pixel per clock, with a few idle cycles. Checks
// every cell histogram, and every seventh grid once the window has filled
// (all 1152 bins, cell by cell), against the real-valued reference model;
// checks the 11- and 13-cycle latencies and one output per pixel; and counts
// the mechanisms of the design, failing if one never occurred: input stalls,
// double votes, split votes, split votes across the 180/0 degree wrap, and
// filled grids.
module tb_hog_top_full;
  import hog_pkg::*;
  import hog_ref_pkg::*;
  localparam int W = 256, CELL = 8, LINES = 128, GC = 8, NR = LINES / CELL;
  localparam int NPIX = W * 256;
  localparam int LAT_CELL = 11, LAT_GRID = 13;
  localparam int GRID_FIRST = (NR - 1) * CELL * W + (GC - 1) * CELL;
  logic clk = 0, rst_n = 0, in_valid = 0;
  pix_t in_pix;
  logic cell_valid, grid_valid;
  cell_hist_t cell_hist;
  cell_hist_t [NR-1:0][GC-1:0] grid;
  int checks = 0, failures = 0;
  int pix [$];
  int votes [$];
  bit amb [$];
  int kinds [3];
  int in_cycle [$];
  int cycle = 0, ncell = 0, ngrid = 0, stalls = 0, grids_checked = 0, grids_compared = 0;
  votes_t ref_h [$];
  bit     ref_ok [$];

  hog_top dut (.*);
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
    if (rst_n && cell_valid) begin
      checks++;
      if (cycle - in_cycle[ncell] != LAT_CELL) begin
        failures++; $display("cell %0d after %0d cycles", ncell, cycle - in_cycle[ncell]);
      end
      if (ref_ok[ncell]) for (int b = 0; b < NBINS; b++) begin
        checks++;
        if (int'(cell_hist[b]) != ref_h[ncell][b]) begin
          failures++;
          if (failures < 10) $display("cell %0d bin %0d: %0d expected %0d", ncell, b, cell_hist[b], ref_h[ncell][b]);
        end
      end
      ncell++;
    end
    if (rst_n && grid_valid) begin
      checks++;
      if (cycle - in_cycle[ngrid] != LAT_GRID) begin
        failures++; $display("grid %0d after %0d cycles", ngrid, cycle - in_cycle[ngrid]);
      end
      if (ngrid >= GRID_FIRST && ngrid % 7 == 0) begin
        bit all_ok;
        all_ok = 1;
        for (int r = 0; r < NR; r++)
          for (int c = 0; c < GC; c++) begin
            int j;
            j = ngrid - (NR - 1 - r) * CELL * W - (GC - 1 - c) * CELL;
            if (!ref_ok[j]) all_ok = 0;
            else for (int b = 0; b < NBINS; b++) begin
              checks++;
              if (int'(grid[r][c][b]) != ref_h[j][b]) begin
                failures++;
                if (failures < 10) $display("grid %0d [%0d][%0d] bin %0d wrong", ngrid, r, c, b);
              end
            end
          end
        if (all_ok) grids_checked++;
        grids_compared++;
      end
      ngrid++;
    end
  end

  int t_start, t_end;
  initial begin
    in_pix = 0;
    for (int n = 0; n < NPIX; n++) pix.push_back(int'($urandom_range(255)));
    ref_stream_votes(pix, W, votes, amb, kinds);
    for (int k = 0; k < NPIX; k++) begin
      bit ok;
      ref_h.push_back(ref_cell(votes, amb, W, CELL, k, ok));
      ref_ok.push_back(ok);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NPIX; n++) begin
      @(posedge clk);
      while ($urandom_range(4095) == 0) begin in_valid <= 0; stalls++; @(posedge clk); end
      in_valid <= 1;
      in_pix   <= pix_t'(pix[n]);
    end
    @(posedge clk) in_valid <= 0;
    repeat (LAT_GRID + 3) @(posedge clk);
    $display("region of %0d pixels: first input at cycle %0d, last grid output at cycle %0d (%0d stall cycles)",
             NPIX, in_cycle[0], in_cycle[NPIX-1] + LAT_GRID, stalls);
    checks += 2;
    if (ncell != NPIX) begin failures++; $display("%0d cell outputs for %0d pixels", ncell, NPIX); end
    if (ngrid != NPIX) begin failures++; $display("%0d grid outputs for %0d pixels", ngrid, NPIX); end
    $display("stalls %0d, double votes %0d, split votes %0d, wrapped split votes %0d, grids compared %0d (%0d with every cell checkable)",
             stalls, kinds[0], kinds[1], kinds[2], grids_compared, grids_checked);
    checks += 5;
    if (stalls == 0)        begin failures++; $display("no stall happened"); end
    if (kinds[0] == 0)      begin failures++; $display("no double vote happened"); end
    if (kinds[1] == 0)      begin failures++; $display("no split vote happened"); end
    if (kinds[2] == 0)      begin failures++; $display("no wrapped split vote happened"); end
    if (grids_compared == 0) begin failures++; $display("no filled grid compared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
