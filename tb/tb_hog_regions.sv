// tb_hog_regions: the throughput workload. Sixteen 256 x 256 regions are
// streamed back to back, one pixel per clock, through the engine at its
// default size. The test checks that each pixel yields one cell and one grid
// output, and that the whole batch finishes in 16 * 65536 cycles plus the
// 13-cycle latency. It spot-checks every 13th cell histogram, and every
// 4099th grid with all 1152 bins, against the real-valued reference model.
module tb_hog_regions;
  import hog_pkg::*;
  import hog_ref_pkg::*;
  localparam int W = 256, CELL = 8, NR = 16, GC = 8, NREG = 16;
  localparam int NPIX = NREG * W * 256;
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
  int cycle = 0, ncell = 0, ngrid = 0, first_in = -1, last_grid = -1;
  int cells_compared = 0, grids_compared = 0;

  hog_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NPIX + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && in_valid && first_in < 0) first_in = cycle;

  always @(negedge clk) begin
    if (rst_n && cell_valid) begin
      if (ncell % 13 == 0) begin
        votes_t h;
        bit ok;
        h = ref_cell(votes, amb, W, CELL, ncell, ok);
        if (ok) begin
          cells_compared++;
          for (int b = 0; b < NBINS; b++) begin
            checks++;
            if (int'(cell_hist[b]) != h[b]) begin
              failures++;
              if (failures < 10) $display("cell %0d bin %0d: %0d expected %0d", ncell, b, cell_hist[b], h[b]);
            end
          end
        end
      end
      ncell++;
    end
    if (rst_n && grid_valid) begin
      if (ngrid >= GRID_FIRST && ngrid % 4099 == 0) begin
        grids_compared++;
        for (int r = 0; r < NR; r++)
          for (int c = 0; c < GC; c++) begin
            votes_t h;
            bit ok;
            int j;
            j = ngrid - (NR - 1 - r) * CELL * W - (GC - 1 - c) * CELL;
            h = ref_cell(votes, amb, W, CELL, j, ok);
            if (ok) for (int b = 0; b < NBINS; b++) begin
              checks++;
              if (int'(grid[r][c][b]) != h[b]) begin
                failures++;
                if (failures < 10) $display("grid %0d [%0d][%0d] bin %0d wrong", ngrid, r, c, b);
              end
            end
          end
      end
      ngrid++;
      last_grid = cycle;
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
      in_valid <= 1;
      in_pix   <= pix_t'(pix[n]);
    end
    @(posedge clk) in_valid <= 0;
    repeat (LAT_GRID + 3) @(posedge clk);
    checks += 3;
    if (ncell != NPIX) begin failures++; $display("%0d cell outputs for %0d pixels", ncell, NPIX); end
    if (ngrid != NPIX) begin failures++; $display("%0d grid outputs for %0d pixels", ngrid, NPIX); end
    if (last_grid - first_in != NPIX - 1 + LAT_GRID) begin
      failures++;
      $display("batch took %0d cycles, expected %0d", last_grid - first_in + 1, NPIX + LAT_GRID);
    end
    $display("%0d regions: %0d cycles from first pixel to last grid (%0.3f ms at 300 MHz); %0d cells and %0d grids compared",
             NREG, last_grid - first_in + 1, real'(last_grid - first_in + 1) / 300.0e3, cells_compared, grids_compared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
