// tb_hog_grid: the grid arranger on a 16-pixel-wide stream, 32-line column
// (4 rows) and 3 columns, with random idle cycles. After every accepted
// descriptor checks grid[r][c] = h[k - (ROWS-1-r)*CELL*IMG_W - (COLS-1-c)*CELL]
// once the grid has filled, and the two-cycle valid delay.
module tb_hog_grid;
  import hog_pkg::*;
  localparam int W = 16, CELL = 8, LINES = 32, NT = LINES / CELL, GC = 3;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cell_hist_t din;
  cell_hist_t [NT-1:0][GC-1:0] grid;
  int checks = 0, failures = 0;
  cell_hist_t stream [$];
  bit last_valid = 0, last_valid2 = 0;
  int k1 = 0, k2 = 0;   // index of the sample that the grid output belongs to

  hog_grid #(.IMG_W(W), .CELL(CELL), .WIN_LINES(LINES), .GRID_COLS(GC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    last_valid <= rst_n && in_valid; last_valid2 <= last_valid;
    k2 <= k1;
    if (rst_n && in_valid) begin
      k1 <= stream.size();
      stream.push_back(din);
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != last_valid2) begin failures++; $display("valid wrong"); end
      if (out_valid && k2 >= (NT - 1) * CELL * W + (GC - 1) * CELL) begin
        int k;
        k = k2;
        for (int t = 0; t < NT; t++)
          for (int c = 0; c < GC; c++) begin
            checks++;
            if (grid[t][c] !== stream[k - (NT - 1 - t) * CELL * W - (GC - 1 - c) * CELL]) begin
              failures++;
              if (failures < 10) $display("k=%0d grid[%0d][%0d] wrong", k, t, c);
            end
          end
      end
    end
  end

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3 * LINES * W; n++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(3) != 0);
      for (int b = 0; b < NBINS; b++) din[b] <= bin_t'($urandom);
    end
    @(posedge clk) in_valid <= 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
