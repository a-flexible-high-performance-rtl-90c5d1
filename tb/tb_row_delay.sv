// tb_row_delay: streams random cell histograms with random idle cycles into
// one grid row and checks every column after every accepted sample:
// col[c] = h[k - (GRID_COLS-1-c)*CELL], plus the one-cycle valid delay.
module tb_row_delay;
  import hog_pkg::*;
  localparam int CELL = 8, GC = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cell_hist_t din;
  cell_hist_t [GC-1:0] col;
  int checks = 0, failures = 0;
  cell_hist_t stream [$];
  bit last_valid = 0;

  row_delay #(.CELL(CELL), .GRID_COLS(GC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    last_valid <= rst_n && in_valid;
    if (rst_n && in_valid) stream.push_back(din);
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != last_valid) begin failures++; $display("valid wrong"); end
      if (out_valid && stream.size() > (GC - 1) * CELL) begin
        int k;
        k = stream.size() - 1;
        for (int c = 0; c < GC; c++) begin
          checks++;
          if (col[c] !== stream[k - (GC - 1 - c) * CELL]) begin
            failures++;
            if (failures < 10) $display("k=%0d col %0d wrong", k, c);
          end
        end
      end
    end
  end

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
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
