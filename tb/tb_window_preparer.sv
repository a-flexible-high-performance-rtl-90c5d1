// tb_window_preparer: a 16-pixel-wide stream with a 32-line column and
// random idle cycles. After every accepted descriptor checks all taps,
// tap[t] = h[k - (WIN_LINES-1-t)*IMG_W], once the column has filled, and
// the one-cycle valid delay.
module tb_window_preparer;
  import hog_pkg::*;
  localparam int W = 16, LINES = 32, NT = LINES;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cell_hist_t din;
  cell_hist_t [NT-1:0] tap;
  int checks = 0, failures = 0;
  cell_hist_t stream [$];
  bit last_valid = 0;

  window_preparer #(.IMG_W(W), .WIN_LINES(LINES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
      if (out_valid && stream.size() > (NT - 1) * W) begin
        int k;
        k = stream.size() - 1;
        for (int t = 0; t < NT; t++) begin
          checks++;
          if (tap[t] !== stream[k - (NT - 1 - t) * W]) begin
            failures++;
            if (failures < 10) $display("k=%0d tap %0d wrong", k, t);
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
