// tb_cell_delay: drives a tagged cell-histogram stream, registered on the
// same enable as the delay (as inside a grid row), with random idle cycles,
// and checks that the output is the registered sample CELL enables older,
// i.e. dout = x[k - CELL + 1] after capturing x[k].
module tb_cell_delay;
  import hog_pkg::*;
  localparam int CELL = 8;
  logic clk = 0, en = 0;
  cell_hist_t din, dout;
  int checks = 0, failures = 0;
  cell_hist_t stream [$];

  cell_delay #(.CELL(CELL)) dut (.*);
  always #5 clk = ~clk;

  // Record every sample at the edge that captures it.
  bit captured = 0;
  always @(posedge clk) begin
    captured <= en;
    if (en) stream.push_back(din);
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      en <= ($urandom_range(2) != 0);
      for (int b = 0; b < NBINS; b++) din[b] <= bin_t'($urandom);
      @(negedge clk);
      if (stream.size() >= CELL && captured) begin
        checks++;
        if (dout !== stream[stream.size() - CELL]) begin
          failures++;
          $display("n=%0d wrong output", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
