// tb_window8x8: streams random vote vectors into an 8x8 cell window over a
// 16-wide image with random idle cycles, and after every accepted vector
// checks all 64 positions against the stored stream:
// win[r][c] = v[k - (7-r)*IMG_W - (7-c)].
module tb_window8x8;
  import hog_pkg::*;
  localparam int W = 16, CELL = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  vote_vec_t in_votes;
  vote_vec_t [CELL-1:0][CELL-1:0] win;
  int checks = 0, failures = 0;
  vote_vec_t stream [$];

  window8x8 #(.IMG_W(W), .CELL(CELL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Record every pixel at the edge that captures it.
  always @(posedge clk) if (rst_n && in_valid) stream.push_back(in_votes);

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int k;
      k = stream.size() - 1;
      if (k >= (CELL - 1) * W + CELL - 1) begin
        for (int r = 0; r < CELL; r++)
          for (int c = 0; c < CELL; c++) begin
            checks++;
            if (win[r][c] !== stream[k - (CELL - 1 - r) * W - (CELL - 1 - c)]) begin
              failures++;
              if (failures < 10) $display("k=%0d win[%0d][%0d] wrong", k, r, c);
            end
          end
      end
    end
  end

  initial begin
    in_votes = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20 * W; n++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(3) != 0);
      for (int b = 0; b < NBINS; b++) in_votes[b] <= vote_t'($urandom);
    end
    @(posedge clk) in_valid <= 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
