// tb_window3x3: streams random pixels of a narrow image (IMG_W = 16) with
// random idle cycles and checks all nine window pixels after every accepted
// pixel against the stored stream: win[r][c] = p[k - (2-r)*IMG_W - (2-c)].
// Checks start once two lines and two pixels have entered.
module tb_window3x3;
  import hog_pkg::*;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  pix_t in_pix;
  pix_t [2:0][2:0] win;
  int checks = 0, failures = 0;
  pix_t stream [$];

  window3x3 #(.IMG_W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Record every pixel at the edge that captures it.
  always @(posedge clk) if (rst_n && in_valid) stream.push_back(in_pix);

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int k;
      k = stream.size() - 1;
      if (k >= 2 * W + 2) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            checks++;
            if (win[r][c] !== stream[k - (2 - r) * W - (2 - c)]) begin
              failures++;
              $display("k=%0d win[%0d][%0d]=%0d expected %0d", k, r, c, win[r][c],
                       stream[k - (2 - r) * W - (2 - c)]);
            end
          end
      end
    end
  end

  initial begin
    in_pix = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8 * W * 4; n++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(3) != 0);
      in_pix   <= pix_t'($urandom);
    end
    @(posedge clk) in_valid <= 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
