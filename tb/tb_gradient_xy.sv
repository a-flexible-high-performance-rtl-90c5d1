// tb_gradient_xy: drives random 3x3 windows (including the extremes 0 and
// 255) into gradient_xy and checks gx = right - left and gy = bottom - top
// one cycle later, together with the valid delay.
module tb_gradient_xy;
  import hog_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  pix_t [2:0][2:0] win;
  grad_t gx, gy;
  int checks = 0, failures = 0;

  gradient_xy dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex, ey;
    win = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      foreach (win[r, c]) win[r][c] = pix_t'($urandom);
      if (n % 7 == 0) begin win[1][2] = 0; win[1][0] = 255; win[2][1] = 255; win[0][1] = 0; end
      in_valid = (n % 3 != 0);
      ex = int'(win[1][2]) - int'(win[1][0]);
      ey = int'(win[2][1]) - int'(win[0][1]);
      @(negedge clk);
      checks++;
      if (int'(gx) != ex || int'(gy) != ey || out_valid != in_valid) begin
        failures++;
        $display("mismatch: gx=%0d/%0d gy=%0d/%0d", gx, ex, gy, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
