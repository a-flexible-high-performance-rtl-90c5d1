// tb_grad_magnitude: checks the approximate magnitude against a real-valued
// evaluation of max(0.875a + 0.5b, a) for random and extreme gradient pairs,
// and that it stays within 12% of the true Euclidean norm.
module tb_grad_magnitude;
  import hog_pkg::*;
  import hog_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  grad_t gx, gy;
  mag_t mag;
  int checks = 0, failures = 0;

  grad_magnitude dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, e;
    real eu;
    gx = 0; gy = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      case (n)
        0: begin x = 255; y = 255; end
        1: begin x = -255; y = -255; end
        2: begin x = 0; y = 0; end
        3: begin x = -255; y = 0; end
        default: begin x = int'($urandom_range(510)) - 255; y = int'($urandom_range(510)) - 255; end
      endcase
      gx = grad_t'(x); gy = grad_t'(y);
      in_valid = 1;
      e = ref_mag(x, y);
      @(negedge clk);
      checks++;
      if (int'(mag) != e || !out_valid) begin
        failures++;
        $display("mismatch gx=%0d gy=%0d mag=%0d expected %0d", x, y, mag, e);
      end
      eu = $sqrt(real'(x * x + y * y));
      checks++;
      if (real'(mag) > 1.12 * eu + 1.0 || real'(mag) < 0.88 * eu - 1.0) begin
        failures++;
        $display("approximation too far: gx=%0d gy=%0d mag=%0d norm=%f", x, y, mag, eu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
