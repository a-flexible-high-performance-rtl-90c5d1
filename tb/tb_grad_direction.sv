// tb_grad_direction: compares the sector count with one derived from atan2
// in real arithmetic, over an exhaustive sweep of a coarse grid of gradient
// pairs plus random pairs. Angles within 0.01 degree of a boundary are
// skipped. Also counts that every sector 0..18 was produced.
module tb_grad_direction;
  import hog_pkg::*;
  import hog_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  grad_t gx, gy;
  sector_t sector;
  int checks = 0, failures = 0, skipped = 0;
  int seen [19];

  grad_direction dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int x, int y);
    bit amb;
    int e;
    @(negedge clk);
    gx = grad_t'(x); gy = grad_t'(y); in_valid = 1;
    e = ref_sector(x, y, amb);
    @(negedge clk);
    if (amb) skipped++;
    else begin
      checks++;
      seen[e]++;
      if (int'(sector) != e || !out_valid) begin
        failures++;
        $display("mismatch gx=%0d gy=%0d sector=%0d expected %0d", x, y, sector, e);
      end
    end
  endtask

  initial begin
    gx = 0; gy = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int x = -255; x <= 255; x += 17)
      for (int y = -255; y <= 255; y += 17) one(x, y);
    one(-255, 0); one(255, 0); one(0, 255); one(0, -255); one(-1, 0); one(0, 0);
    for (int n = 0; n < 4000; n++)
      one(int'($urandom_range(510)) - 255, int'($urandom_range(510)) - 255);
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("sector %0d never produced", i); end
    end
    $display("skipped %0d boundary cases", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
