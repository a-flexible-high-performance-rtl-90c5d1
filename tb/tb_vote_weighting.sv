// tb_vote_weighting: for every sector 0..18 and random magnitudes, checks the
// nine bin votes against the voting rule written from the angle ranges, and
// that each pixel's votes add up to twice its magnitude.
module tb_vote_weighting;
  import hog_pkg::*;
  import hog_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  mag_t mag;
  sector_t sector;
  vote_vec_t votes;
  int checks = 0, failures = 0;

  vote_weighting dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    votes_t e;
    int m, total;
    mag = 0; sector = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 19 * 40; n++) begin
      @(negedge clk);
      m = (n < 19) ? 350 : int'($urandom_range(350));
      mag = mag_t'(m); sector = sector_t'(n % 19); in_valid = 1;
      e = ref_votes(m, n % 19);
      @(negedge clk);
      total = 0;
      for (int b = 0; b < NBINS; b++) begin
        checks++;
        total += int'(votes[b]);
        if (int'(votes[b]) != e[b]) begin
          failures++;
          $display("sector %0d mag %0d bin %0d: %0d expected %0d", n % 19, m, b, votes[b], e[b]);
        end
      end
      checks++;
      if (total != 2 * m || !out_valid) begin failures++; $display("total %0d for mag %0d", total, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
