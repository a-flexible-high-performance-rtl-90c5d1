// tb_adder_tree: feeds a new set of 64 random 10-bit values every cycle (with
// occasional idle cycles) and checks each sum, and that it appears exactly
// log2(64) = 6 cycles after its inputs.
module tb_adder_tree;
  localparam int N = 64, IW = 10, OW = 16, LAT = 6;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [N-1:0][IW-1:0] in_data;
  logic [OW-1:0] sum;
  int checks = 0, failures = 0;
  int exp_q [$];
  int cyc_q [$];
  int cycle = 0;

  adder_tree #(.N(N), .IW(IW), .OW(OW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: every out_valid must match the oldest outstanding sum.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        int e, c;
        e = exp_q.pop_front(); c = cyc_q.pop_front();
        if (int'(sum) != e || cycle - c != LAT) begin
          failures++;
          $display("sum %0d expected %0d, latency %0d", sum, e, cycle - c);
        end
      end
    end
  end

  initial begin
    int s;
    in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      s = 0;
      for (int i = 0; i < N; i++) begin
        in_data[i] = (n == 0) ? '1 : IW'($urandom);
        s += int'(in_data[i]);
      end
      in_valid = ($urandom_range(9) != 0);
      if (in_valid) begin exp_q.push_back(s); cyc_q.push_back(cycle); end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d sums never came out", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
