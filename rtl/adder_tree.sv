// adder_tree: pipelined sum of N unsigned inputs.
//
// A binary tree of adders with a register after every level: log2(N) levels,
// so the sum of the inputs presented with in_valid appears log2(N) cycles
// later with out_valid. Each level's sums are kept at the full output width
// OW, so nothing overflows as long as N * (2^IW - 1) < 2^OW. A new set of
// inputs may enter every cycle. N must be a power of two. One tree per
// orientation bin sums the cell's 64 votes, as the document describes; the
// per-level pipelining is this design's choice.
module adder_tree #(
  parameter int N  = 64,
  parameter int IW = 10,
  parameter int OW = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N-1:0][IW-1:0]  in_data,
  output logic                  out_valid,
  output logic [OW-1:0]         sum
);
  localparam int LEVELS = $clog2(N);

  // Level l holds N >> l partial sums; level 0 is the input itself.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int M = N >> l;
    logic [OW-1:0] s [M];
    logic          v;
    if (l == 0) begin : g_in
      always_comb begin
        for (int i = 0; i < M; i++) s[i] = OW'(in_data[i]);
      end
      assign v = in_valid;
    end else begin : g_add
      always_ff @(posedge clk) begin
        for (int i = 0; i < M; i++) s[i] <= g_lvl[l-1].s[2*i] + g_lvl[l-1].s[2*i+1];
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) v <= 1'b0;
        else        v <= g_lvl[l-1].v;
      end
    end
  end

  assign sum       = g_lvl[LEVELS].s[0];
  assign out_valid = g_lvl[LEVELS].v;

  initial assert (N == (1 << LEVELS)) else $error("adder_tree: N must be a power of two");
endmodule
