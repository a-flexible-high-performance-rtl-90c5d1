// ram_delay: a delay line of DEPTH enabled ticks held in a simple dual-port
// RAM, the line buffer used by the window formation blocks and the window
// preparer.
//
// A circular write pointer advances on every enable; on the same edge the
// word under the pointer is read (read-before-write) into the dout register.
// So after the enable that writes sample x[k], dout holds x[k-DEPTH].
// Nothing moves while en is low. The RAM has no reset: its first DEPTH
// outputs are whatever it held, and users must not rely on them.
module ram_delay #(
  parameter int W     = 8,
  parameter int DEPTH = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;

  always_ff @(posedge clk) begin
    if (en) begin
      dout     <= mem[ptr];
      mem[ptr] <= din;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           ptr <= '0;
    else if (en && ptr == AW'(DEPTH - 1)) ptr <= '0;
    else if (en)                          ptr <= ptr + 1'b1;
  end

  initial assert (DEPTH >= 1) else $error("ram_delay: DEPTH must be at least 1");
endmodule
