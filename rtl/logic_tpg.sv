// logic_tpg: test pattern generator for logic BIST.
//
// A W-bit binary up-counter (W = 5, as in the original design) whose count is routed
// over global wires to a column of blocks under test: bits [3:0] feed the
// PLB inputs w, x, y, z and bit 4 the flip-flop set/reset (that bit
// assignment is this design's choice). `clr` restarts at zero; the count
// advances on every clock with `en` high and wraps after 2**W patterns.
module logic_tpg #(
  parameter int W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= q + 1'b1;
endmodule
