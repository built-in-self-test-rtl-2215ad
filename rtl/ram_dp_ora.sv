// ram_dp_ora: output response analyzer for the dual-port test of the free
// RAMs.
//
// Two adjacent RAMs receive identical patterns; while `en` is high (a read)
// their read outputs `a` and `b` are compared bit by bit and any mismatch is
// latched in a sticky per-bit flip-flop. The flip-flops double as a W-stage
// shift register for result readout: `shift` moves
// sin -> fail[0] -> ... -> fail[W-1] = sout. `clr` clears the flags.
module ram_dp_ora #(
  parameter int W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         shift,
  input  logic         sin,
  output logic [W-1:0] fail,
  output logic         sout
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     fail <= '0;
    else if (shift) fail <= {fail[W-2:0], sin};
    else if (clr)   fail <= '0;
    else if (en)    fail <= fail | (a ^ b);

  assign sout = fail[W-1];
endmodule
