// logic_ora: comparison-based output response analyzer for logic BIST.
//
// In comparator mode it compares one output of the block under test on its
// left with the same output of the identically configured block on its
// right, and sets a sticky fail flip-flop on the first mismatch seen while
// `run` is high. Which output pair it watches (X or Y) is selected by the
// ORA's configuration byte; the two choices are the two alternating
// BUT-to-ORA routing schemes used in successive BIST configurations.
// A small PLB cannot hold both the comparator and a shift path, so the
// processor rewrites the mode byte to turn the ORA into one stage of a shift
// register; the flip-flop keeps its value across that rewrite. In shift mode
// each `shift` pulse loads `sin` (the previous ORA in the column).
// Configuration byte: (PX, PY, Z = 2), bit0 shift mode, bit1 watch Y.
// `clr` clears the fail flag. Output `fail` is the flip-flop.
module logic_ora
  import bist_pkg::*;
#(
  parameter logic [7:0] PX = 8'd0,
  parameter logic [7:0] PY = 8'd0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cfg_bus_t cfg,
  input  logic     clr,
  input  logic     run,
  input  logic     shift,
  input  logic     lx,   // X output of left BUT
  input  logic     ly,   // Y output of left BUT
  input  logic     rx,   // X output of right BUT
  input  logic     ry,   // Y output of right BUT
  input  logic     sin,
  output logic     fail
);
  logic [7:0] mode;
  logic       mism;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mode <= '0;
    else if (cfg_hit(cfg, PX, PY, Z_MODE)) mode <= cfg.data;

  assign mism = mode[ORA_OBSY_BIT] ? (ly ^ ry) : (lx ^ rx);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                  fail <= 1'b0;
    else if (mode[ORA_SHIFT_BIT]) begin
      if (shift)                 fail <= sin;
    end else if (clr)            fail <= 1'b0;
    else if (run && mism)        fail <= 1'b1;
endmodule
