// routing_tpg: test pattern generator for parity-based routing BIST.
//
// A 2-bit binary counter plus a parity bit: the three bits {parity, count}
// are driven onto three wires under test. Configured as up-counter with even
// parity or down-counter with odd parity; neighbouring STARs use opposite
// kinds so that adjacent wires carry different values (bridging and stuck-on
// faults). The kind is one configuration byte at (PX, Y = 0xFE, Z = 0),
// bit0 = 1 for down/odd. `clr` restarts the count at 0; it steps on each
// clock with `en` high. Output is registered.
module routing_tpg
  import bist_pkg::*;
#(
  parameter logic [7:0] PX = RSTAR_X0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cfg_bus_t   cfg,
  input  logic       clr,
  input  logic       en,
  output logic       odd,   // 1: down-count / odd parity
  output logic [2:0] pat    // {parity, count[1:0]}
);
  logic [1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) odd <= 1'b0;
    else if (cfg_hit(cfg, PX, RSTAR_Y_TPG, 8'd0)) odd <= cfg.data[0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   cnt <= '0;
    else if (clr) cnt <= '0;
    else if (en)  cnt <= odd ? cnt - 1'b1 : cnt + 1'b1;

  assign pat = {(^cnt) ^ odd, cnt};
endmodule
