// routing_ora: parity-check output response analyzer for routing BIST.
//
// Checks the parity of the three wires arriving at the end of a STAR: even
// parity for an up/even TPG, odd parity for a down/odd TPG (input `odd`).
// A violation while `run` is high sets a sticky fail flip-flop. As with the
// logic BIST ORA, the processor rewrites the configuration byte
// (PX, Y = 0xFF, Z = 0, bit0) to turn the ORA into a shift-register stage.
// In shift mode `shift` loads `sin`. `clr` clears the flag.
module routing_ora
  import bist_pkg::*;
#(
  parameter logic [7:0] PX = RSTAR_X0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cfg_bus_t   cfg,
  input  logic       clr,
  input  logic       run,
  input  logic       shift,
  input  logic       odd,
  input  logic [2:0] wut,
  input  logic       sin,
  output logic       fail
);
  logic [7:0] mode;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mode <= '0;
    else if (cfg_hit(cfg, PX, RSTAR_Y_ORA, 8'd0)) mode <= cfg.data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                          fail <= 1'b0;
    else if (mode[0]) begin
      if (shift)                         fail <= sin;
    end else if (clr)                    fail <= 1'b0;
    else if (run && ((^wut) != odd))     fail <= 1'b1;
endmodule
