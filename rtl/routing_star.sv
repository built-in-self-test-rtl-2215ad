// routing_star: self-test area (STAR) for the vertical repeater cells.
//
// A STAR is the smallest region holding a TPG, the wires under test and an
// ORA; many STARs run at once and a failing ORA locates the fault to its
// STAR. This one spans 1x16 PLBs, i.e. N_REP = 4 repeaters (one per four
// PLBs) in series: the routing TPG drives its three wires {parity, count}
// into the first repeater, each repeater forwards three of its four outputs
// to the next, and the parity ORA checks the last three. Over a set of
// configurations every PIP of every repeater is switched on (stuck-off test)
// and off while neighbours carry other values (stuck-on and bridging test).
// Configuration: TPG at (PX, 0xFE, 0), ORA at (PX, 0xFF, 0), repeater i at
// (PX, i, 0..1). `init` restarts the TPG and clears the ORA, `run` steps the
// TPG and enables checking, `shift` moves the ORA chain (sin -> fail).
// The wires are combinational, so a pattern is checked in the cycle it is
// driven.
module routing_star
  import bist_pkg::*;
#(
  parameter logic [7:0] PX    = RSTAR_X0,
  parameter int         N_REP = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cfg_bus_t cfg,
  input  logic     init,
  input  logic     run,
  input  logic     shift,
  input  logic     sin,
  output logic     fail,
  output logic [2:0] tpg_pat
);
  logic       odd;
  logic [2:0] seg [N_REP+1];

  routing_tpg #(.PX(PX)) u_tpg (
    .clk, .rst_n, .cfg, .clr(init), .en(run), .odd, .pat(seg[0])
  );
  assign tpg_pat = seg[0];

  for (genvar i = 0; i < N_REP; i++) begin : g_rep
    logic [3:0] so;
    repeater #(.PX(PX), .PY(8'(i))) u_rep (
      .clk, .rst_n, .cfg, .seg_in(seg[i]), .seg_out(so), .fwd(seg[i+1])
    );
  end

  routing_ora #(.PX(PX)) u_ora (
    .clk, .rst_n, .cfg, .clr(init), .run, .shift, .odd,
    .wut(seg[N_REP]), .sin, .fail
  );
endmodule
