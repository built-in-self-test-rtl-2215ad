// repeater: repeater cell of a global busing plane, the wires under test of
// the repeater routing BIST.
//
// The cell is built from four 3-input non-decoded multiplexers: each has one
// configuration bit per input (a programmable interconnect point, PIP), and
// its output is the OR of the inputs whose PIP is on, so two PIPs switched
// on together bridge their inputs and a mux with no PIP on drives 0 (this
// wired-OR and pull-down behaviour is this design's assumption). All four
// multiplexers select among the three incoming segments {express 1,
// express 0, middle}; their outputs are the outgoing express 0, express 1,
// middle segment and the middle segment toward the local PLB row.
// Configuration at (PX, PY): Z = 0 bits [2:0] mux 0 PIPs, [5:3] mux 1;
// Z = 1 bits [2:0] mux 2, [5:3] mux 3, [7:6] which of the four outputs is not
// passed on (`fwd` carries the other three in order). Purely combinational.
module repeater
  import bist_pkg::*;
#(
  parameter logic [7:0] PX = RSTAR_X0,
  parameter logic [7:0] PY = 8'd0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cfg_bus_t   cfg,
  input  logic [2:0] seg_in,
  output logic [3:0] seg_out,
  output logic [2:0] fwd
);
  logic [7:0] c0, c1;
  logic [2:0] pip [4];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      c0 <= '0; c1 <= '0;
    end else begin
      if (cfg_hit(cfg, PX, PY, 8'd0)) c0 <= cfg.data;
      if (cfg_hit(cfg, PX, PY, 8'd1)) c1 <= cfg.data;
    end

  assign pip[0] = c0[2:0];
  assign pip[1] = c0[5:3];
  assign pip[2] = c1[2:0];
  assign pip[3] = c1[5:3];

  for (genvar m = 0; m < 4; m++) begin : g_mux
    assign seg_out[m] = |(pip[m] & seg_in);
  end

  always_comb begin
    unique case (c1[7:6])
      2'd0:    fwd = seg_out[3:1];
      2'd1:    fwd = {seg_out[3:2], seg_out[0]};
      2'd2:    fwd = {seg_out[3], seg_out[1:0]};
      default: fwd = seg_out[2:0];
    endcase
  end
endmodule
