// plb: programmable logic block of the FPGA core, used as a block under test
// (BUT) by logic BIST.
//
// The block holds two 3-input look-up tables, an AND gate, a D flip-flop with
// set/reset, and output multiplexers, as the device description lists them.
// How these parts are connected is not specified there; this model uses:
//   LUT A inputs {w,x,y}, LUT B inputs {x,y,z}
//   function f  = LUT A, LUT B, LUT A & LUT B (the AND gate) or LUT A ^ Q,
//                 chosen by mode[1:0]
//   flip-flop D = f; when mode[4] is set, input sr forces Q to mode[5]
//   X output    = Q if mode[2] else f;  Y output = Q if mode[3] else LUT B
// Its three configuration bytes are written by the processor through the
// configuration bus at (PX, PY, Z = 0 LUT A, 1 LUT B, 2 mode). Reset clears
// configuration and flip-flop. `init` clears the flip-flop only (used to
// start two identical BUTs from the same state). `en` is the clock enable.
// All outputs are combinational from the inputs and the flip-flop.
module plb
  import bist_pkg::*;
#(
  parameter logic [7:0] PX = 8'd0,
  parameter logic [7:0] PY = 8'd0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cfg_bus_t cfg,
  input  logic     init,
  input  logic     en,
  input  logic     w,
  input  logic     x,
  input  logic     y,
  input  logic     z,
  input  logic     sr,
  output logic     xo,
  output logic     yo
);
  logic [7:0] luta, lutb, mode;
  logic       q, la, lb, f;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      luta <= '0; lutb <= '0; mode <= '0;
    end else begin
      if (cfg_hit(cfg, PX, PY, Z_LUTA)) luta <= cfg.data;
      if (cfg_hit(cfg, PX, PY, Z_LUTB)) lutb <= cfg.data;
      if (cfg_hit(cfg, PX, PY, Z_MODE)) mode <= cfg.data;
    end

  always_comb begin
    la = luta[{w, x, y}];
    lb = lutb[{x, y, z}];
    unique case (mode[1:0])
      2'd0: f = la;
      2'd1: f = lb;
      2'd2: f = la & lb;
      default: f = la ^ q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                  q <= 1'b0;
    else if (init)               q <= 1'b0;
    else if (en) begin
      if (mode[4] && sr)         q <= mode[5];
      else                       q <= f;
    end

  assign xo = mode[2] ? q : f;
  assign yo = mode[3] ? q : lb;
endmodule
