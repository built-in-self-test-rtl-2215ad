// free_ram_bist: BIST of all free RAMs of the FPGA core, tested in parallel.
//
// An N x N array of 32x4 free RAMs (N = 12 for a 48x48 PLB array; the
// rightmost column can only work single-port) is driven by one March TPG.
// Three BIST configurations are applied one after another by rewriting the
// control byte at configuration address (X = 0xF0, Y = 0, Z = 0):
//   bit0 asynchronous mode, bit1 dual-port mode, bits [3:2] algorithm
//   (bist_pkg::ram_alg_e). The configurations used are synchronous
//   dual-port with the dual-port test, synchronous single-port with March-LR
//   and background data sequences, and asynchronous single-port with March Y.
// Single-port modes: every RAM has a ram_sp_ora that checks reads against
// the TPG's expected data and writes against the TPG's write data.
// Dual-port mode: a ram_dp_ora compares the read outputs of RAM (r, c) and
// RAM (r, c+1) for c = 0 .. N-3, the dual-port-capable columns, giving the
// N x (N-2) ORA groups of the original resource count.
// In synchronous mode the RAM's output is one clock late, so the TPG's
// compare signals are delayed by one clock before they reach the ORAs.
// The ORAs of one row form two shift chains (single-port and dual-port
// ORAs), read at sp_chain_out[r] / dp_chain_out[r]; `shift` moves all
// chains one bit, `init` clears all ORAs. `start` runs the TPG; `done` is
// the TPG's done flag.
// The original design tests all free RAMs single-port; its resource count lists
// N x (N-1) single-port ORA groups, which would leave one RAM column
// unchecked, so here every RAM, rightmost column included, has one.
module free_ram_bist
  import bist_pkg::*;
#(
  parameter int N = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  cfg_bus_t     cfg,
  input  logic         init,
  input  logic         start,
  input  logic         shift,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] sp_chain_out,
  output logic [N-1:0] dp_chain_out
);
  localparam int W  = 4;
  localparam int AW = 5;

  logic [7:0]    ctrl;
  logic          async_m, dual_m;
  ram_alg_e      alg;
  logic [AW-1:0] addr;
  logic          we, rd;
  logic [W-1:0]  wdata, exp;
  logic          c_en, c_rd, c_oen_n;
  logic [W-1:0]  c_exp, c_wdata;
  logic          d_en, d_rd, d_oen_n;
  logic [W-1:0]  d_exp, d_wdata;
  logic [W-1:0]  bus [N][N];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ctrl <= '0;
    else if (cfg_hit(cfg, FRAM_CTRL_X, 8'd0, 8'd0)) ctrl <= cfg.data;

  assign async_m = ctrl[0];
  assign dual_m  = ctrl[1];
  assign alg     = ram_alg_e'(ctrl[3:2]);

  march_tpg #(.AW(AW), .W(W)) u_tpg (
    .clk, .rst_n, .start, .alg, .busy, .done,
    .addr, .we, .rd, .wdata, .exp
  );

  // One-clock delay of the compare information for synchronous mode.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      d_en <= 1'b0; d_rd <= 1'b0; d_oen_n <= 1'b1; d_exp <= '0; d_wdata <= '0;
    end else begin
      d_en <= busy; d_rd <= rd; d_oen_n <= !rd; d_exp <= exp; d_wdata <= wdata;
    end

  assign c_en    = async_m ? busy  : d_en;
  assign c_rd    = async_m ? rd    : d_rd;
  assign c_oen_n = async_m ? !rd   : d_oen_n;
  assign c_exp   = async_m ? exp   : d_exp;
  assign c_wdata = async_m ? wdata : d_wdata;

  for (genvar r = 0; r < N; r++) begin : g_row
    logic sp_s [N+1];
    logic dp_s [N-1];
    assign sp_s[0] = 1'b0;
    assign dp_s[0] = 1'b0;

    for (genvar c = 0; c < N; c++) begin : g_col
      logic [W-1:0] spf;
      free_ram #(.DEPTH(32), .W(W), .SP_ONLY(c == N-1)) u_ram (
        .clk, .async_mode(async_m), .dual_mode(dual_m),
        .addr, .raddr(addr), .din(wdata), .we, .oen_n(!rd), .bus(bus[r][c])
      );
      ram_sp_ora #(.W(W)) u_sp (
        .clk, .rst_n, .clr(init), .en(c_en && !dual_m), .oen_n(c_oen_n),
        .bus(bus[r][c]), .exp(c_exp), .tdata(c_wdata),
        .shift, .sin(sp_s[c]), .fail(spf), .sout(sp_s[c+1])
      );
    end

    for (genvar c = 0; c < N-2; c++) begin : g_dp
      logic [W-1:0] dpf;
      ram_dp_ora #(.W(W)) u_dp (
        .clk, .rst_n, .clr(init), .en(c_rd && dual_m),
        .a(bus[r][c]), .b(bus[r][c+1]),
        .shift, .sin(dp_s[c]), .fail(dpf), .sout(dp_s[c+1])
      );
    end

    assign sp_chain_out[r] = sp_s[N];
    assign dp_chain_out[r] = dp_s[N-2];
  end
endmodule
