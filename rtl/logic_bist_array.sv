// logic_bist_array: column-based logic BIST of the FPGA core's PLB array.
//
// Column 0 (X = 0) holds the test pattern generators; then columns of blocks
// under test (BUTs) and columns of comparison ORAs alternate:
// X = 1 BUT, 2 ORA, 3 BUT, ... so BUT column j sits at X = 1 + 2j and ORA
// column j at X = 2 + 2j. With ROWS = 48 and BUT_COLS = 24 this fills a
// 48x48 array with 1,152 BUTs and 1,104 ORAs, the counts given for the
// 48x48 device. Two identical 5-bit counters are used as TPGs, one driving
// the even BUT columns and one the odd ones, so that a faulty TPG also shows
// up as a mismatch. Each ORA compares the BUTs to its left and right in the
// same row; BUTs of the two outer columns are watched by one ORA only.
// The BUTs are configured individually through the configuration bus (all
// identically for a fault-free test). The ORAs of one column form a shift
// chain from row 0 up to row ROWS-1 once switched to shift mode; chain_out[j]
// is the last stage of ORA column j.
// Control: `init` clears the TPGs, the BUT flip-flops and the ORA fail flags;
// `run` advances the TPGs and enables the BUTs and comparisons; `shift`
// moves the ORA chains by one stage.
// The original design swaps the roles of the PLBs between two test sessions (and
// may rotate the floor plan by 90 degrees); in this fixed-function model a
// session is the same structure, so one array stands for all sessions.
module logic_bist_array
  import bist_pkg::*;
#(
  parameter int ROWS     = 48,
  parameter int BUT_COLS = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_bus_t          cfg,
  input  logic              init,
  input  logic              run,
  input  logic              shift,
  output logic [BUT_COLS-2:0] chain_out,
  output logic [4:0]        tpg_q
);
  localparam int ORA_COLS = BUT_COLS - 1;

  logic [4:0] tpg [2];
  logic       bx   [ROWS][BUT_COLS];
  logic       by   [ROWS][BUT_COLS];
  logic       ofail[ROWS][ORA_COLS];

  for (genvar t = 0; t < 2; t++) begin : g_tpg
    logic_tpg #(.W(5)) u_tpg (
      .clk, .rst_n, .clr(init), .en(run), .q(tpg[t])
    );
  end
  assign tpg_q = tpg[0];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < BUT_COLS; c++) begin : g_but
      plb #(.PX(8'(1 + 2*c)), .PY(8'(r))) u_but (
        .clk, .rst_n, .cfg, .init, .en(run),
        .w (tpg[c%2][0]), .x(tpg[c%2][1]), .y(tpg[c%2][2]), .z(tpg[c%2][3]),
        .sr(tpg[c%2][4]),
        .xo(bx[r][c]), .yo(by[r][c])
      );
    end
    for (genvar c = 0; c < ORA_COLS; c++) begin : g_ora
      logic sin;
      if (r == 0) begin : g_first
        assign sin = 1'b0;
      end else begin : g_next
        assign sin = ofail[r-1][c];
      end
      logic_ora #(.PX(8'(2 + 2*c)), .PY(8'(r))) u_ora (
        .clk, .rst_n, .cfg, .clr(init), .run, .shift,
        .lx(bx[r][c]), .ly(by[r][c]), .rx(bx[r][c+1]), .ry(by[r][c+1]),
        .sin, .fail(ofail[r][c])
      );
    end
  end

  for (genvar c = 0; c < ORA_COLS; c++) begin : g_out
    assign chain_out[c] = ofail[ROWS-1][c];
  end
endmodule
