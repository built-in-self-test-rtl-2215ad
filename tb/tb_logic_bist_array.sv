// tb_logic_bist_array: runs logic BIST on a 4-row, 4-BUT-column array as the
// processor would: configure all BUTs identically, clear, run 32 patterns,
// reconfigure the ORAs into shift registers, shift the results out, switch
// them back to comparators and reconfigure the BUTs. Fault-free
// configurations must give all-zero results. A BUT given a different LUT
// (standing in for a faulty block) must be reported by exactly the ORAs next
// to it, in the X scheme for a LUT A fault and in the Y scheme for a LUT B
// fault of an edge BUT, which only one ORA watches.
module tb_logic_bist_array;
  import bist_pkg::*;
  localparam int ROWS = 4, BC = 4, OC = BC - 1;
  logic clk = 0, rst_n = 0;
  cfg_bus_t cfg;
  logic init = 0, run = 0, shift = 0;
  logic [OC-1:0] chain_out;
  logic [4:0] tpg_q;
  logic res [ROWS][OC];
  int checks = 0, failures = 0;

  logic_bist_array #(.ROWS(ROWS), .BUT_COLS(BC)) dut (.clk, .rst_n, .cfg, .init, .run, .shift, .chain_out, .tpg_q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int x, int y, logic [7:0] z, logic [7:0] d);
    cfg = '{we:1'b1, x:8'(x), y:8'(y), z:z, data:d}; @(negedge clk); cfg = '0;
  endtask

  task automatic config_buts(logic [7:0] la, lb, md);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < BC; c++) begin
        wr(1 + 2*c, r, Z_LUTA, la); wr(1 + 2*c, r, Z_LUTB, lb); wr(1 + 2*c, r, Z_MODE, md);
      end
  endtask

  task automatic ora_mode(logic [7:0] md);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < OC; c++) wr(2 + 2*c, r, Z_MODE, md);
  endtask

  // one BIST configuration: run, then read every ORA through the chains
  task automatic bist(logic obs_y);
    ora_mode({6'd0, obs_y, 1'b0});
    init = 1; @(negedge clk); init = 0;
    run = 1; repeat (32) @(negedge clk); run = 0;
    checks++; if (tpg_q !== 5'd0) begin failures++; $display("TPG did not complete 32 patterns"); end
    ora_mode({6'd0, obs_y, 1'b1});
    for (int k = 0; k < ROWS; k++) begin
      for (int c = 0; c < OC; c++) res[ROWS-1-k][c] = chain_out[c];
      shift = 1; @(negedge clk); shift = 0;
    end
  endtask

  task automatic expect_fails(int bad_c, int bad_r, string what);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < OC; c++) begin
        logic e;
        e = (r == bad_r) && (c == bad_c || c + 1 == bad_c);
        checks++;
        if (res[r][c] !== e) begin
          failures++; $display("%s: ORA col %0d row %0d = %b expected %b", what, c, r, res[r][c], e);
        end
      end
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    config_buts(8'h96, 8'hE8, 8'h00);        // combinational outputs
    bist(0); expect_fails(-9, -9, "config 1 X");
    bist(1); expect_fails(-9, -9, "config 1 Y");
    config_buts(8'h6C, 8'h17, 8'h3E);        // registered outputs, set on sr
    bist(0); expect_fails(-9, -9, "config 2 X");
    bist(1); expect_fails(-9, -9, "config 2 Y");
    config_buts(8'h96, 8'hE8, 8'h00);
    wr(1 + 2*1, 2, Z_LUTA, 8'h97);           // BUT column 1, row 2 differs
    bist(0); expect_fails(1, 2, "LUT A fault, X scheme");
    wr(1 + 2*1, 2, Z_LUTA, 8'h96);
    wr(1 + 2*(BC-1), 0, Z_LUTB, 8'hE0);      // edge BUT column, row 0
    bist(1); expect_fails(BC-1, 0, "edge LUT B fault, Y scheme");
    bist(0); expect_fails(-9, -9, "LUT B fault unseen in X scheme");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
