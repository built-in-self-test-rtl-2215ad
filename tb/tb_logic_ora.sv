// tb_logic_ora: checks the logic BIST ORA. In comparator mode a mismatch of
// the watched output pair (X, then Y after reconfiguration) sets the sticky
// fail flag while run is high and a mismatch on the other pair does not;
// clear resets it. After the mode byte is rewritten to shift mode the flag
// keeps its value and then follows sin on each shift pulse.
module tb_logic_ora;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_bus_t cfg;
  logic clr = 0, run = 0, shift = 0, lx = 0, ly = 0, rx = 0, ry = 0, sin = 0, fail;
  int checks = 0, failures = 0;

  logic_ora #(.PX(8'd2), .PY(8'd7)) dut (.clk, .rst_n, .cfg, .clr, .run, .shift,
    .lx, .ly, .rx, .ry, .sin, .fail);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [7:0] d);
    cfg = '{we:1'b1, x:8'd2, y:8'd7, z:Z_MODE, data:d};
    @(negedge clk); cfg = '0;
  endtask

  task automatic expect_fail(logic e, string what);
    checks++;
    if (fail !== e) begin failures++; $display("%s: fail=%b expected %b", what, fail, e); end
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    wr(8'h00);                              // compare X outputs
    run = 1;
    ly = 1; @(negedge clk); expect_fail(0, "Y mismatch ignored in X scheme");
    ly = 0; lx = 1; rx = 1; @(negedge clk); expect_fail(0, "equal X");
    rx = 0; run = 0; @(negedge clk); expect_fail(0, "mismatch without run");
    run = 1; @(negedge clk); expect_fail(1, "X mismatch");
    rx = 1; @(negedge clk); expect_fail(1, "sticky");
    clr = 1; @(negedge clk); clr = 0; expect_fail(0, "clear");
    wr(8'h02);                              // compare Y outputs
    lx = 0; @(negedge clk); expect_fail(0, "X mismatch ignored in Y scheme");
    ry = 1; @(negedge clk); expect_fail(1, "Y mismatch");
    run = 0;
    wr(8'h03);                              // shift mode, flag kept
    expect_fail(1, "flag kept over reconfiguration");
    sin = 0; @(negedge clk); expect_fail(1, "no shift pulse, hold");
    shift = 1; @(negedge clk); shift = 0; expect_fail(0, "shifted 0 in");
    sin = 1; shift = 1; @(negedge clk); shift = 0; expect_fail(1, "shifted 1 in");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
