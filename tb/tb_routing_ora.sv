// tb_routing_ora: checks the parity ORA for all 8 wire values under both
// even and odd expectations (a wrong parity sets the sticky flag only while
// run is high), then its shift-register mode after reconfiguration.
module tb_routing_ora;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_bus_t cfg;
  logic clr = 0, run = 0, shift = 0, odd = 0, sin = 0, fail;
  logic [2:0] wut = 0;
  int checks = 0, failures = 0;

  routing_ora #(.PX(8'h90)) dut (.clk, .rst_n, .cfg, .clr, .run, .shift, .odd, .wut, .sin, .fail);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 2; k++)
      for (int v = 0; v < 8; v++) begin
        odd = 1'(k); wut = 3'(v);
        clr = 1; @(negedge clk); clr = 0;
        run = 0; @(negedge clk);
        checks++; if (fail !== 1'b0) failures++;
        run = 1; @(negedge clk); run = 0;
        checks++;
        if (fail !== ((^wut) != odd)) begin
          failures++; $display("odd=%b wut=%b fail=%b", odd, wut, fail);
        end
      end
    // leave flag at 1, switch to shift mode
    odd = 0; wut = 3'b001; run = 1; @(negedge clk); run = 0;
    cfg = '{we:1'b1, x:8'h90, y:RSTAR_Y_ORA, z:8'd0, data:8'h01}; @(negedge clk); cfg = '0;
    checks++; if (fail !== 1'b1) failures++;
    clr = 1; @(negedge clk); clr = 0;
    checks++; if (fail !== 1'b1) failures++;   // clear ignored in shift mode
    sin = 0; shift = 1; @(negedge clk); shift = 0;
    checks++; if (fail !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
