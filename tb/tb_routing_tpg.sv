// tb_routing_tpg: checks the routing TPG patterns: up-count with even parity
// by default and down-count with odd parity after reconfiguration; parity
// of all three wires must be even or odd respectively, and the count must
// step by +1 or -1 modulo 4.
module tb_routing_tpg;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_bus_t cfg;
  logic clr = 0, en = 0, odd;
  logic [2:0] pat;
  int checks = 0, failures = 0;
  int c;

  routing_tpg #(.PX(8'h85)) dut (.clk, .rst_n, .cfg, .clr, .en, .odd, .pat);

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
    for (int k = 0; k < 2; k++) begin
      cfg = '{we:1'b1, x:8'h85, y:RSTAR_Y_TPG, z:8'd0, data:8'(k)};
      @(negedge clk); cfg = '0;
      clr = 1; @(negedge clk); clr = 0;
      checks++; if (odd !== 1'(k)) failures++;
      c = 0; en = 1;
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (pat[1:0] !== 2'(c) || (^pat) !== 1'(k)) begin
          failures++; $display("k%0d i%0d pat=%b", k, i, pat);
        end
        @(negedge clk);
        c = (k == 0) ? (c + 1) % 4 : (c + 3) % 4;
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
