// tb_routing_star: runs a vertical-repeater STAR through several routing
// BIST configurations. Fault-free configurations (straight and permuted
// PIP settings, with up/even and down/odd TPGs) must not fail; a stuck-on
// PIP (two PIPs of one multiplexer on) and a stuck-off PIP (none on) in one
// repeater must be reported. The result is then read through shift mode.
module tb_routing_star;
  import bist_pkg::*;
  localparam logic [7:0] PX = 8'h80;
  logic clk = 0, rst_n = 0;
  cfg_bus_t cfg;
  logic init = 0, run = 0, shift = 0, sin = 0, fail;
  logic [2:0] tpg_pat;
  int checks = 0, failures = 0;

  routing_star #(.PX(PX), .N_REP(4)) dut (.clk, .rst_n, .cfg, .init, .run, .shift, .sin, .fail, .tpg_pat);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [7:0] y, z, d);
    cfg = '{we:1'b1, x:PX, y:y, z:z, data:d}; @(negedge clk); cfg = '0;
  endtask

  // configure all repeaters with the given bytes, one repeater may differ
  task automatic config_all(logic [7:0] c0, c1, int bad, logic [7:0] b0, b1);
    for (int i = 0; i < 4; i++) begin
      wr(8'(i), 8'd0, (i == bad) ? b0 : c0);
      wr(8'(i), 8'd1, (i == bad) ? b1 : c1);
    end
  endtask

  task automatic session(logic odd, logic expect_fail, string what);
    wr(RSTAR_Y_TPG, 8'd0, {7'd0, odd});
    wr(RSTAR_Y_ORA, 8'd0, 8'h00);
    init = 1; @(negedge clk); init = 0;
    run = 1; repeat (8) @(negedge clk); run = 0;
    checks++;
    if (fail !== expect_fail) begin
      failures++; $display("%s (odd=%b): fail=%b expected %b", what, odd, fail, expect_fail);
    end
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // straight: mux0<-in0, mux1<-in1, mux2<-in2, forward outputs 0..2
    config_all(8'h11, 8'hC4, -1, 0, 0);
    session(0, 0, "straight up/even");
    session(1, 0, "straight down/odd");
    // permuted: mux0<-in1, mux1<-in2, mux2<-in0
    config_all(8'h22, 8'hC1, -1, 0, 0);
    session(0, 0, "permuted up/even");
    session(1, 0, "permuted down/odd");
    // mux3 used instead of mux2 (drop output 2): mux3<-in2
    config_all(8'h11, 8'hA0, -1, 0, 0);
    session(0, 0, "mux3 path");
    // stuck-on PIP in repeater 2: mux0 has in0 and in1 on
    config_all(8'h11, 8'hC4, 2, 8'h13, 8'hC4);
    session(0, 1, "stuck-on PIP");
    session(1, 1, "stuck-on PIP");
    // stuck-off PIP in repeater 1: mux1 has no PIP on
    config_all(8'h11, 8'hC4, 1, 8'h01, 8'hC4);
    session(0, 1, "stuck-off PIP");
    // read result: switch ORA to shift mode, flag still 1, shift in a 0
    wr(RSTAR_Y_ORA, 8'd0, 8'h01);
    checks++; if (fail !== 1'b1) failures++;
    shift = 1; @(negedge clk); shift = 0;
    checks++; if (fail !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
