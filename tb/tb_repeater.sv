// tb_repeater: configures random PIP patterns into the repeater and checks
// every output against the wired-OR of the selected inputs and the forwarded
// three outputs against the dropped-output setting, for all input values.
module tb_repeater;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_bus_t cfg;
  logic [2:0] seg_in, fwd, exp_f;
  logic [3:0] seg_out, exp_o;
  logic [7:0] c0, c1;
  int checks = 0, failures = 0;

  repeater #(.PX(8'h81), .PY(8'd2)) dut (.clk, .rst_n, .cfg, .seg_in, .seg_out, .fwd);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; seg_in = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      c0 = 8'($urandom); c1 = 8'($urandom);
      cfg = '{we:1'b1, x:8'h81, y:8'd2, z:8'd0, data:c0}; @(negedge clk);
      cfg = '{we:1'b1, x:8'h81, y:8'd2, z:8'd1, data:c1}; @(negedge clk);
      cfg = '{we:1'b1, x:8'h81, y:8'd3, z:8'd1, data:~c1}; @(negedge clk);
      cfg = '0;
      for (int v = 0; v < 8; v++) begin
        seg_in = 3'(v);
        #1;
        exp_o[0] = |(c0[2:0] & seg_in);
        exp_o[1] = |(c0[5:3] & seg_in);
        exp_o[2] = |(c1[2:0] & seg_in);
        exp_o[3] = |(c1[5:3] & seg_in);
        case (c1[7:6])
          2'd0: exp_f = {exp_o[3], exp_o[2], exp_o[1]};
          2'd1: exp_f = {exp_o[3], exp_o[2], exp_o[0]};
          2'd2: exp_f = {exp_o[3], exp_o[1], exp_o[0]};
          default: exp_f = {exp_o[2], exp_o[1], exp_o[0]};
        endcase
        checks++;
        if (seg_out !== exp_o || fwd !== exp_f) begin
          failures++; $display("cfg %h %h in %b: out %b fwd %b (exp %b %b) dut %h %h", c0, c1, seg_in, seg_out, fwd, exp_o, exp_f, dut.c0, dut.c1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
