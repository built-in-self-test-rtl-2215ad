// tb_plb: configures the PLB model through the configuration bus with random
// LUT contents and modes and compares its X and Y outputs with a reference
// computed in the testbench from the stated PLB function, for random inputs.
// Also checks that writes to another PLB's address are ignored.
module tb_plb;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_bus_t cfg;
  logic init = 0, en = 0, w, x, y, z, sr, xo, yo;
  int checks = 0, failures = 0;
  logic [7:0] la, lb, md;
  logic mq;

  plb #(.PX(8'd3), .PY(8'd5)) dut (.clk, .rst_n, .cfg, .init, .en, .w, .x, .y, .z, .sr, .xo, .yo);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [7:0] px, py, pz, d);
    cfg = '{we:1'b1, x:px, y:py, z:pz, data:d};
    @(negedge clk);
    cfg = '0;
  endtask

  function automatic logic fref(logic q);
    logic a, b;
    a = la[{w, x, y}];
    b = lb[{x, y, z}];
    case (md[1:0])
      2'd0: return a;
      2'd1: return b;
      2'd2: return a & b;
      default: return a ^ q;
    endcase
  endfunction

  initial begin
    cfg = '0; {w, x, y, z, sr} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      la = 8'($urandom); lb = 8'($urandom); md = 8'($urandom);
      wr(8'd3, 8'd5, 8'd0, la);
      wr(8'd3, 8'd5, 8'd1, lb);
      wr(8'd3, 8'd5, 8'd2, md);
      wr(8'd3, 8'd6, 8'd0, ~la);   // other PLB: must not change this one
      wr(8'd4, 8'd5, 8'd1, ~lb);
      init = 1; @(negedge clk); init = 0;
      mq = 1'b0;
      en = 1;
      for (int i = 0; i < 30; i++) begin
        {w, x, y, z, sr} = 5'($urandom);
        #1;
        checks++;
        if (xo !== (md[2] ? mq : fref(mq)) || yo !== (md[3] ? mq : lb[{x, y, z}])) begin
          failures++;
          $display("t%0d i%0d: xo=%b yo=%b mode=%h", t, i, xo, yo, md);
        end
        @(negedge clk);
        mq = (md[4] && sr) ? md[5] : fref(mq);
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
