// tb_logic_tpg: checks the 5-bit logic BIST counter: it starts at 0 after
// clear, steps once per enabled clock, holds when disabled, and wraps after
// 32 patterns, and that clear returns it to 0 in mid-run.
module tb_logic_tpg;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [4:0] q;
  int checks = 0, failures = 0;
  int model;

  logic_tpg #(.W(5)) dut (.clk, .rst_n, .clr, .en, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    checks++; if (q !== 5'd0) failures++;
    for (int i = 0; i < 100; i++) begin
      en = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (en) model = (model + 1) % 32;
      checks++;
      if (q !== 5'(model)) begin
        failures++; $display("step %0d: q=%0d expected %0d", i, q, model);
      end
    end
    // clear in the middle of a run
    en = 1; repeat (5) @(negedge clk);
    clr = 1; @(negedge clk); clr = 0;
    checks++; if (q !== 5'd0) begin failures++; $display("clear failed"); end
    // 32 enabled clocks return to the same value
    en = 1;
    begin
      logic [4:0] s; s = q;
      repeat (32) @(negedge clk);
      checks++; if (q !== s) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
