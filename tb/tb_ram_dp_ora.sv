// tb_ram_dp_ora: checks the dual-port RAM ORA: per-bit sticky mismatch of the
// two RAM outputs while en is high, clear, and readout through the shift
// chain.
module tb_ram_dp_ora;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, shift = 0, sin = 0, sout;
  logic [3:0] a = 0, b = 0, fail, model;
  int checks = 0, failures = 0;

  ram_dp_ora #(.W(4)) dut (.clk, .rst_n, .clr, .en, .a, .b, .shift, .sin, .fail, .sout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      clr = 1; @(negedge clk); clr = 0; model = 0;
      for (int i = 0; i < 6; i++) begin
        en = ($urandom_range(0, 3) != 0);
        a = 4'($urandom); b = $urandom_range(0, 1) ? a : 4'($urandom);
        if (en) model |= a ^ b;
        @(negedge clk);
        checks++;
        if (fail !== model) begin failures++; $display("t%0d i%0d fail=%b model=%b", t, i, fail, model); end
      end
      en = 0;
      for (int k = 3; k >= 0; k--) begin
        checks++; if (sout !== model[k]) failures++;
        sin = 1'($urandom); shift = 1; @(negedge clk); shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
