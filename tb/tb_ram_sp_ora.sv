// tb_ram_sp_ora: checks the single-port RAM ORA: with oen_n low each bus bit
// is compared with the expected bit, with oen_n high with the TPG write
// data; flags are per bit and sticky, only set while en is high, cleared by
// clr; then the flags are shifted out through sout.
module tb_ram_sp_ora;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, oen_n = 1, shift = 0, sin = 0, sout;
  logic [3:0] bus = 0, exp = 0, tdata = 0, fail, model;
  int checks = 0, failures = 0;

  ram_sp_ora #(.W(4)) dut (.clk, .rst_n, .clr, .en, .oen_n, .bus, .exp, .tdata, .shift, .sin, .fail, .sout);

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
        en = ($urandom_range(0, 3) != 0); oen_n = 1'($urandom);
        bus = 4'($urandom); exp = 4'($urandom); tdata = 4'($urandom);
        if ($urandom_range(0, 1)) begin exp = bus; tdata = bus; end
        if (en) model |= oen_n ? (bus ^ tdata) : (bus ^ exp);
        @(negedge clk);
        checks++;
        if (fail !== model) begin failures++; $display("t%0d i%0d fail=%b model=%b", t, i, fail, model); end
      end
      en = 0;
      for (int k = 3; k >= 0; k--) begin
        checks++; if (sout !== model[k]) failures++;
        shift = 1; @(negedge clk); shift = 0;
      end
      checks++; if (fail !== 4'b0000) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
