// tb_free_ram: checks the 32x4 free RAM against a reference array in all
// four modes: single-port bus behaviour (write data while oen_n is high,
// read data while low), dual-port separate read address, synchronous
// (one-clock) and asynchronous (same-cycle) read timing, and that the
// single-port-only variant ignores dual-port mode.
module tb_free_ram;
  logic clk = 0;
  logic async_mode, dual_mode, we, oen_n;
  logic [4:0] addr, raddr;
  logic [3:0] din, bus, bus2;
  logic [3:0] ref_mem [32];
  int checks = 0, failures = 0;

  free_ram #(.DEPTH(32), .W(4), .SP_ONLY(1'b0)) dut (.clk, .async_mode, .dual_mode, .addr, .raddr, .din, .we, .oen_n, .bus);
  free_ram #(.DEPTH(32), .W(4), .SP_ONLY(1'b1)) dsp (.clk, .async_mode, .dual_mode, .addr, .raddr, .din, .we, .oen_n, .bus(bus2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [3:0] got, logic [3:0] e, string what);
    checks++;
    if (got !== e) begin failures++; $display("%s: got %h expected %h", what, got, e); end
  endtask

  initial begin
    async_mode = 1; dual_mode = 0; we = 0; oen_n = 1; addr = 0; raddr = 0; din = 0;
    @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      addr = 5'(i); din = 4'($urandom); we = 1; ref_mem[i] = din;
      #1 chk(bus, din, "bus carries write data");
      @(negedge clk);
    end
    we = 0;
    // asynchronous single-port read
    oen_n = 0;
    for (int i = 0; i < 32; i++) begin
      addr = 5'($urandom); #1 chk(bus, ref_mem[addr], "async sp read");
    end
    // synchronous single-port read: value appears after the clock
    async_mode = 0;
    for (int i = 0; i < 20; i++) begin
      addr = 5'($urandom);
      @(negedge clk) chk(bus, ref_mem[addr], "sync sp read");
    end
    // dual-port: write one address while reading another
    dual_mode = 1; async_mode = 1; oen_n = 1;
    for (int i = 0; i < 20; i++) begin
      addr = 5'($urandom); raddr = 5'($urandom); din = 4'($urandom); we = 1;
      if (raddr == addr) raddr = addr + 1'b1;
      #1 chk(bus, ref_mem[raddr], "async dp read");
      chk(bus2, din, "sp-only RAM ignores dual mode");
      @(negedge clk); ref_mem[addr] = din;
    end
    we = 0;
    async_mode = 0;
    for (int i = 0; i < 20; i++) begin
      raddr = 5'($urandom);
      @(negedge clk) chk(bus, ref_mem[raddr], "sync dp read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
