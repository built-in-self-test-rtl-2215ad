// tb_data_ram: checks the shared dual-port data RAM (at 1 Kbyte) against a
// reference array: random writes and reads from both ports at once,
// one-clock read latency on both ports, data written by one port visible at
// the other, port B read register held while b_re is low, the port-B-wins
// rule for a same-address double write, and address wrap-around.
module tb_data_ram;
  localparam int DEPTH = 1024;
  logic clk = 0;
  logic [15:0] a_addr, b_addr;
  logic [7:0] a_wdata, a_rdata, b_wdata, b_rdata;
  logic a_we, b_we, b_re;
  logic [7:0] mem [DEPTH];
  logic [7:0] ea, eb;
  int checks = 0, failures = 0;

  data_ram #(.DEPTH(DEPTH)) dut (.clk, .a_addr, .a_wdata, .a_we, .a_rdata, .b_addr, .b_wdata, .b_we, .b_re, .b_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; b_we = 0; b_re = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin  // fill through both ports
      a_addr = 16'(i); a_wdata = 8'($urandom); a_we = 1; mem[i] = a_wdata;
      @(negedge clk);
    end
    a_we = 0;
    eb = 0;
    for (int i = 0; i < 3000; i++) begin
      int ia, ib;
      a_addr = 16'($urandom); b_addr = 16'($urandom);
      ia = int'(a_addr) % DEPTH; ib = int'(b_addr) % DEPTH;
      a_we = 1'($urandom); b_we = 1'($urandom); b_re = 1'($urandom);
      a_wdata = 8'($urandom); b_wdata = 8'($urandom);
      ea = mem[ia];
      if (b_re) eb = mem[ib];
      @(negedge clk);
      if (a_we) mem[ia] = a_wdata;
      if (b_we) mem[ib] = b_wdata;
      checks++;
      if (a_rdata !== ea || b_rdata !== eb) begin
        failures++; if (failures < 10) $display("i%0d: a %h/%h b %h/%h", i, a_rdata, ea, b_rdata, eb);
      end
    end
    // same-address double write: port B wins
    a_addr = 16'd77; b_addr = 16'd77 + 16'(DEPTH); a_we = 1; b_we = 1; a_wdata = 8'h11; b_wdata = 8'h22;
    @(negedge clk); a_we = 0; b_we = 0; b_re = 1;
    @(negedge clk);
    checks++; if (a_rdata !== 8'h22 || b_rdata !== 8'h22) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
