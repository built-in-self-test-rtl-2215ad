// tb_program_mem: checks the program memory (at 3,000 bytes, a size that is
// not a power of two) against a reference array: processor writes and
// reads, FPGA-side reads of the same contents, one-clock read latency,
// reads above the memory returning 0 and writes there being ignored.
module tb_program_mem;
  localparam int DEPTH = 3000;
  logic clk = 0;
  logic [15:0] p_addr, f_addr;
  logic [7:0] p_wdata, p_rdata, f_rdata, ep, ef;
  logic p_we, p_re;
  logic [7:0] mem [4096];
  int checks = 0, failures = 0;

  program_mem #(.DEPTH(DEPTH)) dut (.clk, .p_addr, .p_wdata, .p_we, .p_re, .p_rdata, .f_addr, .f_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p_we = 0; p_re = 0; p_addr = 0; f_addr = 0; p_wdata = 0;
    @(negedge clk);
    for (int i = 0; i < 4096; i++) begin
      p_addr = 16'(i); p_wdata = 8'($urandom); p_we = 1;
      mem[i] = (i < DEPTH) ? p_wdata : 8'h00;
      @(negedge clk);
    end
    p_we = 0; p_addr = 0; p_re = 1; ep = mem[0];
    @(negedge clk);
    for (int i = 0; i < 4000; i++) begin
      p_addr = 16'($urandom_range(0, 4095)); f_addr = 16'($urandom_range(0, 4095));
      p_re = 1'($urandom);
      if (p_re) ep = mem[p_addr];
      ef = mem[f_addr];
      @(negedge clk);
      checks++;
      if (p_rdata !== ep || f_rdata !== ef) begin
        failures++; if (failures < 10) $display("i%0d: p %h/%h f %h/%h", i, p_rdata, ep, f_rdata, ef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
