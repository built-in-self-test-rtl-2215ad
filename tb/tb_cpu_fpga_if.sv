// tb_cpu_fpga_if: checks the processor-FPGA register interface: CTRL writes
// set the held run bits and pulse init for one clock, SHIFT and START
// writes pulse their outputs, every read select returns its group of result
// bits, reads without re return 0, and the interrupts follow the done flags.
// It also checks the data-RAM FPGA-port registers: address bytes, a write
// data register whose write gives exactly one pa_we pulse, and the read-data
// select.
module tb_cpu_fpga_if;
  logic clk = 0, rst_n = 0;
  logic [15:0] sel = 0, irq;
  logic [7:0] wdata = 0, rdata;
  logic re = 0, we = 0;
  logic lbist_run, rbist_run, init, shift, fram_start, dram_start;
  logic [22:0] lchain = 0;
  logic rchain = 0, dchain = 0, fram_busy = 0, fram_done = 0, dram_busy = 0, dram_done = 0;
  logic [11:0] fsp = 0, fdp = 0;
  int checks = 0, failures = 0;
  int pulses [4];
  logic [15:0] pa_addr;
  logic [7:0]  pa_wdata, pa_rdata = 0;
  logic        pa_we;
  int          pa_we_n = 0;

  cpu_fpga_if #(.LCH(23), .FN(12)) dut (.clk, .rst_n, .sel, .wdata, .rdata, .re, .we, .irq,
    .lbist_run, .rbist_run, .init, .shift, .fram_start, .dram_start,
    .lchain, .rchain, .dchain, .fsp_chain(fsp), .fdp_chain(fdp),
    .fram_busy, .fram_done, .dram_busy, .dram_done,
    .pa_addr, .pa_wdata, .pa_we, .pa_rdata);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    pulses[0] += int'(init); pulses[1] += int'(shift);
    pulses[2] += int'(fram_start); pulses[3] += int'(dram_start);
    pa_we_n += int'(pa_we);
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int s, logic [7:0] d);
    sel = 16'(1 << s); wdata = d; we = 1; @(negedge clk); we = 0; sel = 0;
    @(negedge clk);
  endtask

  task automatic rd(int s, logic [7:0] e, string what);
    sel = 16'(1 << s); re = 1; #1;
    checks++;
    if (rdata !== e) begin failures++; $display("%s: %h expected %h", what, rdata, e); end
    @(negedge clk); re = 0; sel = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    pulses = '{0, 0, 0, 0};
    wr(0, 8'h13);
    checks++; if (!lbist_run || !rbist_run || pulses[0] != 1) failures++;
    rd(0, 8'h03, "ctrl readback");
    wr(0, 8'h01);
    checks++; if (!lbist_run || rbist_run || pulses[0] != 1) failures++;
    wr(1, 8'h00); wr(1, 8'h00);
    wr(2, 8'h01); wr(2, 8'h02); wr(2, 8'h03);
    checks++;
    if (pulses[1] != 2 || pulses[2] != 2 || pulses[3] != 2) begin
      failures++; $display("pulses %p", pulses);
    end
    lchain = 23'h5A3C81; rchain = 1; dchain = 0; fsp = 12'hA5C; fdp = 12'h3E1;
    fram_busy = 1; dram_done = 1;
    rd(3, 8'h81, "lchain 0"); rd(4, 8'h3C, "lchain 1"); rd(5, 8'h5A, "lchain 2"); rd(6, 8'h00, "lchain 3");
    rd(7, 8'h01, "rchain/dchain");
    rd(8, 8'h5C, "fsp lo"); rd(9, 8'h0A, "fsp hi"); rd(10, 8'hE1, "fdp lo"); rd(11, 8'h03, "fdp hi");
    rd(12, 8'b1001, "status");
    checks++; if (irq !== 16'h0002) failures++;
    sel = 16'h0008; #1; checks++; if (rdata !== 8'h00) failures++;  // no re
    sel = 0;
    // data-RAM FPGA-port registers
    checks++; if (pa_we_n != 0 || pa_addr !== 16'h0) failures++;
    wr(13, 8'h34); wr(14, 8'h12);
    checks++; if (pa_addr !== 16'h1234 || pa_we_n != 0) begin
      failures++; $display("pa_addr %h, %0d writes", pa_addr, pa_we_n);
    end
    wr(15, 8'hC7);
    checks++; if (pa_wdata !== 8'hC7 || pa_we_n != 1 || pa_addr !== 16'h1234) begin
      failures++; $display("pa_wdata %h, %0d writes", pa_wdata, pa_we_n);
    end
    wr(14, 8'h3F); wr(13, 8'hFF);
    checks++; if (pa_addr !== 16'h3FFF || pa_we_n != 1) failures++;
    pa_rdata = 8'h6B;
    rd(13, 8'h6B, "pa_rdata");
    wr(15, 8'h00); wr(15, 8'hFF);
    checks++; if (pa_wdata !== 8'hFF || pa_we_n != 3) begin
      failures++; $display("pa_wdata %h, %0d writes", pa_wdata, pa_we_n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
