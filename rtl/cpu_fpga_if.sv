// cpu_fpga_if: the processor-to-FPGA register interface, used here as the
// control and result port of all BIST structures.
//
// The processor side follows the device: sixteen decoded select lines, an
// 8-bit data bus (split into wdata and rdata), a read enable and a write
// enable, and sixteen interrupt lines back to the processor. The register
// map behind the select lines is this design's own:
//   write sel0  CTRL : bit0 logic BIST run, bit1 routing BIST run (held);
//                      bit4 = 1 pulses `init` (clear TPGs and ORAs)
//   write sel1  SHIFT: any write pulses `shift` (all result chains move by 1)
//   write sel2  START: bit0 starts the free-RAM BIST, bit1 the data-RAM BIST
//   write sel13, 14  data-RAM FPGA-port address, low and high byte
//   write sel15      data-RAM FPGA-port write data; pulses `pa_we`
//   read  sel0  CTRL readback
//   read  sel3..6    logic BIST ORA chain outputs, 8 columns per byte
//   read  sel7       bit0 routing ORA chain, bit1 data-RAM ORA chain
//   read  sel8, 9    free-RAM single-port ORA chains (rows 0-7, 8-15)
//   read  sel10, 11  free-RAM dual-port ORA chains (rows 0-7, 8-15)
//   read  sel12      {dram_done, dram_busy, fram_done, fram_busy}
//   read  sel13      data-RAM FPGA-port read data (pa_rdata)
//   irq[0] free-RAM BIST done, irq[1] data-RAM BIST done (levels).
// The sel13-15 registers let a processor program drive the data RAM's FPGA
// port (pa_*) directly, so that it can apply its own tests through that port
// while it drives the other port itself. A write to sel15 writes the data
// RAM one clock later; pa_rdata is the RAM's registered read of pa_addr.
// Pulses last one clock, the clock after the write. Read data is
// combinational while `re` is high and 0 otherwise. At most one select line
// may be active during an access (checked by an assertion).
module cpu_fpga_if #(
  parameter int LCH = 23,   // logic BIST ORA columns (<= 32)
  parameter int FN  = 12    // free RAM rows (<= 16)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [15:0]    sel,
  input  logic [7:0]     wdata,
  output logic [7:0]     rdata,
  input  logic           re,
  input  logic           we,
  output logic [15:0]    irq,
  output logic           lbist_run,
  output logic           rbist_run,
  output logic           init,
  output logic           shift,
  output logic           fram_start,
  output logic           dram_start,
  input  logic [LCH-1:0] lchain,
  input  logic           rchain,
  input  logic           dchain,
  input  logic [FN-1:0]  fsp_chain,
  input  logic [FN-1:0]  fdp_chain,
  input  logic           fram_busy,
  input  logic           fram_done,
  input  logic           dram_busy,
  input  logic           dram_done,
  output logic [15:0]    pa_addr,
  output logic [7:0]     pa_wdata,
  output logic           pa_we,
  input  logic [7:0]     pa_rdata
);
  logic [31:0] lc;
  logic [15:0] fs, fd;

  assign lc = 32'(lchain);
  assign fs = 16'(fsp_chain);
  assign fd = 16'(fdp_chain);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      lbist_run <= 1'b0; rbist_run <= 1'b0; init <= 1'b0; shift <= 1'b0;
      fram_start <= 1'b0; dram_start <= 1'b0;
      pa_addr <= '0; pa_wdata <= '0; pa_we <= 1'b0;
    end else begin
      pa_we      <= we && sel[15];
      if (we && sel[13]) pa_addr[7:0]  <= wdata;
      if (we && sel[14]) pa_addr[15:8] <= wdata;
      if (we && sel[15]) pa_wdata      <= wdata;
      init       <= we && sel[0] && wdata[4];
      shift      <= we && sel[1];
      fram_start <= we && sel[2] && wdata[0];
      dram_start <= we && sel[2] && wdata[1];
      if (we && sel[0]) begin
        lbist_run <= wdata[0];
        rbist_run <= wdata[1];
      end
    end

  always_comb begin
    rdata = '0;
    if (re) begin
      unique case (1'b1)
        sel[0]:  rdata = {6'd0, rbist_run, lbist_run};
        sel[3]:  rdata = lc[7:0];
        sel[4]:  rdata = lc[15:8];
        sel[5]:  rdata = lc[23:16];
        sel[6]:  rdata = lc[31:24];
        sel[7]:  rdata = {6'd0, dchain, rchain};
        sel[8]:  rdata = fs[7:0];
        sel[9]:  rdata = fs[15:8];
        sel[10]: rdata = fd[7:0];
        sel[11]: rdata = fd[15:8];
        sel[12]: rdata = {4'd0, dram_done, dram_busy, fram_done, fram_busy};
        sel[13]: rdata = pa_rdata;
        default: rdata = '0;
      endcase
    end
  end

  assign irq = {14'd0, dram_done, fram_done};

  a_one_select: assert property (@(posedge clk) disable iff (!rst_n)
    (re || we) |-> $onehot(sel))
    else $error("processor access with %0d select lines active", $countones(sel));
endmodule
