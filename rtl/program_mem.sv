// program_mem: processor program memory.
//
// Byte-wide RAM that the processor reads and writes (port P: address,
// write data, write enable, read enable, registered read data) and that the
// FPGA core can only read (port F: address, registered read data). DEPTH is
// the smallest program-memory size of the 20-32 Kbyte range, which pairs
// with the largest data memory. Addresses at or above DEPTH read as zero and
// ignore writes. Timing: writes on the rising edge, read data one clock
// after the address.
module program_mem #(
  parameter int DEPTH = 20480
) (
  input  logic        clk,
  input  logic [15:0] p_addr,
  input  logic [7:0]  p_wdata,
  input  logic        p_we,
  input  logic        p_re,
  output logic [7:0]  p_rdata,
  input  logic [15:0] f_addr,
  output logic [7:0]  f_rdata
);
  localparam int AW = $clog2(DEPTH);

  logic [7:0]    mem [DEPTH];
  logic [AW-1:0] pa, fa;
  logic          p_ok, f_ok;

  assign pa   = p_addr[AW-1:0];
  assign fa   = f_addr[AW-1:0];
  assign p_ok = int'(p_addr) < DEPTH;
  assign f_ok = int'(f_addr) < DEPTH;

  always_ff @(posedge clk)
    if (p_we && p_ok) mem[pa] <= p_wdata;

  always_ff @(posedge clk)
    if (p_re) p_rdata <= p_ok ? mem[pa] : 8'h00;

  always_ff @(posedge clk)
    f_rdata <= f_ok ? mem[fa] : 8'h00;
endmodule
