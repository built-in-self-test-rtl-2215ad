// data_ram: data memory shared by the processor and the FPGA core.
//
// A true dual-port byte-wide RAM. Port A belongs to the FPGA core (16-bit
// address, separate 8-bit write and read data, write enable); port B to the
// processor (16-bit address, 8-bit data, read and write enables; its
// bidirectional data bus is split into b_wdata and b_rdata). Both ports are
// synchronous: a write happens on the rising edge with the write enable, and
// read data appears the clock after the address (port B only updates its
// read register while b_re is high). Addresses wrap modulo DEPTH. DEPTH is
// the largest data-memory size of the 4-16 Kbyte range; the
// 12-Kbyte partition swap between data and program memory is not modelled.
// If both ports write the same address in one clock, port B wins (an
// assumption). Both cores run on the same clock, as for the dual-port test.
module data_ram #(
  parameter int DEPTH = 16384,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic [15:0] a_addr,
  input  logic [7:0]  a_wdata,
  input  logic        a_we,
  output logic [7:0]  a_rdata,
  input  logic [15:0] b_addr,
  input  logic [7:0]  b_wdata,
  input  logic        b_we,
  input  logic        b_re,
  output logic [7:0]  b_rdata
);
  logic [7:0] mem [DEPTH];
  logic [AW-1:0] aa, ba;

  assign aa = a_addr[AW-1:0];
  assign ba = b_addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (a_we) mem[aa] <= a_wdata;
    if (b_we) mem[ba] <= b_wdata;
  end

  always_ff @(posedge clk) a_rdata <= mem[aa];

  always_ff @(posedge clk)
    if (b_re) b_rdata <= mem[ba];
endmodule
