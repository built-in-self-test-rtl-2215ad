// free_ram: one of the small 32x4 RAMs spread through the FPGA core (one per
// 4x4 PLBs).
//
// Modes, chosen by `async_mode` and `dual_mode`:
//   single-port: one address `addr`; the 4-bit data bus carries the write
//     data `din` while the active-low output enable `oen_n` is high, and the
//     RAM's read data while `oen_n` is low. The bus is output as `bus`
//     (the bidirectional bus is split into an input and an output here).
//   dual-port: separate write port (`addr`, `din`, `we`) and read port
//     (`raddr`); `bus` is then always the read data. This is not a true
//     dual-port RAM, only split read and write ports.
//   synchronous: `bus` is registered on the rising clock edge.
//   asynchronous: `bus` follows the address combinationally.
// Writes happen on the rising clock edge with `we` high in every mode (the
// asynchronous write strobe of the real part is modelled as synchronous).
// With SP_ONLY = 1 (rightmost RAM column) dual-port mode is not available
// and `dual_mode` is ignored. The array is not reset.
module free_ram #(
  parameter int DEPTH   = 32,
  parameter int W       = 4,
  parameter bit SP_ONLY = 1'b0,
  localparam int AW     = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          async_mode,
  input  logic          dual_mode,
  input  logic [AW-1:0] addr,
  input  logic [AW-1:0] raddr,
  input  logic [W-1:0]  din,
  input  logic          we,
  input  logic          oen_n,
  output logic [W-1:0]  bus
);
  logic [W-1:0]  mem [DEPTH];
  logic          dual;
  logic [AW-1:0] ra;
  logic [W-1:0]  bus_c, bus_q;

  assign dual = dual_mode && !SP_ONLY;
  assign ra   = dual ? raddr : addr;

  always_ff @(posedge clk)
    if (we) mem[addr] <= din;

  assign bus_c = (dual || !oen_n) ? mem[ra] : din;

  always_ff @(posedge clk) bus_q <= bus_c;

  assign bus = async_mode ? bus_c : bus_q;
endmodule
