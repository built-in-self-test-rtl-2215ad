// bist_pkg: types and constants shared by the FPGA-core BIST fabric.
//
// The processor reconfigures the FPGA core by writing single configuration
// bytes. A byte is addressed by three 8-bit fields: X (column of the logic
// block), Y (row) and Z (which byte inside the block). The byte-wide write
// port with the X/Y/Z split follows the device description; the meaning of
// each Z byte and the X ranges used for the different BIST structures below
// are this design's own choices.
//
// Address map (X ranges):
//   0x00..0x7F  logic BIST array, X = column, Y = row
//   0x80..0xBF  routing BIST STARs, X = 0x80 + STAR index
//   0xF0        free RAM BIST control byte (Y = 0, Z = 0)
package bist_pkg;

  // One configuration-memory write, driven by the processor for one clock.
  typedef struct packed {
    logic       we;
    logic [7:0] x;
    logic [7:0] y;
    logic [7:0] z;
    logic [7:0] data;
  } cfg_bus_t;

  localparam logic [7:0] RSTAR_X0     = 8'h80;  // first routing STAR column
  localparam logic [7:0] RSTAR_Y_TPG  = 8'hFE;  // routing TPG inside a STAR
  localparam logic [7:0] RSTAR_Y_ORA  = 8'hFF;  // routing ORA inside a STAR
  localparam logic [7:0] FRAM_CTRL_X  = 8'hF0;  // free RAM BIST control

  // PLB configuration bytes (Z address)
  localparam logic [7:0] Z_LUTA = 8'd0;
  localparam logic [7:0] Z_LUTB = 8'd1;
  localparam logic [7:0] Z_MODE = 8'd2;

  // Logic-BIST ORA mode byte (Z_MODE of an ORA PLB)
  //   bit0: 1 = shift-register stage, 0 = comparator
  //   bit1: 1 = compare Y outputs of the two BUTs, 0 = compare X outputs
  localparam int ORA_SHIFT_BIT = 0;
  localparam int ORA_OBSY_BIT  = 1;

  // RAM test algorithms run by the March test pattern generator
  typedef enum logic [1:0] {
    ALG_MARCH_LR = 2'd0,   // March-LR with background data sequences
    ALG_MARCH_Y  = 2'd1,   // March Y, solid background only
    ALG_DPR      = 2'd2    // dual-port test: March Y through separate ports
  } ram_alg_e;

  // True when a configuration write targets byte (x, y, z).
  function automatic logic cfg_hit(cfg_bus_t c, logic [7:0] x, logic [7:0] y, logic [7:0] z);
    return c.we && (c.x == x) && (c.y == y) && (c.z == z);
  endfunction

endpackage
