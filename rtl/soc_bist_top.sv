// soc_bist_top: FPGA-core BIST structures of an SoC with an FPGA core, an
// 8-bit processor and RAM cores, with the processor itself left outside.
//
// The processor is the test controller. Its three buses are the ports of
// this module:
//   * the configuration-write port (cfg: X, Y, Z address and a data byte),
//     through which it partially reconfigures the BIST structures between
//     BIST configurations (BUT functions, ORA <-> shift-register mode,
//     repeater PIPs, free-RAM modes and algorithm);
//   * the processor-FPGA interface (16 select lines, 8-bit data, read and
//     write enables, 16 interrupts), mapped by cpu_fpga_if onto the BIST
//     run/start/clear/shift controls and the result chains;
//   * its ports into the shared data RAM and the program memory, over which
//     its own March tests of those memories run.
// Inside: the logic BIST array (ROWS x (2*BUT_COLS) PLBs), N_STARS routing
// STARs for the vertical repeaters whose ORAs form one shift chain, the
// free-RAM BIST (FRAM_N x FRAM_N RAMs), and the single-port March-LR BIST
// of the data RAM's FPGA port (a March TPG and a 16-PLB-sized 8-bit ORA).
// When that BIST is idle, the processor drives the FPGA port itself through
// cpu_fpga_if (sel13-15), so that a program can access both data-RAM ports
// in the same clock for the dual-port tests.
// The FPGA core's read port into program memory is brought out as
// fpga_pm_addr / fpga_pm_rdata. Everything runs on one clock; rst_n is an
// asynchronous active-low reset of all control and configuration state
// (RAM contents are not reset).
module soc_bist_top
  import bist_pkg::*;
#(
  parameter int ROWS       = 48,
  parameter int BUT_COLS   = 24,
  parameter int N_STARS    = 48,
  parameter int FRAM_N     = 12,
  parameter int DRAM_DEPTH = 16384,
  parameter int PMEM_DEPTH = 20480
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor: configuration memory write
  input  cfg_bus_t    cfg,
  // processor: FPGA interface
  input  logic [15:0] cpu_sel,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  input  logic        cpu_re,
  input  logic        cpu_we,
  output logic [15:0] irq,
  // processor: data RAM port
  input  logic [15:0] dram_addr,
  input  logic [7:0]  dram_wdata,
  input  logic        dram_we,
  input  logic        dram_re,
  output logic [7:0]  dram_rdata,
  // processor: program memory port
  input  logic [15:0] pm_addr,
  input  logic [7:0]  pm_wdata,
  input  logic        pm_we,
  input  logic        pm_re,
  output logic [7:0]  pm_rdata,
  // FPGA core: program memory read port
  input  logic [15:0] fpga_pm_addr,
  output logic [7:0]  fpga_pm_rdata
);
  localparam int DAW = $clog2(DRAM_DEPTH);

  logic lbist_run, rbist_run, init, shift, fram_start, dram_start;
  logic [BUT_COLS-2:0] lchain;
  logic [4:0]          ltpg;
  logic                rchain, dchain;
  logic [FRAM_N-1:0]   fsp, fdp;
  logic                fram_busy, fram_done, dram_busy, dram_done;
  logic [15:0]         pa_addr;
  logic [7:0]          pa_wdata, d_rdata;
  logic                pa_we;

  cpu_fpga_if #(.LCH(BUT_COLS-1), .FN(FRAM_N)) u_if (
    .clk, .rst_n, .sel(cpu_sel), .wdata(cpu_wdata), .rdata(cpu_rdata),
    .re(cpu_re), .we(cpu_we), .irq,
    .lbist_run, .rbist_run, .init, .shift, .fram_start, .dram_start,
    .lchain, .rchain, .dchain, .fsp_chain(fsp), .fdp_chain(fdp),
    .fram_busy, .fram_done, .dram_busy, .dram_done,
    .pa_addr, .pa_wdata, .pa_we, .pa_rdata(d_rdata)
  );

  // ---------------- logic BIST ----------------
  logic_bist_array #(.ROWS(ROWS), .BUT_COLS(BUT_COLS)) u_lbist (
    .clk, .rst_n, .cfg, .init, .run(lbist_run), .shift,
    .chain_out(lchain), .tpg_q(ltpg)
  );

  // ---------------- routing BIST (vertical repeaters) ----------------
  logic rs [N_STARS+1];
  assign rs[0] = 1'b0;
  for (genvar s = 0; s < N_STARS; s++) begin : g_star
    logic [2:0] pat;
    routing_star #(.PX(8'(int'(RSTAR_X0) + s)), .N_REP(4)) u_star (
      .clk, .rst_n, .cfg, .init, .run(rbist_run), .shift,
      .sin(rs[s]), .fail(rs[s+1]), .tpg_pat(pat)
    );
  end
  assign rchain = rs[N_STARS];

  // ---------------- free RAM BIST ----------------
  free_ram_bist #(.N(FRAM_N)) u_fram (
    .clk, .rst_n, .cfg, .init, .start(fram_start), .shift,
    .busy(fram_busy), .done(fram_done),
    .sp_chain_out(fsp), .dp_chain_out(fdp)
  );

  // ---------------- data RAM, FPGA-port single-port BIST ----------------
  logic [DAW-1:0] d_addr;
  logic           d_we, d_rd;
  logic [7:0]     d_wdata, d_exp, d_bus;
  logic           q_en, q_rd;
  logic [7:0]     q_exp, q_wdata, dfail;

  march_tpg #(.AW(DAW), .W(8), .DEPTH(DRAM_DEPTH)) u_dtpg (
    .clk, .rst_n, .start(dram_start), .alg(ALG_MARCH_LR),
    .busy(dram_busy), .done(dram_done),
    .addr(d_addr), .we(d_we), .rd(d_rd), .wdata(d_wdata), .exp(d_exp)
  );

  // Port A belongs to the March TPG while it runs and otherwise to the
  // processor's FPGA-port registers in cpu_fpga_if.
  logic [15:0] a_addr;
  logic [7:0]  a_wdata;
  logic        a_we;
  assign a_addr  = dram_busy ? 16'(d_addr) : pa_addr;
  assign a_wdata = dram_busy ? d_wdata : pa_wdata;
  assign a_we    = dram_busy ? d_we : pa_we;

  data_ram #(.DEPTH(DRAM_DEPTH)) u_dram (
    .clk,
    .a_addr, .a_wdata, .a_we, .a_rdata(d_rdata),
    .b_addr(dram_addr), .b_wdata(dram_wdata), .b_we(dram_we), .b_re(dram_re),
    .b_rdata(dram_rdata)
  );

  // The RAM port is synchronous: compare one clock after the operation.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q_en <= 1'b0; q_rd <= 1'b0; q_exp <= '0; q_wdata <= '0;
    end else begin
      q_en <= dram_busy; q_rd <= d_rd; q_exp <= d_exp; q_wdata <= d_wdata;
    end

  assign d_bus = q_rd ? d_rdata : q_wdata;

  ram_sp_ora #(.W(8)) u_dora (
    .clk, .rst_n, .clr(init), .en(q_en), .oen_n(!q_rd),
    .bus(d_bus), .exp(q_exp), .tdata(q_wdata),
    .shift, .sin(1'b0), .fail(dfail), .sout(dchain)
  );

  // ---------------- program memory ----------------
  program_mem #(.DEPTH(PMEM_DEPTH)) u_pmem (
    .clk, .p_addr(pm_addr), .p_wdata(pm_wdata), .p_we(pm_we), .p_re(pm_re),
    .p_rdata(pm_rdata), .f_addr(fpga_pm_addr), .f_rdata(fpga_pm_rdata)
  );
endmodule
