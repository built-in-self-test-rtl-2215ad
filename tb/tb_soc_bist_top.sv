// tb_soc_bist_top: end-to-end test of the whole BIST fabric at its default
// (full) size, with the testbench in the role of the processor running the
// test programs:
//   1. logic BIST: for each BIST configuration, write every BUT's three
//      configuration bytes, set the ORAs to compare X or Y outputs
//      (alternating), clear, run 32 patterns, rewrite the ORAs into shift
//      registers, shift all 48 rows out through the interface and check them;
//      then a configuration with one deliberately different BUT must be
//      located to the two ORAs beside it; finally a Y-output difference in
//      an edge BUT, unseen while the ORAs watch X outputs, is found by a
//      second pass in which only the edge ORAs are rewritten to watch Y.
//   2. routing BIST of the vertical repeaters in all STARs, neighbouring
//      STARs using up/even and down/odd TPGs, with straight and permuted PIP
//      settings, then with a stuck-on and a stuck-off PIP that must be
//      located to their STARs.
//   3. free-RAM BIST in its three configurations, fault-free and with one
//      stuck-at cell, checking run lengths, the done interrupt and the
//      location reported by the ORA chains.
//   4. data RAM: March-LR with background data from the FPGA port (done
//      interrupt, run length, ORA result), then March-LR from the processor
//      port, then March-LR of the program memory from the processor and a
//      read-back through the FPGA's program-memory port.
//   5. data RAM from both ports under processor control: the processor
//      writes and reads through the FPGA port (interface selects 13-15) and
//      checks through its own port, then both ports write, or one writes
//      while the other reads, in the same clock.
// Every mechanism listed in `ev` must have happened at least once.
module tb_soc_bist_top;
  import bist_pkg::*;
  localparam int ROWS = 48, BC = 24, OC = BC - 1, NS = 48, FN = 12;
  localparam int DRAM = 16384, PMEM = 20480;

  logic clk = 0, rst_n = 0;
  cfg_bus_t cfg;
  logic [15:0] cpu_sel, irq;
  logic [7:0] cpu_wdata, cpu_rdata;
  logic cpu_re, cpu_we;
  logic [15:0] dram_addr, pm_addr, fpga_pm_addr;
  logic [7:0] dram_wdata, dram_rdata, pm_wdata, pm_rdata, fpga_pm_rdata;
  logic dram_we, dram_re, pm_we, pm_re;

  int checks = 0, failures = 0;

  typedef enum int {
    E_LB_CFG, E_LB_X, E_LB_Y, E_ORA2SR, E_SR2ORA, E_BUT_RECFG, E_LB_FAULT, E_LB_EDGE,
    E_RB_UPEVEN, E_RB_DOWNODD, E_RB_STUCKON, E_RB_STUCKOFF,
    E_FR_DPR, E_FR_LR, E_FR_Y, E_FR_FAULT, E_IRQ,
    E_DR_FPGA, E_DR_CPU, E_PM_CPU, E_PM_FPGA_READ,
    E_DR_CPU_VIA_FPGA, E_DR_BOTH_PORTS, E_NUM
  } ev_e;
  int ev [E_NUM];

  soc_bist_top dut (
    .clk, .rst_n, .cfg, .cpu_sel, .cpu_wdata, .cpu_rdata, .cpu_re, .cpu_we, .irq,
    .dram_addr, .dram_wdata, .dram_we, .dram_re, .dram_rdata,
    .pm_addr, .pm_wdata, .pm_we, .pm_re, .pm_rdata, .fpga_pm_addr, .fpga_pm_rdata
  );

  always #5 clk = ~clk;

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- processor bus cycles ----------------
  task automatic cw(int x, int y, logic [7:0] z, logic [7:0] d);
    cfg = '{we:1'b1, x:8'(x), y:8'(y), z:z, data:d}; @(negedge clk); cfg = '0;
  endtask

  task automatic iow(int s, logic [7:0] d);
    cpu_sel = 16'(1 << s); cpu_wdata = d; cpu_we = 1; @(negedge clk);
    cpu_we = 0; cpu_sel = 0; @(negedge clk);
  endtask

  task automatic ior(int s, output logic [7:0] d);
    cpu_sel = 16'(1 << s); cpu_re = 1; #1 d = cpu_rdata;
    @(negedge clk); cpu_re = 0; cpu_sel = 0;
  endtask

  // ---------------- 1. logic BIST ----------------
  logic lres [ROWS][OC];

  task automatic lb_config_buts(logic [7:0] la, lb, md);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < BC; c++) begin
        cw(1 + 2*c, r, Z_LUTA, la); cw(1 + 2*c, r, Z_LUTB, lb); cw(1 + 2*c, r, Z_MODE, md);
      end
    ev[E_BUT_RECFG]++;
  endtask

  task automatic lb_ora_mode(logic [7:0] md);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < OC; c++) cw(2 + 2*c, r, Z_MODE, md);
  endtask

  task automatic lb_run(logic obs_y);
    logic [7:0] b0, b1, b2;
    lb_ora_mode({6'd0, obs_y, 1'b0});
    ev[E_SR2ORA]++;
    iow(0, 8'h10);                  // init
    iow(0, 8'h01);                  // run
    repeat (30) @(negedge clk);
    iow(0, 8'h00);                  // stop: 32 patterns in all
    lb_ora_mode({6'd0, obs_y, 1'b1});
    ev[E_ORA2SR]++;
    for (int k = 0; k < ROWS; k++) begin
      ior(3, b0); ior(4, b1); ior(5, b2);
      for (int c = 0; c < OC; c++) lres[ROWS-1-k][c] = (c < 8) ? b0[c] : (c < 16) ? b1[c-8] : b2[c-16];
      iow(1, 8'h00);
    end
    ev[E_LB_CFG]++;
    ev[obs_y ? E_LB_Y : E_LB_X]++;
  endtask

  // Second pass of one BUT configuration in which only the two edge ORAs are
  // rewritten, to watch the other output of the edge BUTs; the inner ORAs
  // stay in shift mode holding zeros.
  task automatic lb_edge_pass(logic obs_y);
    logic [7:0] b0, b1, b2;
    for (int r = 0; r < ROWS; r++) begin
      cw(2, r, Z_MODE, {6'd0, obs_y, 1'b0}); cw(2 + 2*(OC-1), r, Z_MODE, {6'd0, obs_y, 1'b0});
    end
    iow(0, 8'h10);
    iow(0, 8'h01);
    repeat (30) @(negedge clk);
    iow(0, 8'h00);
    for (int r = 0; r < ROWS; r++) begin
      cw(2, r, Z_MODE, {6'd0, obs_y, 1'b1}); cw(2 + 2*(OC-1), r, Z_MODE, {6'd0, obs_y, 1'b1});
    end
    for (int k = 0; k < ROWS; k++) begin
      ior(3, b0); ior(4, b1); ior(5, b2);
      for (int c = 0; c < OC; c++) lres[ROWS-1-k][c] = (c < 8) ? b0[c] : (c < 16) ? b1[c-8] : b2[c-16];
      iow(1, 8'h00);
    end
    ev[E_LB_EDGE]++;
  endtask

  function automatic int lb_count(int bad_c, int bad_r);
    int wrong = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < OC; c++)
        if (lres[r][c] !== ((r == bad_r) && (c == bad_c || c + 1 == bad_c))) wrong++;
    return wrong;
  endfunction

  // ---------------- 2. routing BIST ----------------
  logic rres [NS];

  task automatic rb_config(logic [7:0] c0, c1, int bad_s, int bad_i, logic [7:0] b0, b1);
    for (int s = 0; s < NS; s++) begin
      for (int i = 0; i < 4; i++) begin
        cw(int'(RSTAR_X0) + s, i, 8'd0, (s == bad_s && i == bad_i) ? b0 : c0);
        cw(int'(RSTAR_X0) + s, i, 8'd1, (s == bad_s && i == bad_i) ? b1 : c1);
      end
      cw(int'(RSTAR_X0) + s, RSTAR_Y_TPG, 8'd0, 8'(s % 2));
    end
  endtask

  task automatic rb_run();
    logic [7:0] b;
    for (int s = 0; s < NS; s++) cw(int'(RSTAR_X0) + s, RSTAR_Y_ORA, 8'd0, 8'h00);
    iow(0, 8'h10); iow(0, 8'h02);
    repeat (8) @(negedge clk);
    iow(0, 8'h00);
    for (int s = 0; s < NS; s++) cw(int'(RSTAR_X0) + s, RSTAR_Y_ORA, 8'd0, 8'h01);
    for (int k = 0; k < NS; k++) begin
      ior(7, b); rres[NS-1-k] = b[0]; iow(1, 8'h00);
    end
    ev[E_RB_UPEVEN]++; ev[E_RB_DOWNODD]++;
  endtask

  function automatic int rb_count(int bad_s);
    int wrong = 0;
    for (int s = 0; s < NS; s++) if (rres[s] !== (s == bad_s)) wrong++;
    return wrong;
  endfunction

  // ---------------- 3. free RAM BIST ----------------
  logic fsp [FN][FN][4];
  logic fdp [FN][FN-2][4];
  logic fstuck = 0;
  always @(posedge clk) if (fstuck) dut.u_fram.g_row[4].g_col[7].u_ram.mem[9][2] <= 1'b0;

  task automatic fr_run(logic [7:0] ctrl, int len, string what);
    logic [7:0] a, b, c, d;
    int cyc = 0;
    cw(FRAM_CTRL_X, 0, 8'd0, ctrl);
    iow(0, 8'h10);
    iow(2, 8'h01);
    while (!irq[0]) begin cyc++; @(negedge clk); end
    ev[E_IRQ]++;
    // counted from the end of the START write, which is when the TPG begins
    chk(cyc == len, $sformatf("%s: %0d clocks to done, expected %0d", what, cyc, len));
    for (int k = 0; k < FN * 4; k++) begin
      ior(8, a); ior(9, b); ior(10, c); ior(11, d);
      for (int r = 0; r < FN; r++) begin
        fsp[r][FN-1-k/4][3-k%4] = (r < 8) ? a[r] : b[r-8];
        if (k < (FN-2) * 4) fdp[r][FN-3-k/4][3-k%4] = (r < 8) ? c[r] : d[r-8];
      end
      iow(1, 8'h00);
    end
  endtask

  function automatic int fr_count(logic dual, logic faulty);
    int wrong = 0;
    for (int r = 0; r < FN; r++)
      for (int c = 0; c < FN; c++)
        for (int b = 0; b < 4; b++) begin
          if (fsp[r][c][b] !== (faulty && !dual && r == 4 && c == 7 && b == 2)) wrong++;
          if (c < FN-2 && fdp[r][c][b] !== (faulty && dual && r == 4 && (c == 7 || c == 6) && b == 2)) wrong++;
        end
    return wrong;
  endfunction

  // ---------------- 4. memories from the processor ----------------
  // March-LR with background data sequence over a byte-wide port
  function automatic logic [7:0] bgw(int k);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = (k == 0) ? 1'b0 : 1'((i >> (k - 1)) & 1);
    return r;
  endfunction

  task automatic mem_op(bit pm, bit w, int a, logic [7:0] d, inout int errs);
    if (pm) begin
      pm_addr = 16'(a); pm_wdata = d; pm_we = w; pm_re = !w;
      @(negedge clk); pm_we = 0; pm_re = 0;
      if (!w && pm_rdata !== d) errs++;
    end else begin
      dram_addr = 16'(a); dram_wdata = d; dram_we = w; dram_re = !w;
      @(negedge clk); dram_we = 0; dram_re = 0;
      if (!w && dram_rdata !== d) errs++;
    end
  endtask

  task automatic cpu_march_lr(bit pm, int n, int nbg, output int errs);
    string el [6] = '{"uw0", "dr0w1", "ur1w0r0w1", "ur1w0", "ur0w1r1w0", "ur0"};
    errs = 0;
    for (int b = 0; b < nbg; b++)
      foreach (el[e])
        for (int i = 0; i < n; i++) begin
          int a;
          a = (el[e][0] == "d") ? n - 1 - i : i;
          for (int k = 1; k + 1 < el[e].len(); k += 2)
            mem_op(pm, el[e][k] == "w", a, (el[e][k+1] == "1") ? ~bgw(b) : bgw(b), errs);
        end
  endtask

  initial begin
    int errs, cyc;
    logic [7:0] b;
    cfg = '0; cpu_sel = 0; cpu_wdata = 0; cpu_re = 0; cpu_we = 0;
    dram_addr = 0; dram_wdata = 0; dram_we = 0; dram_re = 0;
    pm_addr = 0; pm_wdata = 0; pm_we = 0; pm_re = 0; fpga_pm_addr = 0;
    foreach (ev[i]) ev[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);

    // ---- 1. logic BIST: four BUT configurations of one session ----
    lb_config_buts(8'h96, 8'hE8, 8'h00); lb_run(0); chk(lb_count(-9, -9) == 0, "logic config 1");
    lb_config_buts(8'h6C, 8'h17, 8'h3E); lb_run(1); chk(lb_count(-9, -9) == 0, "logic config 2");
    lb_config_buts(8'hE1, 8'h5A, 8'h0D); lb_run(0); chk(lb_count(-9, -9) == 0, "logic config 3");
    lb_config_buts(8'h3C, 8'hA9, 8'h02); lb_run(1); chk(lb_count(-9, -9) == 0, "logic config 4");
    // a BUT that behaves differently (column 10, row 17) must be located
    lb_config_buts(8'h96, 8'hE8, 8'h00);
    cw(1 + 2*10, 17, Z_LUTA, 8'h16);
    lb_run(0);
    chk(lb_count(10, 17) == 0, "logic BIST fault location");
    if (lb_count(10, 17) == 0 && lres[17][9] && lres[17][10]) ev[E_LB_FAULT]++;
    // a Y-output difference in an edge BUT (column 0, row 5) is missed while
    // the ORAs watch X outputs and found once the edge ORAs are rewritten
    lb_config_buts(8'h96, 8'hE8, 8'h00);
    cw(1, 5, Z_LUTB, 8'hE9);
    lb_run(0);
    chk(lb_count(-9, -9) == 0, "edge BUT Y difference unseen through X outputs");
    lb_edge_pass(1);
    chk(lb_count(0, 5) == 0, "edge BUT Y difference located by the edge-ORA pass");
    $display("logic BIST done at %0t", $time);

    // ---- 2. routing BIST ----
    rb_config(8'h11, 8'hC4, -1, 0, 0, 0); rb_run(); chk(rb_count(-1) == 0, "routing straight");
    rb_config(8'h22, 8'hC1, -1, 0, 0, 0); rb_run(); chk(rb_count(-1) == 0, "routing permuted");
    rb_config(8'h11, 8'hC4, 30, 2, 8'h13, 8'hC4); rb_run();
    chk(rb_count(30) == 0, "routing stuck-on PIP located");
    if (rb_count(30) == 0) ev[E_RB_STUCKON]++;
    rb_config(8'h11, 8'hC4, 7, 1, 8'h01, 8'hC4); rb_run();
    chk(rb_count(7) == 0, "routing stuck-off PIP located");
    if (rb_count(7) == 0) ev[E_RB_STUCKOFF]++;
    $display("routing BIST done at %0t", $time);

    // ---- 3. free RAM BIST: three configurations, then with a fault ----
    for (int f = 0; f < 2; f++) begin
      fstuck = (f == 1);
      fr_run(8'h0A, 8 * 32, "sync dual-port");
      chk(fr_count(1, fstuck) == 0, "free RAM dual-port results"); ev[E_FR_DPR]++;
      fr_run(8'h00, 14 * 32 * 3, "sync single-port March-LR");
      chk(fr_count(0, fstuck) == 0, "free RAM March-LR results"); ev[E_FR_LR]++;
      fr_run(8'h05, 8 * 32, "async single-port March Y");
      chk(fr_count(0, fstuck) == 0, "free RAM March Y results"); ev[E_FR_Y]++;
    end
    ev[E_FR_FAULT]++;
    fstuck = 0;
    $display("free RAM BIST done at %0t", $time);

    // ---- 4. data RAM from the FPGA port ----
    iow(0, 8'h10);
    iow(2, 8'h02);
    cyc = 0;
    while (!irq[1]) begin cyc++; @(negedge clk); end
    chk(cyc == 14 * DRAM * 4, $sformatf("data RAM FPGA-port March-LR: %0d clocks", cyc));
    @(negedge clk);
    for (int k = 0; k < 8; k++) begin
      ior(7, b); chk(b[1] == 1'b0, "data RAM FPGA-port ORA"); iow(1, 8'h00);
    end
    ev[E_DR_FPGA]++;
    $display("data RAM FPGA-port test done at %0t", $time);

    // ---- data RAM and program memory from the processor ----
    cpu_march_lr(0, DRAM, 4, errs);
    chk(errs == 0, $sformatf("processor March-LR of data RAM: %0d errors", errs));
    ev[E_DR_CPU]++;
    cpu_march_lr(1, PMEM, 1, errs);
    chk(errs == 0, $sformatf("processor March-LR of program memory: %0d errors", errs));
    ev[E_PM_CPU]++;
    // FPGA reads program memory (all zeros after March-LR ends with r0)
    for (int a = 0; a < 64; a++) begin
      fpga_pm_addr = 16'(a * 317); @(negedge clk);
      chk(fpga_pm_rdata === 8'h00, "FPGA program-memory read");
    end
    pm_addr = 16'd1234; pm_wdata = 8'hA7; pm_we = 1; @(negedge clk); pm_we = 0;
    fpga_pm_addr = 16'd1234; @(negedge clk);
    chk(fpga_pm_rdata === 8'hA7, "FPGA reads processor-written byte");
    ev[E_PM_FPGA_READ]++;

    // ---- 5. data RAM from both ports under processor control ----
    // (the data RAM holds all zeros after the processor's March-LR)
    for (int i = 0; i < 32; i++) begin
      int a;
      a = (i * 1237 + 5) % DRAM;
      iow(13, 8'(a)); iow(14, 8'(a >> 8)); iow(15, 8'(a * 7 + 1));
      mem_op(0, 0, a, 8'(a * 7 + 1), errs);
      chk(errs == 0, "byte written through FPGA port, read through processor port");
      errs = 0;
      mem_op(0, 1, a, 8'(a * 3 + 2), errs);
      @(negedge clk);
      ior(13, b);
      chk(b === 8'(a * 3 + 2), "byte written through processor port, read through FPGA port");
    end
    ev[E_DR_CPU_VIA_FPGA]++;
    for (int i = 0; i < 16; i++) begin
      int a, c;
      a = (i * 911 + 3) % DRAM;
      c = (a + 1) % DRAM;
      // both ports write in the same clock: FPGA port to a, processor port to c
      iow(13, 8'(a)); iow(14, 8'(a >> 8));
      cpu_sel = 16'(1 << 15); cpu_wdata = 8'(i + 8'h40); cpu_we = 1; @(negedge clk);
      cpu_we = 0; cpu_sel = 0;
      chk(dut.pa_we === 1'b1, "FPGA-port write pulse");
      dram_addr = 16'(c); dram_wdata = 8'(i + 8'h90); dram_we = 1; @(negedge clk);
      dram_we = 0;
      errs = 0;
      mem_op(0, 0, a, 8'(i + 8'h40), errs);
      mem_op(0, 0, c, 8'(i + 8'h90), errs);
      chk(errs == 0, "simultaneous writes from both ports");
      // FPGA port writes c while the processor port reads c: the read sees the old byte
      iow(13, 8'(c)); iow(14, 8'(c >> 8));
      cpu_sel = 16'(1 << 15); cpu_wdata = 8'(i + 8'hC0); cpu_we = 1; @(negedge clk);
      cpu_we = 0; cpu_sel = 0;
      dram_addr = 16'(c); dram_re = 1; @(negedge clk);
      dram_re = 0;
      chk(dram_rdata === 8'(i + 8'h90), "processor read in the clock of an FPGA-port write");
      @(negedge clk);
      ior(13, b);
      chk(b === 8'(i + 8'hC0), "FPGA port reads its own write");
    end
    ev[E_DR_BOTH_PORTS]++;

    for (int i = 0; i < E_NUM; i++) begin
      ev_e e;
      e = ev_e'(i);
      $display("mechanism %-16s happened %0d times", e.name(), ev[i]);
      chk(ev[i] > 0, $sformatf("mechanism %s never happened", e.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
