// tb_free_ram_bist: applies the three free-RAM BIST configurations
// (synchronous dual-port test, synchronous single-port March-LR with
// background data, asynchronous single-port March Y) to a 3x3 RAM array,
// checks each run length in clocks (8n, 3 x 14n and 8n for n = 32 words)
// and reads all ORA chains, which must be clear. Then one memory cell of
// RAM (row 1, column 1) is held stuck at 1 and the same configurations must
// flag exactly that RAM and data bit: in its single-port ORA, and in the
// dual-port ORA that compares it with its neighbour.
module tb_free_ram_bist;
  import bist_pkg::*;
  localparam int N = 3, W = 4;
  logic clk = 0, rst_n = 0;
  cfg_bus_t cfg;
  logic init = 0, start = 0, shift = 0, busy, done;
  logic [N-1:0] sp_chain_out, dp_chain_out;
  logic sp [N][N][W];
  logic dp [N][N-2][W];
  logic stuck = 0;
  int checks = 0, failures = 0;

  free_ram_bist #(.N(N)) dut (.clk, .rst_n, .cfg, .init, .start, .shift, .busy, .done, .sp_chain_out, .dp_chain_out);

  always #5 clk = ~clk;

  // stuck-at-1 cell: address 5, bit 1 of RAM (1, 1)
  always @(posedge clk) if (stuck) dut.g_row[1].g_col[1].u_ram.mem[5][1] <= 1'b1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_cfg(logic [7:0] ctrl, int len, string what);
    int cyc = 0;
    cfg = '{we:1'b1, x:FRAM_CTRL_X, y:8'd0, z:8'd0, data:ctrl}; @(negedge clk); cfg = '0;
    init = 1; @(negedge clk); init = 0;
    start = 1; @(negedge clk); start = 0;
    while (busy) begin cyc++; @(negedge clk); end
    @(negedge clk);  // last synchronous compare
    checks++;
    if (cyc != len || !done) begin failures++; $display("%s: %0d clocks, expected %0d", what, cyc, len); end
    for (int k = 0; k < N * W; k++) begin
      for (int r = 0; r < N; r++) begin
        sp[r][N-1-k/W][W-1-k%W] = sp_chain_out[r];
        if (k < (N-2) * W) dp[r][N-3-k/W][W-1-k%W] = dp_chain_out[r];
      end
      shift = 1; @(negedge clk); shift = 0;
    end
  endtask

  task automatic expect_res(logic dual, logic faulty, string what);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        for (int b = 0; b < W; b++) begin
          logic e;
          e = faulty && !dual && r == 1 && c == 1 && b == 1;
          checks++;
          if (sp[r][c][b] !== e) begin failures++; $display("%s: sp ORA (%0d,%0d) bit %0d = %b", what, r, c, b, sp[r][c][b]); end
          if (c < N-2) begin
            e = faulty && dual && r == 1 && (c == 1 || c + 1 == 1) && b == 1;
            checks++;
            if (dp[r][c][b] !== e) begin failures++; $display("%s: dp ORA (%0d,%0d) bit %0d = %b", what, r, c, b, dp[r][c][b]); end
          end
        end
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      stuck = (f == 1);
      run_cfg(8'h0A, 8 * 32, "sync dual-port");         expect_res(1, stuck, "sync dual-port");
      run_cfg(8'h00, 14 * 32 * 3, "sync single March-LR"); expect_res(0, stuck, "sync single-port");
      run_cfg(8'h05, 8 * 32, "async single March Y");  expect_res(0, stuck, "async single-port");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
