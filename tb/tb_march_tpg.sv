// tb_march_tpg: compares the TPG's operation stream, one operation per
// clock, with a reference stream built here from the textbook element lists
// of March-LR (14n, with background data sequence) and March Y, for a 32x4 and a
// 16x8 memory. Also checks the run length (14n per background for March-LR,
// 8n for March Y) and the done flag.
module tb_march_tpg;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  ram_alg_e alg;
  int checks = 0, failures = 0;

  logic       b4, d4, we4, rd4;  logic [4:0] a4; logic [3:0] wd4, ex4;
  logic       b8, d8, we8, rd8;  logic [3:0] a8; logic [7:0] wd8, ex8;

  march_tpg #(.AW(5), .W(4)) u4 (.clk, .rst_n, .start, .alg, .busy(b4), .done(d4),
    .addr(a4), .we(we4), .rd(rd4), .wdata(wd4), .exp(ex4));
  march_tpg #(.AW(4), .W(8)) u8 (.clk, .rst_n, .start, .alg, .busy(b8), .done(d8),
    .addr(a8), .we(we8), .rd(rd8), .wdata(wd8), .exp(ex8));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit w; int a; bit v; } op_t;
  op_t q4[$], q8[$];

  // elements as strings: first char 'u' (up/either) or 'd' (down), then ops
  function automatic void build(ref op_t q[$], input int n, input int nbg, input string el[]);
    q.delete();
    for (int b = 0; b < nbg; b++)
      foreach (el[e])
        for (int i = 0; i < n; i++) begin
          int a;
          a = (el[e][0] == "d") ? n - 1 - i : i;
          for (int k = 1; k + 1 < el[e].len(); k += 2) begin
            op_t o;
            o.w = (el[e][k] == "w"); o.a = a; o.v = (el[e][k+1] == "1");
            q.push_back(o);
          end
        end
  endfunction

  function automatic logic [7:0] bgword(int w, int k);
    logic [7:0] r = '0;
    for (int i = 0; i < w; i++) r[i] = (k == 0) ? 1'b0 : 1'((i >> (k - 1)) & 1);
    return r;
  endfunction

  string lr[] = '{"uw0", "dr0w1", "ur1w0r0w1", "ur1w0", "ur0w1r1w0", "ur0"};
  string my[] = '{"uw0", "ur0w1r1", "dr1w0r0", "ur0"};

  task automatic run(ram_alg_e a, int nbg4, int nbg8, int len4, int len8);
    int i4 = 0, i8 = 0, cyc = 0;
    alg = a;
    build(q4, 32, nbg4, (a == ALG_MARCH_LR) ? lr : my);
    build(q8, 16, nbg8, (a == ALG_MARCH_LR) ? lr : my);
    checks++; if (q4.size() != len4 || q8.size() != len8) failures++;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (b4 || b8) begin
      if (b4) begin
        op_t o; logic [3:0] v;
        o = q4[i4];
        v = o.v ? ~bgword(4, i4 / (14 * 32 * (a == ALG_MARCH_LR) + 8 * 32 * (a != ALG_MARCH_LR)))
                :  bgword(4, i4 / (14 * 32 * (a == ALG_MARCH_LR) + 8 * 32 * (a != ALG_MARCH_LR)));
        checks++;
        if (we4 !== o.w || rd4 !== !o.w || int'(a4) != o.a || (o.w ? wd4 : ex4) !== v) begin
          failures++;
          if (failures < 10) $display("32x4 op %0d: we=%b a=%0d d=%h, expected w=%b a=%0d d=%h",
                                      i4, we4, a4, o.w ? wd4 : ex4, o.w, o.a, v);
        end
        i4++;
      end
      if (b8) begin
        op_t o; logic [7:0] v;
        o = q8[i8];
        v = o.v ? ~bgword(8, i8 / (14 * 16 * (a == ALG_MARCH_LR) + 8 * 16 * (a != ALG_MARCH_LR)))
                :  bgword(8, i8 / (14 * 16 * (a == ALG_MARCH_LR) + 8 * 16 * (a != ALG_MARCH_LR)));
        checks++;
        if (we8 !== o.w || int'(a8) != o.a || (o.w ? wd8 : ex8) !== v) begin
          failures++;
          if (failures < 10) $display("16x8 op %0d: we=%b a=%0d d=%h, expected w=%b a=%0d d=%h", i8, we8, a8, o.w ? wd8 : ex8, o.w, o.a, v);
        end
        i8++;
      end
      cyc++;
      @(negedge clk);
    end
    checks++;
    if (i4 != len4 || i8 != len8 || !d4 || !d8) begin
      failures++; $display("alg %0d: lengths %0d/%0d expected %0d/%0d", a, i4, i8, len4, len8);
    end
  endtask

  initial begin
    alg = ALG_MARCH_LR;
    repeat (2) @(negedge clk); rst_n = 1;
    run(ALG_MARCH_LR, 3, 4, 14 * 32 * 3, 14 * 16 * 4);
    run(ALG_MARCH_Y, 1, 1, 8 * 32, 8 * 16);
    run(ALG_DPR, 1, 1, 8 * 32, 8 * 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
