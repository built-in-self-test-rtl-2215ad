// march_tpg: RAM BIST test pattern generator that applies a March test.
//
// One memory operation per clock while `busy`. Outputs describe the current
// operation: `addr`, `we` with `wdata` for a write, `rd` for a read, and
// `exp`, the value a fault-free RAM returns. The algorithms are the ones the
// original design names; their element lists are the published ones (March-LR
// 14n, March Y 8n):
//   March-LR : {both(w0); down(r0,w1); up(r1,w0,r0,w1); up(r1,w0);
//               up(r0,w1,r1,w0); up(r0)}, repeated for each background of
//               the background data sequence: all zeros, then for k = 1 ..
//               log2(W) the word whose bit i is bit (k-1) of i. "0" stands
//               for the background, "1" for its complement.
//   March Y  : {both(w0); up(r0,w1,r1); down(r1,w0,r0); both(r0)}, zeros only
//   DPR      : March Y again; the free RAM BIST applies it through the
//               separate write and read ports (this choice of algorithm is
//               this design's own).
// `start` (one clock) begins a run; `done` rises when it ends and stays high
// until the next start. Run length: 14*DEPTH*(log2(W)+1) clocks for
// March-LR, 8*DEPTH for the others.
module march_tpg
  import bist_pkg::*;
#(
  parameter int AW    = 5,
  parameter int W     = 4,
  parameter int DEPTH = 2**AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  ram_alg_e      alg,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] addr,
  output logic          we,
  output logic          rd,
  output logic [W-1:0]  wdata,
  output logic [W-1:0]  exp
);
  localparam int NBG = $clog2(W) + 1;

  // One March element: direction, number of operations, operations
  // (each {write, value}), and whether it is the last element.
  typedef struct packed {
    logic       down;
    logic [2:0] nops;
    logic [9:0] ops;    // op k at bits [2k+1:2k]
    logic       last;
  } elem_t;

  function automatic elem_t element(ram_alg_e a, logic [2:0] i);
    elem_t e;
    e = '0;
    if (a == ALG_MARCH_LR) begin
      unique case (i)
        3'd0: e = '{down:1'b0, nops:3'd1, ops:10'b00_00_00_00_10, last:1'b0};
        3'd1: e = '{down:1'b1, nops:3'd2, ops:10'b00_00_00_11_00, last:1'b0};
        3'd2: e = '{down:1'b0, nops:3'd4, ops:10'b00_11_00_10_01, last:1'b0};
        3'd3: e = '{down:1'b0, nops:3'd2, ops:10'b00_00_00_10_01, last:1'b0};
        3'd4: e = '{down:1'b0, nops:3'd4, ops:10'b00_10_01_11_00, last:1'b0};
        default: e = '{down:1'b0, nops:3'd1, ops:10'b00_00_00_00_00, last:1'b1};
      endcase
    end else begin
      unique case (i)
        3'd0: e = '{down:1'b0, nops:3'd1, ops:10'b00_00_00_00_10, last:1'b0};
        3'd1: e = '{down:1'b0, nops:3'd3, ops:10'b00_00_01_11_00, last:1'b0};
        3'd2: e = '{down:1'b1, nops:3'd3, ops:10'b00_00_00_10_01, last:1'b0};
        default: e = '{down:1'b0, nops:3'd1, ops:10'b00_00_00_00_00, last:1'b1};
      endcase
    end
    return e;
  endfunction

  function automatic logic [W-1:0] background(int k);
    logic [W-1:0] b;
    for (int i = 0; i < W; i++) b[i] = (k == 0) ? 1'b0 : 1'(i >> (k - 1));
    return b;
  endfunction

  logic [2:0]    el, op;
  logic [AW-1:0] a;
  logic [$clog2(NBG+1)-1:0] bg;
  ram_alg_e      alg_q;
  elem_t         e;
  logic [1:0]    cur;
  logic [W-1:0]  bgv, val;
  logic          last_bg, last_a, last_op;

  assign e       = element(alg_q, el);
  assign cur     = e.ops[2*op +: 2];
  assign bgv     = background(int'(bg));
  assign val     = cur[0] ? ~bgv : bgv;
  assign last_op = (op == e.nops - 3'd1);
  assign last_a  = (a == AW'(DEPTH - 1));
  assign last_bg = (alg_q != ALG_MARCH_LR) || (int'(bg) == NBG - 1);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; el <= '0; op <= '0; a <= '0; bg <= '0;
      alg_q <= ALG_MARCH_LR;
    end else if (start) begin
      busy <= 1'b1; done <= 1'b0; el <= '0; op <= '0; a <= '0; bg <= '0;
      alg_q <= alg;
    end else if (busy) begin
      if (!last_op)              op <= op + 3'd1;
      else begin
        op <= '0;
        if (!last_a)             a <= a + 1'b1;
        else begin
          a <= '0;
          if (!e.last)           el <= el + 3'd1;
          else begin
            el <= '0;
            if (!last_bg)        bg <= bg + 1'b1;
            else begin
              busy <= 1'b0;
              done <= 1'b1;
            end
          end
        end
      end
    end

  assign addr  = e.down ? AW'(DEPTH - 1) - a : a;
  assign we    = busy && cur[1];
  assign rd    = busy && !cur[1];
  assign wdata = val;
  assign exp   = val;
endmodule
