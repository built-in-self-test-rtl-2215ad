// ram_sp_ora: output response analyzer for a single-port RAM test.
//
// Watches the RAM's data bus. While the active-low output enable `oen_n` is
// low (a read), each bus bit is compared with the expected bit from the TPG;
// while it is high (a write), the bus carries the TPG's write data into the
// RAM and is compared with that data, which also checks the write path.
// Comparisons happen only while `en` is high. Each bit has a sticky fail
// flip-flop. The flip-flops also form a W-stage shift register, so results
// are read out without reconfiguring the ORA: `shift` moves
// sin -> fail[0] -> ... -> fail[W-1] = sout. `clr` clears all flags.
module ram_sp_ora #(
  parameter int W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         oen_n,
  input  logic [W-1:0] bus,
  input  logic [W-1:0] exp,
  input  logic [W-1:0] tdata,
  input  logic         shift,
  input  logic         sin,
  output logic [W-1:0] fail,
  output logic         sout
);
  logic [W-1:0] mism;

  assign mism = oen_n ? (bus ^ tdata) : (bus ^ exp);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     fail <= '0;
    else if (shift) fail <= {fail[W-2:0], sin};
    else if (clr)   fail <= '0;
    else if (en)    fail <= fail | mism;

  assign sout = fail[W-1];
endmodule
