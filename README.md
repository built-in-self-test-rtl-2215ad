# Processor-driven built-in self-test for an FPGA-based system-on-chip

This RTL models the on-chip test structures of a system-on-chip built from
an 8-bit processor, an FPGA core (an array of small programmable logic blocks,
PLBs), small 32x4 RAMs spread through that array, a shared dual-port data RAM
and a program memory. The approach is the one published for the Atmel AT94K
device family (an AVR processor with an AT40K FPGA core).

The starting idea was that the FPGA core first tests itself and then tests the
other cores. On this kind of chip the FPGA reaches the other cores through
narrow interfaces only. The processor, though, can write the FPGA's
configuration memory one byte at a time. So the **processor is the test
controller**. It loads one BIST configuration into the FPGA. Between BIST
runs it partially reconfigures the FPGA: new functions for the blocks under
test, ORAs switched into shift registers and back. It starts and stops each
run and reads the results. It also tests the memories itself. The FPGA core
contributes test pattern generators (TPGs), blocks and wires under test, and
output response analyzers (ORAs).

The processor is not part of this RTL. The processor's three buses are ports of the top
module `soc_bist_top`, and the top-level testbench plays the processor's role.

## The configuration port

Every reconfiguration goes through one write port, `cfg` (type
`bist_pkg::cfg_bus_t`): a write enable, three 8-bit address fields X, Y, Z
and a data byte. X and Y give a block's column and row and Z a byte inside
it. Each configurable cell in the RTL compares the bus with its own
(X, Y, Z) and latches the byte. So a cell can be reconfigured on its own while
everything else, flip-flop contents included, is left alone. Partial
reconfiguration relies on this.

Address map (this design's choice):

| X | cell | Z bytes |
|---|------|---------|
| 0 | logic-BIST TPG column | none |
| 1, 3, 5, ... 47 | BUT columns (Y = row 0..47) | 0 LUT A, 1 LUT B, 2 mode |
| 2, 4, ... 46 | logic ORA columns | 2: bit0 shift mode, bit1 compare Y outputs |
| 0x80 + s | routing STAR s: Y = 0..3 repeaters, 0xFE TPG, 0xFF ORA | repeater: 0 and 1 PIP bits; TPG 0: bit0 down/odd; ORA 0: bit0 shift mode |
| 0xF0 (Y = 0) | free-RAM BIST control | 0: bit0 async, bit1 dual-port, bits 3:2 algorithm |

## Processor interface and test flow

`cpu_fpga_if` uses the processor-to-FPGA interface: 16 decoded select lines,
8-bit data, read and write enables, and 16 interrupt lines. The registers
behind the select lines are this design's own.

| select | write | read |
|---|---|---|
| 0 | bit0 logic BIST run, bit1 routing BIST run (held); bit4 = clear pulse | run bits |
| 1 | any value: shift every result chain by one | - |
| 2 | bit0 start free-RAM BIST, bit1 start data-RAM BIST | - |
| 3..6 | - | logic ORA chain outputs, 8 columns per byte |
| 7 | - | bit0 routing ORA chain, bit1 data-RAM ORA chain |
| 8, 9 | - | free-RAM single-port ORA chains, rows 0-7 and 8-15 |
| 10, 11 | - | free-RAM dual-port ORA chains |
| 12 | - | {dram_done, dram_busy, fram_done, fram_busy} |
| 13 | data-RAM FPGA-port address, low byte | data-RAM FPGA-port read data |
| 14 | data-RAM FPGA-port address, high byte | - |
| 15 | data-RAM FPGA-port write data; the RAM is written one clock later | - |

`irq[0]` is raised when the free-RAM BIST is done and `irq[1]` when the
data-RAM BIST is done.

For each logic BIST configuration the processor program does the following:

1. Clear, set the run bit for the number of patterns, then clear the run bit.
2. Rewrite every ORA's mode byte to shift mode.
3. Shift the ORA chains out through select lines 3-6, one row per shift.
4. Rewrite the ORAs back to comparators.
5. Rewrite the BUT bytes for the next configuration, then repeat from step 1.

Each ORA's observe-X/observe-Y bit has its own configuration byte. So the
program can make a second pass of one BUT configuration in which it rewrites
only the two edge ORA columns to watch the other output of the edge BUTs.
The edge BUTs are then tested as fully as the inner ones, at the cost of a
few dozen configuration writes.

## Logic BIST array (`logic_bist_array`)

The default array is 48x48 PLBs, laid out column by column:

    X:  0    1    2    3    4   ...  45   46   47
        TPG  BUT  ORA  BUT  ORA ...  BUT  ORA  BUT

That gives 24 BUT columns and 23 ORA columns: 1,152 BUTs and 1,104 ORAs per
configuration.

- **TPGs.** Two identical 5-bit up-counters, one for the even BUT columns
  and one for the odd ones. Count bits 3..0 drive the PLB inputs w, x, y
  and z; bit 4 drives the flip-flop set/reset.
- **ORAs.** Each ORA compares the BUT to its left with the BUT to its right
  in the same row. The two BUTs are programmed alike, so any difference is a
  fault. One ORA can only see one output pair. Configurations alternate
  between comparing the X outputs and comparing the Y outputs.
- **Edge columns.** BUTs in the two outer columns are seen by one ORA only,
  which watches either their X or their Y output (see the edge pass above).
- **Result readout.** A PLB is too small to hold both a comparator and a
  shift path, so the ORA has a mode bit. Writing it turns the ORA into one
  stage of a shift chain running up its column.
- **Diagnosis.** The chain position gives the row and the chain gives the
  column, so a failing block is located to one of the BUTs next to a
  failing ORA.

The PLB model (`plb`) has two 3-input LUTs, an AND gate, a D flip-flop with
set/reset, and output multiplexers. How these parts connect is this design's
choice; `rtl/plb.sv` lists it. Each BUT is configured on its own, so a single
differently programmed BUT stands in for a faulty one in the tests.

In the device, the roles of the PLBs are swapped for a second test session,
and the floor plan can be turned by 90 degrees for two more sessions. Here the
roles are fixed in hardware, so one array stands for every session.

## Routing BIST (`routing_star`, `repeater`, `routing_tpg`, `routing_ora`)

A self-test area (STAR) is the smallest region that holds a TPG, the wires
under test and an ORA. A failing ORA locates the fault to its STAR. The STAR
built here tests the vertical repeater cells. It covers 16 PLBs, so it holds
four repeaters in series.

- **TPG.** A 2-bit counter plus a parity bit, driven onto three wires.
  Neighbouring STARs use opposite kinds, up-count with even parity and
  down-count with odd parity, so that adjacent wires carry different values.
- **Repeater.** Four 3-input multiplexers. Each has one PIP (programmable
  switch) bit per input, and its output is the wired-OR of the inputs whose
  PIP is on. A stuck-on PIP shows up as a bridge and a stuck-off PIP as a 0,
  and both break the parity.
- **ORA.** A parity checker at the far end. Like the logic ORAs, the routing
  ORAs are switched into one shift chain for readout.

The top has 48 STARs running at once. Horizontal repeaters use the same
structure turned by 90 degrees.

## Free-RAM BIST (`free_ram_bist`)

The default has 12x12 free RAMs of 32x4, all tested in parallel by one March
TPG (`march_tpg`). The RAMs in the rightmost column can only work
single-port. The processor rewrites the control byte for each of the three
BIST configurations:

| configuration | algorithm | clocks |
|---|---|---|
| synchronous dual-port | March Y, written through the write port and read through the read port; ORAs compare each RAM with its right neighbour (`ram_dp_ora`) | 8 x 32 = 256 |
| synchronous single-port | March-LR {w0; v(r0,w1); ^(r1,w0,r0,w1); ^(r1,w0); ^(r0,w1,r1,w0); ^(r0)} repeated for backgrounds 0000, 1010, 1100 | 14 x 32 x 3 = 1,344 |
| asynchronous single-port | March Y {w0; ^(r0,w1,r1); v(r1,w0,r0); r0} | 256 |

The single-port ORA (`ram_sp_ora`) watches the RAM data bus. While the
active-low output enable is low (a read), it compares the bus with the
expected data. While the output enable is high (a write), it compares the bus
with the TPG's write data. Every ORA has one sticky flag per data bit, and
the flags form a shift register, so no reconfiguration is needed for readout.
In synchronous mode the RAM answers one clock late, and the compare signals
are delayed to match.

## Data RAM and program memory

`data_ram` is a true dual-port 16 KB RAM. The FPGA side has an address, write
data, read data and a write enable. The processor side has an address, data,
and read and write enables. Both ports have a one-clock read latency.

From the FPGA port, a March TPG runs March-LR with the four 8-bit backgrounds
(917,504 clocks). An 8-bit single-port ORA checks the results.

While that TPG is idle, the FPGA port belongs to the processor: selects 13-15
of the interface set its address and write data and return its read data.
A processor program can then drive both ports of the data RAM in the same
clock, which the dual-port March tests need. Both ports read the old byte
when the other port writes the same address in the same clock. If both
write the same address in one clock, the processor port wins.

`program_mem` is 20 KB. The processor reads and writes it; the FPGA can only
read it. The processor-side March tests of both memories are programs, and
here the testbench runs them.

## Simulating

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`.
To build one with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        -Irtl -y rtl +libext+.sv rtl/bist_pkg.sv tb/tb_free_ram_bist.sv \
        --top-module tb_free_ram_bist -o sim
    ./obj_dir/sim

`tb_soc_bist_top` runs everything at the default full size and plays the
processor. It runs 6 logic BIST configurations. The fifth has a
misprogrammed BUT that must be located. The sixth configuration has a Y-output
difference in an edge BUT: the X-output pass misses it, and a second pass
that rewrites only the edge ORAs must find it. It runs 4 routing configurations,
including a stuck-on and a stuck-off PIP that must be located. It runs the 3
free-RAM configurations twice, once fault-free and once with a stuck-at cell
that must be located. It then runs the FPGA-port data-RAM test, the
processor's March-LR on the data RAM and the program memory, and reads the
program memory from the FPGA side. Last, it drives the data RAM from both
ports: it writes through one port and reads through the other, writes from
both ports in one clock, and reads from one port while the other writes.
It counts each mechanism and fails if one never happened.

It takes about 3-4 minutes to compile and under a minute to run. The
block-level testbenches use smaller arrays through parameters and finish in
seconds.

## Where this departs from the device

- The BIST structures are separate fixed-function blocks, side by side. In
  the device, one reconfigurable fabric is reprogrammed from one BIST type to
  the next. Here, partial reconfiguration covers only what changes within a
  BIST type: BUT functions, ORA mode, PIPs, RAM mode.
- The PLB's internal connections, the repeater's multiplexer inputs, the
  ORA observation schemes, the register map and the configuration byte layout
  are this design's own choices.
- The dual-port free-RAM test is March Y through separate ports. The
  original test is only cited, not described.
- Every free RAM gets a single-port ORA, the rightmost column included. The
  original resource count implies one column fewer.
- All free RAMs share one mode byte instead of each having its own.
- Not built:
  - the STARs for the express-bus cross-point PIPs and for the diagonal
    direct connections;
  - the swappable 12 KB split between data and program memory (fixed here at
    16 KB / 20 KB);
  - the part of the data RAM that only the FPGA can reach;
  - the dual-port March tests of the data RAM (March s2pf- and d2pf-). They
    are processor programs; only the two-port access they rely on is here.
- Clocked writes are used in the free RAM's asynchronous mode; only the read
  path is asynchronous.
- Reset clears configuration and control state. RAM contents are not reset.
