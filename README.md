# Processor-driven logic and RAM BIST for an embedded FPGA core

A system-on-chip that pairs an 8-bit microcontroller with a fine-grained
FPGA can test its own FPGA without loading any test bitstream. The processor
can write, but not read, any byte of the FPGA configuration memory at any
time. A short program therefore builds the whole built-in self-test (BIST)
structure byte by byte:

- a test pattern generator (TPG) column;
- columns of blocks under test (BUTs);
- columns of comparison output response analysers (ORAs).

The same program then clocks the BIST through a strobe of the processor bus.
Between test phases it rewrites only the bytes that change. At the end it
turns the ORAs into a shift register and reads the pass/fail flags back over
the 8-bit bus. The free RAM blocks of the FPGA are tested the same way, with
the processor itself acting as the TPG.

This RTL models the FPGA side of such a device (an Atmel AT94K-class part)
at the level the test needs:

- the write-only configuration memory;
- a 48 × 48 array of programmable logic blocks (PLBs) whose behaviour comes
  entirely from their configuration bytes;
- the 144 free 32 × 4 RAMs with their BIST comparators;
- the processor–FPGA bus interface.

The processor's program is played by the top-level testbench as a sequence
of bus operations. The testbench checks that the configured BIST finds
injected faults and names the faulty block.

## Files

| file | module | role |
|---|---|---|
| `rtl/bist_pkg.sv` | `bist_pkg` | configuration byte map, struct types, bus select codes |
| `rtl/cfg_mem.sv` | `cfg_mem` | write-only configuration memory (X/Y/Z address, data byte) |
| `rtl/plb.sv` | `plb` | one PLB: two 3-input LUTs, a flip-flop, output multiplexers |
| `rtl/plb_cell.sv` | `plb_cell` | PLB plus its role-dependent input routing (TPG, BUT, ORA) |
| `rtl/logic_bist_fabric.sv` | `logic_bist_fabric` | N × N array, neighbour wiring, TPG buses, scan chain, scan-out |
| `rtl/free_ram.sv` | `free_ram` | 32 × 4 RAM, single- or dual-port, synchronous or asynchronous read |
| `rtl/ram_bist_ora.sv` | `ram_bist_ora` | one RAM BIST comparator bit |
| `rtl/ram_bist.sv` | `ram_bist` | all free RAMs, their comparators and their scan chain |
| `rtl/avr_fpga_if.sv` | `avr_fpga_if` | processor bus: registered RAM TPG, BIST clock, scan read-back |
| `rtl/fpslic_bist_top.sv` | `fpslic_bist_top` | the FPGA side of the device; processor signals are ports |

Each file opens with a comment covering what the module does, its interface
and its timing. The comment also says which parts follow the BIST method and
which are choices of this implementation.

## Configuration memory

The processor writes one byte per bus transfer. Each write carries an 8-bit
column (`fpgax`), an 8-bit row (`fpgay`), an 8-bit byte select (`fpgaz`) and
the data byte (`fpgad`). A PLB owns these bytes:

| Z | contents |
|---|---|
| 0 | LUT A truth table (inputs a[2:0]) |
| 1 | LUT B truth table (inputs b[2:0]) |
| 2 | control `{rsv[1:0], clk_en, ysel, xsel, dsel, role[1:0]}` |
| 3 | routing `{rsv[1:0], grp, bit_idx[2:0], orient, scheme}` |
| 4 | flip-flop preset: the write loads `fpgad[0]` into the flip-flop and stores nothing |

Global resources sit at X = Y = 0xFF:

| Z | contents |
|---|---|
| 0 | bit 0: route the BIST clock to the PLBs |
| 1 | `[5:0]` scan-out column, bit 6: scan-out route enabled |
| 2 | bit 0: top/bottom repeaters carry the east TPG bus (0 = west) |
| 3 | `[1:0]` RAM BIST mode: 0 single-port sync, 1 single-port async, 2 dual-port sync |

There is no reset and no read port. The test program clears every byte
itself. The memory is indexed `cfg[x][y]`.

## The logic BIST fabric

This is the core of the design. Every PLB is the same `plb_cell`, and its
`role` field decides what reaches its two LUTs.

**TPG.** Each TPG PLB holds one counter bit:

- LUT A = `q ^ cin` feeds the flip-flop;
- LUT B = `q & cin` is the carry, sent up on the Y-output;
- `cin` comes from the PLB below if that PLB holds the next lower bit of the
  same counter (same `grp`, `bit_idx` one less). Otherwise `cin` is 1.

The TPG column (x = 0 west, x = N−1 east) holds two 5-bit counters. Group 0
drives BUTs in the upper half rows (y ≥ N/2) and group 1 drives the lower
half. The repeater bit picks whether BUTs see the west or the east column's
buses.

**BUT.** Both LUTs take the same three TPG bits: bits 2..0, or bits 4..2
when `orient` is set. An ORA compares the X-output of one BUT with the
Y-output of another, so a test configuration must give both output paths
the same function. It does this either with the same table in both LUTs or
with both outputs taken from the flip-flop. The flip-flop is clocked from
LUT A or LUT B (`dsel`), so flip-flop tests follow a LUT function.

**ORA.** LUT A sees `{q, X, Y}` and holds `(X ^ Y) | q`, a sticky mismatch
flag:

- Y is the direct (orthogonal) Y-output of one neighbouring BUT. It comes
  from the west BUT when `orient` = 0 and from the east BUT when it is 1.
- X is the diagonal X-output of the other neighbouring BUT, taken from a
  partner row.

LUT B sees the scan input. Setting `dsel` turns every ORA into a shift
register stage without touching its flag.

**Partner rows (the diagonal routing schemes).** Scheme 1 pairs rows
(0,1), (2,3), …. Scheme 2 pairs (1,2), (3,4), … inside each half of the
array, and the first and last row of a half are paired with each other.
Both pairings are one-to-one, so every BUT X-output reaches an ORA. ORAs in
the upper half use scheme 1 and those in the lower half use scheme 2.

**Session layout.** In the west session the TPG is column 0, BUTs are the
odd columns and ORAs the even columns from 2. The east session mirrors this
with columns measured from N−1. A column-0 or column-(N−1) BUT is therefore
tested in the other session. An ORA with a BUT on each side flags a fault in
either BUT. The set of flagged ORAs, with the known wiring, names the faulty
PLB.

**Scan chain.** The chain runs up each ORA column. From the top of a column
it continues to the bottom of the ORA column two to the east. The scan-out
route brings the flag of the top PLB of the chosen column to bus line 0.
Reading the column farthest along the chain gives the flags in reverse chain
order, one per BIST clock.

**Clocking.** All flip-flops use the single system clock. The BIST clock is
a one-cycle enable, and it reaches the PLBs only when the global clock route
is written. Each PLB also has its own clock-enable bit.

**Lint.** Verilator reports the `xo`/`yo` arrays of the fabric as circular
logic. A loop would only close for a configuration in which ORAs read each
other. No BIST configuration does this, but a configurable array cannot rule
it out.

## Test program sequence

`tb/tb_fpslic_bist_top.sv` runs each session as a sequence of bus
operations. The sequence is:

1. Clear every configuration byte.
2. Configure the ORAs (compare table, scheme, orientation) and preset their
   flags to 0.
3. Configure the BUTs and preset their flip-flops.
4. Build the two counters and set the repeater direction.
5. Route the BIST clock.
6. Give 33 BIST clocks, one write to select 4 each. This covers all 32 counter
   states plus the final compare.
7. Repeat steps 3 and 6 for each of four BUT configurations. Two of these are
   LUT tests and two are flip-flop tests with presets of 0 and 1. Results are
   not read between configurations.
8. Switch the ORAs to shift mode.
9. Route the scan-out.
10. Read 23 × 48 flags, one bus read and one BIST clock each.

Between BUT configurations only the BUT bytes are rewritten; the ORAs keep
their flags. Each configuration byte costs one bus write.

## RAM BIST

With one free RAM per 4 × 4 PLBs, a 48 × 48 array has 144 RAMs of 32 words
× 4 bits. The processor drives four registers through the bus interface:

- write address;
- read address;
- data;
- control `{ora_rst, shift, oen, we}`.

All RAMs receive the same registered values. The registers are needed
because the bus is only 8 bits wide.

Each RAM data bit has a `ram_bist_ora`:

- **Data line.** A buffer drives the TPG data onto the RAM data line when
  OEN is high, and always in dual-port mode. In a two-state simulator this
  buffer is a multiplexer.
- **Compare.** An XOR compares the TPG data with the line in single-port
  modes. In dual-port mode it compares the read data of the previous RAM
  with that of this RAM. RAM 0 compares with the last RAM.
- **Flag.** An OR into the flip-flop makes the flag sticky.
- **Shift.** A multiplexer selects the previous flag when shifting.

The 576 flags form one chain. Its end is bus line 1.

Modes (global byte 3):

- **Single-port synchronous.** The read data is registered. The testbench
  runs March LR with three background patterns (0000, 0101, 0011).
- **Single-port asynchronous.** The read data is combinational. The
  testbench runs March Y.
- **Dual-port synchronous.** Port A writes while port B reads. Each pass
  writes a pattern and reads it back through port B, and every RAM is
  compared with its neighbour.

## Processor bus interface

`avr_fpga_if` decodes 16 one-hot I/O selects with write (`iowe`) and read
(`iore`) strobes:

| select | write | read |
|---|---|---|
| 0 | RAM write address | |
| 1 | RAM read address | |
| 2 | RAM data | |
| 3 | RAM control `{ora_rst, shift, oen, we}` | |
| 4 | BIST clock (data ignored) | |
| 5 | | `{6'b0, ram_scan, logic_scan}` |

The BIST clock is the write strobe qualified by select 4, so loading the RAM
registers does not clock the fabric. Assertions check that at most one
select is active during a strobe and that the two strobes never overlap.

## Departures and assumptions

- **Routing.** The real device has programmable interconnect points,
  express buses, repeaters every four PLBs, and bank clock and set/reset
  lines. None of these are modelled. Each role gets fixed input routing,
  the repeaters are one direction bit, and each PLB has one clock-enable
  bit. Configuration steps that only close switches are therefore single
  writes here.
- **Configuration bytes.** The byte map above is this design's own. The
  method relies on the PLB-addressable memory but does not fix the meaning
  of each byte.
- **Rows, orientation and chain order.** The exact partner rows of schemes
  1 and 2, the ORA orientation rule and the scan chain order are this
  design's choice within the layout of the method.
- **BUT configurations.** The method mentions 16 BUT test configurations
  but does not list them. The testbench applies four per session.
- **Flip-flops and clock inversion.** Flip-flops are rising-edge only. The
  clock-invert and set/reset options of a real PLB are not modelled.
- **Data bus.** The bidirectional data bus is split into `dbus_wr` and
  `dbus_rd`.
- **RAM modes.** Writes are synchronous in all RAM modes; "asynchronous"
  applies to the read path only. One ORA serves each RAM data bit.
- **Diagnosis.** The processor's on-chip diagnosis and its storage of
  results are done by the testbench.
- **Not modelled.** The processor, its program and data memory, the I/O
  buffers and the peripherals. The top brings their signals out as ports.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each
also has a watchdog that counts a failure if the test hangs. Build one with
plain Verilator 5 (the package goes first):

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl \
  rtl/bist_pkg.sv rtl/*.sv tb/tb_fpslic_bist_top.sv --top-module tb_fpslic_bist_top -j 8
./obj_dir/Vtb_fpslic_bist_top
```

| testbench | size | what it covers |
|---|---|---|
| `tb_plb` | — | random LUT tables, selects, enable and preset against a reference model |
| `tb_plb_cell` | — | a 5-bit counter built from TPG cells, BUT outputs, ORA compare and scan mode |
| `tb_cfg_mem` | N = 6 | random writes to PLB and global bytes against a reference copy, presets, out-of-range writes |
| `tb_logic_bist_fabric` | N = 8 | both sessions with LUT faults, flag positions, clock gating, wrong repeater direction |
| `tb_avr_fpga_if` | — | register loads, BIST clock qualification, scan read-back, reset |
| `tb_free_ram` | — | all modes against a reference memory |
| `tb_ram_bist_ora` | — | random stimulus against a reference comparator bit |
| `tb_ram_bist` | 4 RAMs | March Y in both single-port modes and the dual-port test, with a corrupted word |
| `tb_fpslic_bist_top_small` | N = 12, 9 RAMs | the same program as below on a small array; builds and runs in seconds |
| `tb_fpslic_bist_top` | default (48 × 48, 144 RAMs) | the full program for both sessions with and without faults, all RAM modes |

`tb_fpslic_bist_top` runs at the default size. It takes about 4 minutes to
compile with 8 threads and under 2 minutes to run. The other testbenches
build and finish within seconds.

To change the array size, set `N` on `fpslic_bist_top`. `NRAM` follows as
(N/4)². An AT94K10-class array is N = 24.
