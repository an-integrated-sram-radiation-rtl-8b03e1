# SRAM radiation monitor (160 × 8 × 16 bits, daisy-chained serial access)

A radiation sensor built from a plain SRAM. The array is written with a known
pattern and its core supply is lowered, which shrinks the cells' static noise
margins and makes them easier to flip by an ionising particle. The array stays
exposed for seconds. Then the supply is raised back to nominal and the array is
read out. The number of flipped bits in one readout cycle is proportional to
the particle fluence. Neighbouring flips are grouped into multi-bit upsets
(MBUs), and the rest count as single-event upsets (SEUs). SEUs and MBUs respond
differently to the supply voltage, so measuring both extends the sensor's range.

The RTL here describes one chip: a 20480-bit SRAM macro and a serial interface
that lets many chips share one daisy chain. It also has a testbench that runs
four chained chips through complete readout cycles.

## Array organisation and the physical bit map

| quantity | value |
|---|---|
| physical rows | 160 |
| physical columns | 128 (16 groups of 8) |
| cells | 20480 |
| word | 16 bits |
| words | 1280 (8 per row), 11-bit address |
| address split | A[10:3] row, A[2:0] word within the row |

The row decoder (`row_decoder`) raises one of 160 word lines. Row addresses
160–255 raise none, so a write there does nothing and a read returns zero. The
column decoder (`col_decoder`) selects one of 8 columns in every group. Each of
the 16 data bits has its own sense amplifier and write slice (`sense_write`).
Bit *b* is connected through the column multiplexer (`column_mux`) to the
group of columns 8b … 8b+7.

Bit *b* of the word at address *a* is therefore stored in the cell at

    row    = a / 8          (A[10:3])
    column = 8*b + a % 8    (A[2:0] picks the column inside group b)

**This mapping matters most when you analyse the data.** Two cells that are
physical neighbours in one row belong either to adjacent words with the same
bit (columns 8b+c and 8b+c+1) or, at a group edge, to the same word with
adjacent bits. Vertical neighbours are the same bit of words 8 addresses apart.
MBU counting must use physical adjacency, not logical adjacency. The
16-groups-of-8 structure comes from the block diagram. Which column in a group
belongs to which address is this design's choice. If your silicon differs,
change it in `column_mux` (and in the testbench's analysis).

## Core supply and the readout cycle

The cell array runs on its own supply, separate from the digital logic. In
this RTL that supply is the `vddc_mv` input, in millivolts (nominal 1800).
Changing it never resets or disturbs the interface logic. The cycle is:

1. **Read**: core supply at 1.8 V. Read the whole array, count the bits that
   differ from the pattern, then rewrite them.
2. **Measure**: core supply lowered to a level V1 (0.4 V in the testbench).
   The array is left exposed.
3. **Read** again at 1.8 V.
4. **Measure** at a different level V2 (0.6 V in the testbench), and so on.

A read at very low supply (around 0.3 × Vdd) can destroy the data it reads, so
the supply must be back at nominal before any access. The array model makes
this visible: a read below `VDD_READ_MIN_MV` = 1620 mV gives every cell of the
accessed row a random value. That threshold is this model's own number (90 % of
nominal). The model does not lose data at low supply, and it does not model
how upset sensitivity depends on supply. Radiation enters only through the
testbench.

## Serial interface and daisy chain (`serial_if`)

Pins: `clk`, `rst_n` (asynchronous, active low), `sen` (shift enable), `load`
(execute), `sdi`, `sdo`. The `sdo` of one chip drives `sdi` of the next. All
chips share `clk`, `sen` and `load`. Each chip holds one 29-bit frame
(`radmon_pkg::frame_t`), shifted MSB first:

| bits | field | meaning |
|---|---|---|
| 28:27 | `cmd` | 00 NOP, 01 WRITE, 10 READ, 11 reserved (acts as NOP) |
| 26:16 | `addr` | word address A[10:0] |
| 15:0 | `data` | write data; in a READ response, the word read |

For a chain of N chips the host shifts N × 29 bits. The frame for the chip
farthest from the host goes first. The host then pulses `load` for one cycle:

| edge | what happens |
|---|---|
| L (`load` = 1) | each chip copies its frame into its command register |
| L+1 | Read or Write was asserted to the SRAM during the preceding cycle; the write completes or the sense amplifiers latch at this edge |
| L+2 | Out Enable was high during the preceding cycle; the shift register now holds the response `{cmd, addr, data}` |

`sen` and `load` are ignored for the two cycles after L. The response to one
command shifts out while the next command shifts in, so a full readout of a
chain costs 1281 commands of N × 29 + 3 cycles. For four chips that is
152 439 cycles. At an assumed 1 MHz serial clock this takes 0.15 s, well below
the tens of seconds between readouts. The frame layout, the `sen`/`load` pins,
the command codes and this timing are this design's choices. The published
description requires only serial access and daisy chaining.

## Triple modular redundancy

Every register is a `tmr_reg`. It has three copies, a bitwise 2-of-3 vote
(`tmr_vote`) on the output, and the voted value reloaded into all copies on
every clock. One upset copy is outvoted at once and repaired at the next edge.
This covers the interface's shift register, command register and controller
state, and the 16-bit sense latch. The combinational address decoders are
instantiated three times, and their word lines and column selects are voted
before they reach the array. The cell array is the sensor and is
deliberately unprotected. Synthesis tools merge identical logic, so keep the
three copies apart (with `keep` or hierarchy-preservation attributes) when
you implement the design.

## Modules

| module | kind | role |
|---|---|---|
| `sram_radmon` | RTL, top | one chip: `serial_if` + `sram_core` |
| `serial_if` | RTL | shift register, command execution, TMR |
| `tmr_reg`, `tmr_vote` | RTL | TMR register and majority voter |
| `sram_core` | RTL | the SRAM macro: triplicated decoders, array, column mux, sense/write |
| `row_decoder`, `col_decoder` | RTL | A[10:3] → 160 word lines, A[2:0] → 8 column selects |
| `column_mux` | RTL | 128 columns ↔ 16 slices, sets the bit map |
| `sense_write` | RTL | TMR sense latch, write drive, Out Enable gating of Data Out |
| `sram_array` | behavioural model | 6T cell array, supply-dependent destructive read, `upset()` task |
| `radmon_pkg` | package | sizes, command codes, frame type, supply constants |

`sram_array` stands for a full-custom analog macro. It is not for synthesis:
it uses `$urandom` and a task that testbenches call to flip a cell. Everything
else is synthesizable. In this RTL the SRAM performs Read and Write at a
clock edge; the analog timing of a real macro is not modelled. With Out
Enable low, Data Out is zero.

Not in the RTL: the adjustable core supply itself, the pads, the test system
that runs the readout cycle, and the offline SEU/MBU analysis. The top
testbench contains simple models of the last two.

## Simulation

All testbenches check themselves and print `TB_RESULT checks=N failures=M`.
With Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_sram_radmon \
        -Irtl -Itb -y rtl -y tb +libext+.sv rtl/radmon_pkg.sv tb/tb_sram_radmon.sv
    ./obj_dir/Vtb_sram_radmon

| testbench | what it shows |
|---|---|
| `tb_sram_radmon` | 4 chained chips at full size: pattern write, verify, two measure phases (0.4 V and 0.6 V) with injected SEUs and 2-cell MBUs, recovered by physical clustering, scrub, TMR copy upset, destructive low-supply read; about 0.94 M cycles, a few seconds |
| `tb_serial_if` | frame execution, strobe timing, busy-ignore, response pipelining, TMR masking |
| `tb_sram_core` | random traffic over all addresses, Out Enable, bit map, one faulty decoder copy outvoted, destructive read |
| `tb_sram_array` | cell writes, bitlines, `upset()`, destructive read only at low supply |
| `tb_column_mux`, `tb_sense_write`, `tb_row_decoder`, `tb_col_decoder`, `tb_tmr_reg`, `tb_tmr_vote` | unit checks |

Verilator simulates with two states and randomises uninitialised state. The
testbenches never read a cell they have not written.

## How far to trust it

Taken from the chip description: the array geometry, the word width, the
address split, the separate core supply, destructive reads at low supply, the
readout cycle, serial daisy-chained access and TMR. Everything about the
interface protocol, and the column order inside a group, is a reasonable
choice made for this RTL. Check both against the real device before you use
the RTL to decode measured data.
