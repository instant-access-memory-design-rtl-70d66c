# Instant-access memory: a clockless 2-D RAM for FPGAs

This is a small random-access memory with no clock at all. A write is stored,
and a read is visible on the output, as soon as the address and the strobe have
rippled through two small decoders and one storage cell. No clock edge and no
pipeline stage is involved. The words sit in a two-dimensional grid. A row
decoder and a column decoder each turn half of the address into one-hot select
lines, and the one cell where the active row crosses the active column is the
one accessed. Every cell reaches the single output bus through its own
tri-state buffer.

The default build is 16 words of 8 bits (4-bit address). Setting
`ADDR_WIDTH = 2` gives the 4-byte, 2 x 2 variant. Both sizes are tested.

## Blocks

| module | role |
| --- | --- |
| `instant_access_memory` | top: decoders, grid of cells, shared read bus |
| `decoder` | binary to one-hot; instance `C1` decodes the column field, `R1` the row field |
| `memory_cell` | one word: a latch written on `Wr & row & column`, plus the read enable `Rd & row & column` |
| `tri_state_buffer` | puts one cell's word on `data_out` while its enable is high, otherwise floats |

In the top, word `i` is the generate block `x[i]`. Its cell is `x[i].B0` and its
buffer is `x[i].T0`.

## From address to cell

```
addr = { row field (ROW_BITS = floor(ADDR_WIDTH/2)) , column field (COL_BITS = rest) }

          col 0   col 1   col 2   col 3
row 0     x[0]    x[1]    x[2]    x[3]
row 1     x[4]    x[5]    x[6]    x[7]
row 2     x[8]    x[9]    x[10]   x[11]
row 3     x[12]   x[13]   x[14]   x[15]
```

Cell `i` is in row `i / COLS` and column `i % COLS`, so the number of the cell
that holds a word equals its address. In the 4-byte build, the column decoder
takes `addr[0]` and the row decoder takes `addr[1]`. The split into low and high
halves for wider addresses is a choice made here. For an odd `ADDR_WIDTH`, the
column field gets the extra bit.

Because the decoders are one-hot, only one cell can be selected at a time. An
always-on assertion in the top checks that at most one buffer enable is high.

## The cell: why "instant" means a latch

A memory that works without a clock has to store data on a level, not an
edge. Each `memory_cell` is therefore a `DATA_WIDTH`-bit level-sensitive latch:

- While `Wr`, `row` and `column` are all high, the latch is transparent and
  follows `data_in`.
- When any of the three falls, the latch keeps the last value.
- `data_out` of the cell always shows the stored word.
- `enable = Rd & row & column` decides whether the word goes onto the bus.

As a result, one 16 x 8 build has 128 latch bits and no flip-flops. Synthesis
reports them as latch cells; they are intended.

Using the memory safely follows from the latches. This is the same rule as for
any asynchronous SRAM:

- Keep `addr` and `data_in` stable for as long as `Wr` is high.
- Change `addr` only while `Wr` is low. If the address changes during a write,
  a decoder glitch can open a second cell's latch for a moment.

Nothing checks these rules inside the RTL. They are the duty of whatever drives
the memory.

`Rd` and `Wr` may be high together. The addressed latch is then transparent, so
`data_out` shows the word being written. This behaviour is a choice made here.

There is no reset. A word reads as undefined until it has been written once.

## The read bus

All cell buffers drive one net, `data_out`. The net is declared `tri`, and each
buffer is `assign y = enable ? x : 'z`. When nothing is read, the bus floats:
during a write without `Rd`, `data_out` is high impedance.

A simpler wired OR of all cell outputs was considered and not used, for two
reasons:

- It costs more logic.
- It only works if every unselected cell drives zeros.

On an FPGA, a synthesis tool turns this internal tri-state bus into a
multiplexer or an AND-OR tree. Yosys reports the several drivers of `data_out`;
they are intended.

In a two-state simulator such as Verilator, a floating bus reads as all zeros.
The testbenches check for zero where the bus must be released.

## Timing

- Read: `data_out` is valid after the decoder delay, one AND gate and the
  buffer delay.
- Write: the new value is in the cell after the decoder delay plus the latch's
  D-to-Q delay.

There are no cycles to count. The RTL has no `#` delays, so in simulation both
happen in the time step in which the inputs change. The end-to-end testbench
checks the read 1 ps after `Rd` rises.

## Parameters

| parameter | default | meaning |
| --- | --- | --- |
| `ADDR_WIDTH` (top) | 4 | address bits; `2**ADDR_WIDTH` words; must be at least 2 |
| `DATA_WIDTH` (top, cell, buffer) | 8 | bits per word |
| `IN_WIDTH` (decoder) | 1 | input bits; `2**IN_WIDTH` outputs |

The source design presents 16 x 8 in its simulation and 4 x 8 in its schematic.
It also says the same architecture was synthesised at other sizes. Those sizes
and their results (LUTs, power, delay) are not reproduced here. Any
`2**ADDR_WIDTH x DATA_WIDTH` size can be built from the two parameters.

## What follows the source design and what does not

Taken from the source design:

- the row/column structure with two decoders;
- one cell and one tri-state buffer per word, built with generate loops;
- clockless operation;
- the port names `Rd`, `Wr`, `addr`, `data_in` and `data_out`;
- the 16 x 8 and 4 x 8 sizes;
- the instance names `C1`, `R1`, `B0` and `T0`;
- the reference timeline: write `10101010` to address `0001` at 10 ns, read it
  back at 50 ns.

Chosen here, where the source is silent:

- the storage element is a latch;
- the address split for sizes above 4 words;
- no decoder enable;
- no reset;
- `Rd` and `Wr` together read the word being written;
- the buffer's output name `y`.

## Verification

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each also has a watchdog that counts a failure
if the test hangs.

| testbench | what it covers |
| --- | --- |
| `tb_decoder` | all inputs of a 1-to-2 and a 3-to-8 decoder, every output bit |
| `tb_tri_state_buffer` | two buffers on one bus: each driving, and bus released |
| `tb_memory_cell` | random strobes and selects against a reference word; holding after the strobe falls; the enable equation |
| `tb_instant_access_memory` | default 16 x 8 build, end to end |
| `tb_instant_access_memory_4byte` | the 2 x 2 build; checks through the hierarchy that address `a` lands in cell `x[a]`, so a swapped row/column wiring is caught too |

`tb_instant_access_memory` works in three steps:

1. It replays the reference timeline: write at 10 ns with the bus released,
   read at 50 ns.
2. It fills every address.
3. It runs 4000 random steps of writes, reads, idle steps and `Rd`+`Wr`
   together, checked against a reference array.

It counts how often each of these happened and fails if any never did: write,
read, released bus, overwrite, read during write, and every address read at
least once.

Each testbench was also run against a deliberately broken copy of its module,
and each broken copy made it fail:

- a reversed decoder;
- a cell enable that ignores the row line;
- inverted buffer polarity;
- miswired row selects in the top.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl --top-module tb_instant_access_memory \
          tb/tb_instant_access_memory.sv
./obj_dir/Vtb_instant_access_memory
```

Use the same command with any other testbench name. Lint a module with:

```
verilator --lint-only -Wall -y rtl rtl/instant_access_memory.sv
```

Lint is clean. Yosys warns that `data_out` has several drivers: that is the
tri-state bus explained above.
