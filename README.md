# Flexibly splittable and stretchable register file for two-thread SMT

A simultaneous-multithreading core normally gives every hardware thread its
own copy of the register file. Many programs, however, use only part of the
32 architectural registers, especially floating-point registers. This
register file lets **one physical file serve one thread or two threads at
once, without adding ports or decoders**:

* **Split.** Pass gates cut the bit-line buses and the decoder address lines
  at a *split point*. Thread 0 keeps the rows below the cut and uses the
  ports at the low end. Thread 1 gets the rows above the cut and uses a
  second set of port drivers and sense points at the high end. Each thread
  still has two read ports and one write port, and the two threads work in
  the same cycle.
* **Flexible split.** There are several split points, and software chooses
  which one to open. The file can therefore be cut 16|16 or 24|8, and so on.
* **Stretch.** Extra rows beyond the 32 main rows belong to thread 1's
  side. With them, two threads whose register needs add up to a little more
  than 32 can still share the file.

The default configuration has 32 main registers of 32 bits, 2 split points
and 16 stretched rows, so 48 rows in all.

## How both threads count from R0

Each thread indexes its registers from R0 upwards. For thread 0, register
*i* is main row *i*. Thread 1's index is bit-inverted before it reaches the
shared decoder. The inverse of *i* is 31 − *i*, so thread 1's R0 is the top
main row, and its registers grow downwards towards the split point. Each
segment of the decoder's address lines carries the index of the end it is
joined to:

* segments still joined to the low end decode thread 0's index;
* segments joined only to the high end decode thread 1's inverted index.

A thread-1 index that would reach into thread 0's rows therefore selects
nothing. The partition is enforced by the wiring itself, with no bounds
check.

Stretched row *e* belongs to thread 1's register *P1 + e*, where *P1* is the
number of main rows thread 1 owns. A small extra decoder selects these rows
from the inverted index and the split lines. For one stretched row and two
split points, it computes:

    Extra0 = (S0'·S1·a4'·a3 + S0·S1'·a4·a3')·a2·a1·a0      (a = inverted index)

With S0 open this is thread 1's R16; with S1 open it is R8.

## Split points and modes

Split point *k* lies just below main row `16 + k·16/NUM_SPLIT`, so it is
always in the upper half of the file. Thread 0 therefore always keeps at
least 16 registers. A control line `S[k]` of 1 closes the gate (bus
connected); 0 opens it.

| S (S1 S0) | mode        | thread 0      | thread 1 (main + stretched) |
|-----------|-------------|---------------|-----------------------------|
| 11        | one task    | R0–R31        | —                           |
| 10        | two tasks   | R0–R15        | 16 + 16 = R0–R31            |
| 01        | two tasks   | R0–R23        | 8 + 16 = R0–R23             |
| 00        | no operation| —             | —                           |

More generally, with all gates closed the file is one task, with exactly one
gate open it is two tasks, and with two or more gates open it is no
operation. No operation means both ports are disabled: writes are dropped and
reads return 0. In one-task mode the stretched rows cannot be reached,
because a 5-bit index only names 32 registers, so the file then behaves
exactly as an ordinary 32-entry file.

The operating system decides when to split. It loads `cfg_s` through
`cfg_we`, and it can present two threads' register counts on `usage0` and
`usage1`. The `fits` output then says whether both counts fit the current
partition sizes, which are also shown on `part0` and `part1`.

## Structure

| module                 | role |
|------------------------|------|
| `fss_regfile`          | top: wires the parts below, gates ports by mode |
| `fss_split_ctrl`       | holds the S lines and decodes the mode; partition sizes; fit flag |
| `fss_split_decoder`    | shared word-line decoder with cut address lines and the stretched-row decoder; one each for read A, read B and write |
| `fss_split_read_bus`   | read bit lines of one port, cut at the split points, with an output at each end; one for each read port |
| `fss_split_write_bus`  | write bit lines, cut at the split points, driven from both ends |
| `fss_reg_array`        | the 48 × 32-bit storage rows (flip-flops) |
| `fss_pkg`              | mode enum and the split-point/segment geometry functions |

A *segment* is the group of rows between two neighbouring split points. The
stretched rows belong to the last segment. The read bus models a precharged
bit line as the wired OR of the selected rows in a segment. Segment *m*
reaches the low end if every split point below it is closed, and the high end
if every split point above it is closed.

## Interface and timing

The top has one port bundle per thread, `t0_*` (low end) and `t1_*` (high
end). Each bundle has:

* `ra` and `rb`: read indices;
* `rda` and `rdb`: read data;
* `we`, `wa` and `wd`: write enable, write index and write data.

Reads are combinational. Writes land on the rising edge of `clk`, and there
is no write-to-read bypass: a read in the cycle of a write returns the old
value. A new split setting takes effect on the edge where `cfg_we` is high.
Row contents survive a change of setting, so a thread sees whatever its new
rows hold.

`rst_n` is an asynchronous, active-low reset. It only resets the split lines,
to all closed (one task). Storage rows are not reset. Thread 1's read outputs
are 0 unless the file is in two-task mode.

Parameters of `fss_regfile`:

| parameter   | default | meaning |
|-------------|---------|---------|
| `R`         | 5       | log2 of the architectural register count (32) |
| `W`         | 32      | word width |
| `NUM_SPLIT` | 2       | split points; must divide 2^(R−1) (1, 2, 4, 8, 16 for R = 5) |
| `EXTRA`     | 16      | stretched rows; at most 2^(R−1) so thread 1 can index them all |

The defaults follow the design study behind this file:

* 32 registers and a 32-bit bus;
* the two-split-point arrangement of its worked example;
* 16 stretched rows, which it found the best trade-off for a 32-entry file.

The study also looked at 1, 4 and 8 split points. With 8 split points the
cut can fall every two rows from 16 upwards.

## Where the RTL departs from a circuit implementation

* Transmission gates, precharge and sense amplifiers are modelled as logic:
  segment connect/disconnect and a wired OR. A circuit realisation pays a
  delay for every gate in series on the bus. That delay grows with the
  number of split points, and this RTL does not show it. A pipeline can
  absorb it by giving register read or write an extra stage; no such stage
  is built here.
* The even spacing of split points for `NUM_SPLIT` other than 2 is this
  design's choice. So are the no-operation gating and the fit-check
  interface.
* Picking thread pairs, reading each program's register usage from its
  executable, and compiling programs so that they use a contiguous range
  R0..Rn are software tasks. They are not part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_fss_split_decoder` checks the decoder exhaustively for all S settings
  and index pairs. It also checks an 8-split-point, 4-stretched-row instance,
  and the worked example (R16 with S0 open, R8 with S1 open).
* `tb_fss_split_read_bus` and `tb_fss_split_write_bus` check, for each S
  setting, which rows each end sees.
* `tb_fss_reg_array` and `tb_fss_split_ctrl` check storage, mode decoding,
  partition sizes, the fit flag and reset.
* `tb_fss_regfile` runs the whole file at its default size through one task,
  both split points, no operation and back. Both threads issue random traffic
  on every port, and a model of the physical rows predicts each read. The
  testbench counts these events and fails if any never happens:
  * accesses to the stretched rows;
  * simultaneous writes by both threads;
  * thread-1 writes outside its partition, which must be dropped;
  * data read back after a mode switch.
* `tb_fss_regfile_configs` runs the same kind of traffic on other sizes:
  1, 4 and 8 split points, with 0, 1, 4 and 16 stretched rows.
* `tb_fss_workloads` pairs threads by floating-point register use: "higher"
  threads use more than 16 registers and "lower" threads fewer than 16. For
  each pair it acts as the operating system. It probes each split setting
  through the fit flag, then either runs the pair together or one thread
  after the other. Per-thread architectural models check every operand. With
  16 stretched rows, every higher–lower and lower–lower pair shares the file.
  A higher–higher pair shares it only when both threads use at most 24
  registers.

To simulate with Verilator (5.x), from the directory above `rtl/` and `tb/`:

    verilator --binary --timing --timescale 1ns/1ps -Wno-fatal --top-module tb_fss_regfile \
        -y rtl -y tb +libext+.sv -Irtl -Itb rtl/fss_pkg.sv tb/tb_fss_regfile.sv
    ./obj_dir/Vtb_fss_regfile

Use the same command for any other testbench: change the top module and the
file. Testbenches that use `fss_ref_pkg` find it through `-y tb`.
