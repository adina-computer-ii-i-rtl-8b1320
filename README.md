# ADINA II shared-memory fabric in SystemVerilog

ADINA Computer II is an array computer of the early 1980s for solving partial
differential equations: N² slave processors (AUs) arranged as an N x N
square, N submaster processors (SUs) and one master (MU). Its central idea is
how the slaves exchange data. A full crossbar between N² processors would need
N⁴ shared memory blocks; ADINA II uses only **N³ blocks, each shared by exactly
two processors**, arranged so that

* the two processors sharing a block are always "one row, one column" apart in
  a way that matches the three sweep directions of an alternating-direction
  (ADI) solver on an N x N x N lattice, so the three fractional steps of such
  a solver need no extra transfers at all, and
* any processor can reach any other through **one mediating processor**, at a
  cost independent of their distance: one extra read and one extra write.

This repository is the RTL of that fabric: the buffer memory, the logic that
lets the two sides of each memory board take turns, the submasters' common
memories and the slaves' address windows. The processors themselves were
off-the-shelf 16-bit minicomputers; they are not part of the RTL, and their
buses and port bits are the ports of the top module `adina2_top`.

At the default size, N = 16 (the trial machine): 256 AUs, 16 SUs,
16 buffer memory boards of 16 x 16 blocks = 4096 blocks of 256 halfwords
(16 Mbit), and 16 common memories of 16 KB.

## Naming and the sharing rule

Processors are written with double brackets: AU ((a,b)), a, b = 0..N-1, and
SU ((k)). Block number (i,j) on board k is written (i,j)ₖ. The rule is

    ((j,k))  —  (i,j)ₖ  —  ((k,i))

Block (i,j)ₖ is reached by exactly two AUs: ((j,k)) and ((k,i)). Seen from
one AU ((a,b)):

| AU ((a,b)) bus | board | blocks reached | called |
|---|---|---|---|
| row bus | b | (i,a)_b for i = 0..N-1 | its memory row |
| column bus | a | (b,j)_a for j = 0..N-1 | its memory column |

So on board k, the N "row AUs" ((j,k)) each own one row of blocks and the N
"column AUs" ((k,i)) each own one column; every block sits where one row
meets one column. A word written by ((j,k)) into (i,j)ₖ is read by ((k,i)).

**Indirect transfer.** AU ((j,k)) reaches AU ((l,m)) through the mediator
((k,l)):

    ((j,k)) → (l,j)ₖ → ((k,l)) → (m,k)ₗ → ((l,m))

The mediator reads the data from its column bus on board k and writes them
with its row bus on board l. Done for all pairs at once, this is an
all-to-all exchange: every AU ((j,k)) cuts its N² words into N tuples of N
words and writes them into its memory row; every mediator regroups the
tuples it finds in its memory column and writes them into its memory row on
another board; every AU then reads, in its memory column, one word from every
other AU. `tb_adina2_top` runs exactly this.

**Broadcast.** An AU can write one word into all N blocks of its memory row
(P1 bit 4 set) or memory column (P1 bit 0 set) in one access.

## How a board takes turns

A block has one set of address, data and control lines, fed either from its
row bus ("the lines from the left") or its column bus ("from the bottom").
The whole board switches between the two sides; `access_ctrl` decides when,
and its submaster SU ((k)) runs the cycle. Each AU has an 8-bit port P1; bits
7..4 serve its row role, bits 3..0 its column role:

| P1 bit | dir (AU view) | meaning |
|---|---|---|
| 6 | out | row end: 1 = my row lines are closed |
| 7 | in  | row acknowledge from the SU |
| 5 | in  | row go: the column phase is over |
| 4 | out | broadcast along my memory row |
| 2 | out | column end: 1 = my column lines are closed |
| 3 | in  | column acknowledge from the SU |
| 1 | in  | column go: the row phase is over |
| 0 | out | broadcast along my memory column |

The cycle on board k:

1. The board is on the row side. Each row AU ((j,k)) lowers its row end,
   works on its memory row, then raises row end again.
2. When all have ended, the SU sees **row total end** (the AND of the N row
   end signals) on its P1 bit 7 and answers with its **row acknowledge**
   (SU P1 bit 6). This reaches every row AU as "ack" and every column AU as
   "go". At the next clock edge the board turns to the column side.
3. Each column AU ((k,i)) lowers its column end, works, raises it again.
4. The SU sees **column total end** (SU P1 bit 3), answers with the **column
   acknowledge** (SU P1 bit 2), which reaches the column AUs as "ack" and the
   row AUs as "go"; the board turns back, and the cycle repeats.

The turn flip-flop changes only on an acknowledge *and* when every line of
the side being left is closed, so the two sides can never drive a block at
the same time. An AU whose lines are not open is held in wait states: its
access simply does not complete until the board turns to its side and it
opens its lines.

Because every AU is a row AU on one board and a column AU on another, an
all-to-all exchange alternates globally: all boards on the row side, then all
on the column side, and so on. A mediator that reads on one board and writes
on another therefore reads everything in one phase and writes in the next.

## Common memory

SU ((k)) shares 16 KB of its memory with its N slaves ((j,k)), one at a
time. It puts the code `1j` on its port P0 bits 4..0 (bit 4 opens, bits 3..0
name the AU); one clock later AU ((j,k)) sees its grant on P0 bit 7 and may
use the memory. When done it raises P0 bit 2 (end), which the SU sees on its
P0 bit 7; the SU then clears its code. While an AU holds the memory the SU's
own accesses wait (`su_cm_ready` low), and every other AU's accesses to it
wait too.

## The AU's address window

An AU has 64 KB of byte addresses and 16-bit data. The lower 32 KB are its
own memory (16 KB CMOS, 16 KB EPROM) and are not claimed by this RTL. The
upper 32 KB:

| AU address | target | fields |
|---|---|---|
| 0x8000-0xBFFF | common memory of SU ((b)) | halfword = addr[13:1] |
| 0xC000-0xDFFF | row bus (board b) | block = addr[12:9], word = addr[8:1] |
| 0xE000-0xFFFF | column bus (board a) | block = addr[12:9], word = addr[8:1] |

Each bus reaches 16 blocks of 256 halfwords, 8 KB. Accesses are halfword
wide; addr[0] must be 0 (an assertion checks it).

## Timing

Everything runs on one clock, `clk`, with a synchronous active-low reset
`rst_n`. An AU holds `req`, `we`, `addr`, `wdata` until `ready`; the access
is taken at that clock edge, and read data arrive with `rvalid` one cycle
later. With nothing closed, every AU completes one access per cycle, in
parallel with all others. Board turns take effect one clock after the SU's
acknowledge; common-memory grants one clock after the SU's code.

## Modules

| file | what it is |
|---|---|
| `rtl/adina_pkg.sv` | sizes, bus structs (`bm_req_t`, `cm_req_t`), P1 bit numbers |
| `rtl/bm_block.sv` | one block: two 256 x 8 RAM chips with CS_n, OD_n, R/W_n |
| `rtl/bm_board.sv` | N x N blocks, row/column line select, broadcast decode, read-back OR bus |
| `rtl/access_ctrl.sv` | turn-taking logic of one board (total ends, acknowledge fan-out, turn flip-flop) |
| `rtl/common_mem.sv` | 16 KB common memory of one SU with the `1j` handover |
| `rtl/au_bus_if.sv` | address decode and wait states of one AU |
| `rtl/adina2_top.sv` | N boards, N controllers, N common memories, N² AU interfaces, wired by the sharing rule |

Top-level ports are arrays indexed `[a][b]` for AU ((a,b)) and `[k]` for
SU ((k)) / board k; the header of `adina2_top.sv` lists them.

## What follows the original machine and what is this design's choice

Taken from the machine: the N³-block organisation and the sharing rule, the
block size (256 halfwords from two 256 x 8 chips), the N = 16 trial size, the
one-side-at-a-time selection of a board's lines, row and column broadcast
selected by P1 bits 4 and 0, the four-step turn cycle and its AU-side P1 bit
numbers, the `1j` common-memory code with grant on P0 bit 7 and end on P0
bit 2, 16 KB of common memory per SU, and the 32 KB shared window of the AU.

This design's own choices, where the machine's description gives no detail:

* The RAMs are clocked (the real chips are asynchronous, 650 ns access).
  A disabled block drives 0, and the blocks along a bus are ORed.
* The gate-level turn logic is the simplest that realises the four steps:
  two AND trees, wires, one flip-flop, plus the rule that a board turns only
  when all of the departing side has ended.
* The SU's P1 bits: total ends in on bits 7 (row) and 3 (column),
  acknowledges out on bits 6 (row) and 2 (column).
* Positive logic throughout; the original lines are active low.
* Wait states on a closed target, the order of the regions in the AU's
  window, the registered common-memory grant, and the SU waiting while an AU
  holds its memory.
* No reset of memory contents; reset puts every board on the row side.

Not in the RTL: the MU, SUs and AUs (commercial minicomputers), their
private memories and floating-point instructions, and the 1 Mbyte/s DMA
channels between MU and SUs, of which only the rate is known. The 4 x 4
"real boards" inside each board are packaging and have no logical effect.

## Testing

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`:

| bench | what it checks |
|---|---|
| `tb_bm_block` | write/read of all words, OD_n blanking, deselect, one-cycle read latency |
| `tb_bm_board` (N = 4) | row-written data read back as columns and vice versa, both broadcasts, the unselected side reaches nothing |
| `tb_access_ctrl` (N = 4) | three full turn cycles, total ends only on the last end, ack/go fan-out, turn timing |
| `tb_common_mem` (N = 4) | handover to one AU, grant timing, SU and other AUs locked out, end signal, results back to the SU |
| `tb_au_bus_if` | random addresses: map, fields, wait states, read data source |
| `tb_adina2_top` (N = 4) | all-to-all exchange through mediators (each of the four phases exactly N² cycles), broadcasts, waits, common memory; every mechanism counted |
| `tb_adina2_full` | the same at the default N = 16: 65,536 data relayed |
| `tb_heat3d` (N = 4) | the explicit 3-D heat scheme, using the same blocks in two positions to get i-, j- and k-lines; two time steps checked against a direct 3-D computation |
| `tb_heat2d` (N = 4) | the explicit 2-D heat scheme on a 16 x 16 lattice: rows to columns and columns back to rows through mediators, two time steps checked against a direct computation |
| `tb_matmul` (N = 4) | the matrix product of order N² = 16 with half-vector broadcasts through mediators, checked against a direct product |

To run one, with verilator 5:

    verilator --binary --timing --assert -Irtl rtl/adina_pkg.sv \
        rtl/bm_block.sv rtl/bm_board.sv rtl/access_ctrl.sv rtl/common_mem.sv \
        rtl/au_bus_if.sv rtl/adina2_top.sv tb/tb_adina2_top.sv \
        --top-module tb_adina2_top -Mdir obj && ./obj/Vtb_adina2_top

The full-size bench takes about three minutes to compile and well under a
second to run. The workload benches do the processors' arithmetic in 16-bit
integers; only the data movement is the fabric's. The ADI versions of the
heat problems move their data exactly as `tb_heat3d` and `tb_heat2d` do
(read a line, solve along it, write it back for the next direction) and
differ only in the arithmetic done inside the AUs (tridiagonal solves), so
they have no bench of their own.

## Fit of the evaluated problems

The machine was evaluated on five problems at N = 16; all fit the fabric.
Words are 32-bit floating-point, two halfwords each (a block holds 128).

* 3-D heat conduction by ADI (Douglas-Rachford) and by an explicit scheme,
  16 points per axis: one block per lattice point, 4096 blocks, using 7 and
  5 words of each. The trick is that a block (x,y)_z can stand for lattice
  point (x,y,z) ("position a": memory rows are i-lines, memory columns
  j-lines), for (z,x,y) ("position b": j- and k-lines) or for (y,z,x)
  ("position c": k- and i-lines); each position uses its own words m of
  the blocks, so one physical memory gives every AU whole lines in all three
  directions, and writing a line in one direction and reading it in another
  is the transposition the ADI sweeps need.
* 2-D heat conduction by ADI and by an explicit scheme, 256 points per line:
  each 256-point line moves as 16 tuples of 16 words, 32 halfwords per block.
* Product of two 256 x 256 matrices: a vector is moved in two halves of 128
  words, exactly one block each.

The estimated efficiencies of these problems (speed-up over one AU divided by
N²) range from 1.0 for the 3-D ADI solver, which needs no extra transfers, to
0.64 for the matrix product, whose inner loop is short compared with the
extra transfer through the mediator. Those figures depend on the processors'
instruction times, not on this RTL.
