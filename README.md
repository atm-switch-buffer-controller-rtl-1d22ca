# Multi-class ATM output buffer built on linked lists

An ATM switch port buffers cells of several service classes. This buffer
serves them by *head-of-line priority* (a cell of class 0 always leaves before
one of class 1, and so on; within a class, cells leave in arrival order) and,
when it is full, by *push-out*: room is made by dropping the most recent cell
of the lowest-priority class present, preferring a cell whose CLP (cell loss
priority) bit is 1. If the arriving cell is itself the worst cell in the
buffer, it is the one dropped.

Doing this with a search over up to 2000 stored cells is out of the question
at a new cell every 56 clocks. The design keeps the cell addresses in linked
lists instead, so that every decision is made from the *ends* of a few lists:
a handful of RAM accesses per cell, whatever the fill level.

The default configuration is 3 classes and 2000 cells. The RTL is
SystemVerilog; it simulates with Verilator and elaborates with Yosys/slang.

## The lists

Every buffer address is, at any time, on exactly one of these:

* **The free list.** Singly linked through the FWD field, starting at
  register `F` and ending at address 0. Address 0 never holds a cell. It is
  used as a stack: a freed address is pushed at `F`, and an address is taken
  from `F`.
* **One class list per class.** It holds every cell of the class in arrival
  order, doubly linked through FWD (towards newer cells) and BWD (towards
  older cells). The list begins at a *start address* that holds no cell.
* **One low-priority sublist per class.** It holds the CLP=1 cells of the
  class, doubly linked through LPF and LPB. It begins at the same start
  address as its class list.
* **The reserved address `next_addr`.** The next arriving cell is written
  here. The buffer therefore has one slot more than its capacity, and there is
  always room for the cell that is arriving.

For every class the controller holds three registers: the start address, the
end of the class list and the end of the sublist. A list is empty when its end
equals its start. The link fields live in `list_ram`. It has one word of four
fields (FWD, BWD, LPF, LPB) per address, so 2005 words of 4 x 11 bits at the
defaults. The address layout is:

| address            | use after reset                                   |
|--------------------|---------------------------------------------------|
| 0                  | free-list terminator, never a cell                |
| 1 .. NUM_CLASSES   | start addresses of classes 0 .. NUM_CLASSES-1     |
| NUM_CLASSES+1 .. DEPTH-2 | free list, `F` = DEPTH-2 counting down to 0 |
| DEPTH-1            | reserved for the first cell                       |

where `DEPTH = 1 + NUM_CLASSES + CAPACITY + 1`.

### Arrival: link, then allocate

1. **Link**, while the cell is being written at `next_addr`. The cell is
   appended to its class list with `FWD[end] = n` and `BWD[n] = end`. If
   CLP=1, it is also appended to its sublist with `LPF[lp_end] = n` and
   `LPB[n] = lp_end`.
2. **Allocate**, once the cell is complete. If the free list is not empty,
   `next_addr` is popped from `F`. Otherwise one cell is pushed out:
   * take the lowest-priority class that holds cells;
   * if its sublist is not empty, the victim is the sublist's end (the most
     recent CLP=1 cell). It is removed from the sublist by moving `lp_end` back
     one step. If it is not also the class list's end, it is unlinked from the
     middle of the class list with `FWD[prev] = next` and `BWD[next] = prev`;
   * otherwise the victim is the end of the class list, which moves back one
     step.

   The victim's address becomes `next_addr`. The next cell simply overwrites
   it.

Because the arriving cell is linked *before* the choice is made, the rule
"drop the arriving cell if nothing worse is buffered" needs no special case.

### Departure: the start address moves

To send a cell of the highest non-empty class, the controller reads the word
at that class's start address `s`. Let `c = FWD[s]` be the first cell. Then:

* `s` is pushed on the free list;
* `c` becomes the class's new start address, and `c` is the cell to send.

The cell being sent is therefore never on the free list. Its slot stays
reserved as the class start until the next departure from that class, and the
transmitter can read it out at leisure. The sublist shares the start address,
so it must follow the move:

* if the sublist was empty (`lp_end == s`), `lp_end` becomes `c`;
* if `c` was the first CLP=1 cell (`LPF[s] == c`), nothing changes;
* otherwise `LPF[c] = LPF[s]` and `LPB[LPF[s]] = c` carry the sublist head
  over (two extra writes).

### A worked example

This example uses 2 classes (A = 0, B = 1) and 4 cells, so 8 addresses. After
reset, `next_addr` = 7 and the free list is 6, 5, 4, 3.

| event                       | written at | new `next_addr`      | lists afterwards                              |
|-----------------------------|-----------:|----------------------|-----------------------------------------------|
| A, CLP=0                    | 7 | 6                    | A: 7                                          |
| A, CLP=0                    | 6 | 5                    | A: 7 6                                        |
| B, CLP=0                    | 5 | 4                    | B: 5                                          |
| A, CLP=1                    | 4 | 3                    | A: 7 6 4, A-low: 4                            |
| send                        | – | 3                    | 7 sent and becomes A's start; 1 freed         |
| A, CLP=1                    | 3 | 1 (from free list)   | A: 6 4 3, A-low: 4 3; buffer full             |
| A, CLP=0                    | 1 | 5 (B's 5 pushed out) | A: 6 4 3 1, B empty                           |
| A, CLP=0                    | 5 | 3 (A's last CLP=1 pushed out) | A: 6 4 1 5, A-low: 4                 |

`list_controller_tb` replays this sequence and checks every address.

## Blocks

```
 crossbar ──rc_*──► rcube_if ──pool write──► cell_pool ──pool read──► ilf_if ──tx_*──► PHY
                       │  link / allocate                ▲                │ dequeue
                       └────────────► list_controller ◄──┼────────────────┘
                                          │  A, D        │ (addresses)
                                       list_ram
```

| module            | role |
|-------------------|------|
| `atm_buffer`      | top: wires the blocks below, brings out crossbar, UTOPIA and status ports |
| `list_controller` | the list algorithm above, as a state machine over a single-port RAM |
| `list_ram`        | link fields, single port, synchronous read, per-field write mask |
| `cell_pool`       | cell storage, 64-byte slot per address, one write and one read port |
| `rcube_if`        | crossbar side: writes cells to the pool, makes link and allocate requests |
| `ilf_if`          | UTOPIA level 1 transmit master: asks for the next cell when TxClav=1, sends its 53 bytes |
| `atm_buf_pkg`     | shared constants: default sizes, field indices, write masks, cell format |

### List controller timing

There is one RAM access per clock, and a read returns its data one clock later.
Requests are taken in the idle state with allocate first, then link, then
dequeue.

| operation | clocks after acknowledge | RAM accesses |
|-----------|--------------------------|--------------|
| link, CLP=0 | 2 | 2 writes |
| link, CLP=1 | 3 | 3 writes |
| allocate from the free list | 2 | 1 read |
| allocate with push-out | 2, or 4 if a CLP=1 cell is unlinked from the middle | 1 read, 0 or 2 writes |
| dequeue | `deq_ack` after 2; done after 2 or 4 | 1 read, 1 or 3 writes |

After reset the controller spends DEPTH clocks writing the initial link words
(`ready` = 0).

Handshakes: `enq_ack` and `alloc_ack` are combinational, and the request is
dropped on the clock edge where the acknowledge is seen. `deq_ack` is a
registered one-clock pulse that carries `deq_addr` and `deq_class`. A
`deq_req` seen together with its own `deq_ack` is not taken again.

### Crossbar side (`rcube_if`)

The link carries one byte per clock, with `rc_valid` and with `rc_soc` on the
first byte. A cell on the link is 3 tag bytes followed by the 53-byte ATM cell.
Tag byte 0 holds the class number; a number past the last class counts as the
last class. CLP is bit 0 of ATM header octet 4. At 60 MHz, 56 bytes per cell
give one cell per 0.93 µs, which is 480 Mb/s.

Cells may arrive back to back. The pool writes and the link request for a cell
run 12 clocks (`WR_LAG`) behind the link, while the allocate request is made
without delay as soon as the last byte arrives. This ordering has two effects:

* the allocation for cell *k* is finished before the first byte of cell *k+1*
  reaches the pool, even if a dequeue was in progress;
* a cell is never linked, so never sent, before its first bytes are in the pool.
  The transmitter then reads one byte per clock, behind the writer.

`rcube_if` latches the reserved address at the cell's first pool write.

### UTOPIA side (`ilf_if`)

This is an 8-bit, cell-level handshake. When `tx_clav` = 1 and some class holds
a cell, `ilf_if` requests a dequeue. It then reads the 53 bytes from the pool
and drives them on `tx_data` in 53 consecutive clocks, with `tx_enb_n` = 0 and
`tx_soc` on the first byte. The first byte comes two clocks after `deq_ack`.
With `tx_clav` held high, a new cell starts every 58 clocks: 53 bytes, then one
clock to raise the next request, two to its acknowledge and two to the first
byte. A 155 Mb/s line needs one cell per 2.89 µs, which is 173 clocks at 60 MHz.

## How this differs from a production buffer, and what is this design's own

* The list algorithm, the push-out rule, the departure by moving the start
  address and the default sizes are those of the original design. The
  following are choices made here:
  * the class encoding (0 = highest);
  * the free list used as a stack (it matches the worked example);
  * the split of arrival into link and allocate requests;
  * the per-field write mask;
  * the state sequence;
  * the sublist head carry-over on departure.
* The crossbar link format (tag bytes, class in tag byte 0) is invented here.
  Only the rate (8 bits at 60 MHz) and the 0.93 µs cell period come from the
  original design.
* Discard rule: when the lowest class present holds only CLP=0 cells, an
  arriving CLP=0 cell of that class is the most recent cell of the class, so it
  is the cell dropped. Older cells are kept. This follows the list procedure.
  A stricter reading would drop the newest *buffered* cell in that case.
* In the original block diagram, crossbar data goes straight into the pool,
  and the pool address comes from the list controller. Here the write side runs
  through `rcube_if`, which adds the 12-clock lag and latches the reserved
  address. The read address comes from `ilf_if`, which latches the dequeued
  address. The list controller still supplies both addresses.
* The cell pool is an external memory in the real switch. Here it is an array
  in `cell_pool`: 2005 x 64 bytes, about 1 Mbit.
* The whole buffer runs on one clock. A real UTOPIA PHY has its own transmit
  clock and needs a clock-domain crossing, which is not provided.
* Status outputs (`cell_in`, `cell_out`, `cell_out_class`, `disc_*`,
  `class_nonempty`) are additions for observation.
* Up to 5 classes are supported by setting `NUM_CLASSES`. The default is 3.
  The list controller is tested at 2, 3 and 5 classes, and the whole buffer at
  3 and 5 classes.
* The synthesised list controller has 213 flip-flop bits. Across all
  blocks the buffer has about 390, most of the rest being the interfaces and
  the 12-stage write delay line. The original design reports 246 registers for
  its controller on a 1990s standard-cell library; the two counts cannot be
  compared directly.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `list_controller_tb` | Several controllers run side by side against a reference model: 2 classes and 4 cells, 3 classes and 12 cells, 5 classes and 10 cells. The model keeps a FIFO of (address, CLP) per class, the start addresses, the free stack and `next_addr`. Checked: every reserved address, push-out (address, class), dequeued address and class, and the latency bounds above. The worked example is replayed exactly. Push-out of CLP=1 cells, of CLP=0 cells and of the arriving cell must each occur. |
| `list_ram_tb` | Masked writes and reads against a model array at full size. |
| `cell_pool_tb` | Cell writes and concurrent reads against a model. |
| `rcube_if_tb` | Pool writes land at the reserved address. Link requests carry the right class and CLP, exactly `WR_LAG+TAG+3` clocks after the first byte. The allocate request comes 55 clocks after it. Cells before `ready` are ignored. Out-of-range classes are clamped. |
| `ilf_if_tb` | Cell order, 53 consecutive bytes with `tx_soc`, byte contents, first byte 2 clocks after `deq_ack`, nothing sent while `tx_clav` = 0 or while empty. |
| `atm_buffer_tb` | The whole buffer at 3 classes and 8 cells, with back-to-back cells. See below. |
| `atm_buffer_5class_tb` | The same at 5 classes and 10 cells. |
| `atm_buffer_full_tb` | The same checks at the default size: 2200 cells arrive back to back with the output held, so 200 are pushed out, then 400 cells of random traffic. |

`abuf_env` holds the stimulus and checks shared by the two whole-buffer
testbenches. It runs in two phases:

* **Filling phase.** Cells arrive while the output is held. The departure order
  must then match the reference model exactly.
* **Random phase.** Gaps between cells and `tx_clav` are random. Every cell
  that leaves must have been sent, must leave only once and must have intact
  bytes. Order within a class must be kept, and cells in must equal cells out
  plus cells pushed out.
* **Output rate.** While the filling phase drains with `tx_clav` held high,
  cells must start no more than 58 clocks apart.

Each testbench also counts the buffer's mechanisms and fails if one never
occurs: push-out of a CLP=1 cell, push-out of a CLP=0 cell, dropping of the
arriving cell, overtaking by a higher class, back-to-back arrival, and cells
held back by `tx_clav`.

## Simulating

With Verilator 5 (the testbenches use timing controls):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/atm_buf_pkg.sv tb/atm_buffer_full_tb.sv --top-module atm_buffer_full_tb
./obj_dir/Vatm_buffer_full_tb
```

Replace `atm_buffer_full_tb` with any other testbench name. The full-size run
takes well under a second.

## Parameters (top)

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_CLASSES` | 3 | service classes, 0 = highest priority |
| `CAPACITY` | 2000 | cells held (one more slot is kept in reserve) |
| `TAG_BYTES` | 3 | tag bytes in front of each cell on the crossbar link |
| `DEPTH`, `ADDR_W`, `CLASS_W` | derived | list words / pool slots, address and class widths |
