# Grammar processing subsystem for real-time continuous speech recognition

A hidden-Markov-model speech recogniser has two halves. A word processor runs
the Viterbi search inside each word model and reports, every 10 ms frame, how
likely it is that each word has just ended (PGO_i). The grammar half decides
how likely each word is to *start* in the next frame (PGI_j), by combining
those word-end probabilities with a language model of which word follows
which. This repository is synthesizable SystemVerilog for that grammar half,
after the two-chip subsystem of Chen, Yu, Rabaey and Brodersen (UC Berkeley):
a 3000-word vocabulary, four Grammar Processors and one Epsilon Processor.

The central trick is to split the bigram language model in two:

* **Likely transitions** are stored explicitly as successor lists and
  evaluated exactly:
  `PGI^G_j(t+1) = max_i PGO_i(t) * c_ij`                      (1)
* **All other transitions** are approximated as `c_ij ~ eps_i * eps_j`, one
  number out of each word and one into each word. Then
  `PGI^eps_j(t+1) = [max_i PGO_i(t) * eps_i] * eps_j`           (2)
  needs a single running maximum per frame, and 2N stored numbers instead
  of N^2.
* The word processor gets `PGI_j = max(PGI^G_j, PGI^eps_j)`      (3)
  together with a backtrace pointer to the predecessor that won.

Four Grammar Processors share the work of (1); the Epsilon Processor does
(2) and (3) and runs the frame.

## Number format

All arithmetic is in the log domain, so products are additions. A
probability `p` is held as a 16-bit unsigned cost, `-log(p)` in fixed point:

| value      | meaning                               |
|------------|---------------------------------------|
| `16'h0000` | probability 1                         |
| larger     | less probable                         |
| `16'hFFFF` | probability 0 ("impossible")          |

"The larger probability" is therefore the smaller number, and a product is a
saturating add in which `FFFF` absorbs (`grammar_pkg::pmul`). The scale of the
fixed-point log is up to whoever compiles the tables; the hardware only adds
and compares. The cost encoding and all widths are choices of this RTL; the
original only says the chips work in the log domain.

| quantity                          | width | type in `grammar_pkg` |
|-----------------------------------|-------|-----------------------|
| probability (PGO, PGI, c_ij, eps) | 16    | `prob_t`              |
| word number                       | 12    | `word_t`              |
| backtrace pointer                 | 16    | `bt_t`                |
| address inside one group          | 10    | `local_t`             |
| successor memory address          | 16    | `succ_addr_t`         |

## Block diagram

```
 PGO from word processor ─┬─► FIFO 0 ─► Epsilon Processor ───────► PGI to word processor
 (every entry into all 5) │             │    │          │
                          │           Ep1   Ep2         │ read + clear "current" bank
                          │                             ▼
                          ├─► FIFO 1 ─► GP 0 ◄─► Succ. Mem 0   ┌───────────────────────┐
                          ├─► FIFO 2 ─► GP 1 ◄─► Succ. Mem 1   │ Word Probability      │
                          ├─► FIFO 3 ─► GP 2 ◄─► Succ. Mem 2   │ Memory: 2 banks x 4   │
                          └─► FIFO 4 ─► GP 3 ◄─► Succ. Mem 3   │ groups; GP g reads    │
                                         │                     │ and writes group g of │
                                         └── read/write ──────►│ the "next" bank       │
                                                               └───────────────────────┘
```

Each Grammar Processor owns one *group* of successor words: word `j` belongs
to group `j mod 4` and sits at address `j / 4` inside it. A processor's
successor lists contain only successors in its own group, so the four
processors never touch the same memory and nothing is duplicated. Every
processor still sees every word that ends.

## One frame

The Word Probability Memory has two banks. During a frame the **next** bank
collects the grammar results for frame t+1 while the **current** bank, filled
in the previous frame, is being read out. `frame_start` swaps them.

1. `frame_start` (accepted while `frame_done` is high) toggles the bank
   select, hands the maximum `max_i PGO_i * eps_i` collected in the last frame
   to the output section, and one cycle later starts the Grammar Processors.
2. **Output (Epsilon Processor, section 2).** For `j = 0 .. 2999` it reads
   `eps_j` (Ep2) and `PGI_j` (current bank), forms `MAX * eps_j`, and sends
   the larger one with its backtrace pointer on `pgi_*`. One word per cycle
   when `pgi_ready` stays high. Each current-bank entry is reset to
   "impossible" as it is read, so the bank is empty when it becomes the next
   bank in the following frame.
3. **Input.** At the same time the word processor pushes the frame's word
   ends `{word i, PGO_i, backtrace pointer}` on `pgo_*`, then one entry with
   `eof` set. Each entry goes into all five FIFOs; `pgo_ready` is low while
   any of them is full.
4. **Grammar Processors** walk the successor list of each word i and update
   their group of the next bank (equation (1)).
5. **Epsilon Processor, section 1** reads `eps_i` (Ep1) for each word and
   keeps the running maximum of `PGO_i * eps_i` and the backtrace pointer of
   the word that set it.
6. `frame_done` rises when all 3000 words are out, section 1 has seen `eof`,
   and all four Grammar Processors have drained.

The PGI values sent in frame t were thus computed from the word ends of frame
t-1, both for the grammar part (bank) and the epsilon part (MAX).

## Grammar Processor

This is the part that sets the throughput: at 5 MHz a 10 ms frame is 50,000
cycles, and each processor has to get through about 50,000 successor arcs in
it. The RTL walks **one arc per cycle, with lists back to back**.

### Successor memory

Two tables per processor:

* **list heads**, indexed by word i: `{has_list, start}`;
* **list entries**: `{last, c_ij, successor address in the group}`.

The entries of one list are sorted by decreasing `c_ij` (increasing cost),
and a list must not name the same successor twice. The head table is this
RTL's way of finding a word's list; the original does not say how that is
done.

### Dynamic threshold

Arcs whose product `PGO_i * c_ij` is far below the best seen so far are not
worth evaluating. The processor keeps `best`, the largest product that has
passed the threshold in this frame, and stops a list at the first entry
whose product is below `best` scaled by the user's `thresh_offset` (in costs:
`sum > best + thresh_offset`). Because the list is sorted, every later entry
would fail too. `best` is reset at each frame start. Setting `thresh_offset`
to `16'hFFFF` disables the cut.

### Pipeline

```
 word fetch:  pop FIFO ─► read list head ─► W (one-entry buffer: next list)

 P1  address generation: issue successor-memory read
       (next entry of the current list, or first entry of W)
 P2  entry arrives; sum = PGO_i + c_ij; if `last`, P1 switches to W now
 P3  threshold compare; survivor: read PGI_j, update best
       cut: squash the P2 arc of the same list, P1 switches to W
 P4  PGI_j arrives (or is bypassed); keep the larger
 P5  write PGI_j and backtrace pointer
```

Points that take a second look:

* **No wasted slot at a list end.** The end flag is seen in P2, the cycle
  after the entry was requested, and in that same cycle the address
  generator issues the first entry of the next list instead of running past
  the end. Word fetch runs ahead so the next list's start address is
  waiting in W. Words with no list in this group are dropped in fetch.
* **One wasted slot at a threshold cut.** A cut is known in P3; the entry
  behind it in P2 is squashed. Each arc carries a 2-bit list tag so the cut
  squashes only arcs of its own list: with lists of length one, up to three
  lists are in flight at once.
* **Bypass.** Inside one list every successor is different, so a read never
  meets a pending write to the same entry. Consecutive lists can, however,
  share a successor. The value being written (P5) and the one written in the
  previous cycle (P6) are forwarded to P4 when their addresses match; the
  memory returns the old word for a read and write to the same address in
  one cycle.
* **Ties.** A product equal to the stored PGI does not replace it (the
  earlier predecessor keeps the backtrace pointer).

Cost per word: `L` cycles for a list of `L` entries that runs to its end,
`m + 2` for a list cut at entry `m` (counted from 0) before its end, and at
most one bubble for a word with no list. The `eof` entry makes the processor
stop fetching; `done` rises when everything has drained.

## Epsilon Processor

Two independent sections and the frame controller.

* **Section 1** pops one FIFO entry per cycle, reads `eps_i` (registered
  read), and the next cycle compares `PGO_i + eps_i` with the running
  minimum cost. A strictly better value replaces it together with the
  word's backtrace pointer.
* **Section 2** is a two-stage pipeline (read Ep2 and bank, then compare and
  register the output) with valid/ready flow control. When the output is
  stalled no new reads are issued and the memories hold their read data.
  In equation (3) a tie goes to the grammar value; if the epsilon value
  wins, the backtrace pointer is the one of the word that set MAX.
* **Control** holds the bank select, issues `gp_start`, and raises
  `frame_done` as described under "One frame".

## Memories

| memory                   | instances | entries       | entry                          | ports                       |
|--------------------------|-----------|---------------|--------------------------------|-----------------------------|
| receiving FIFO           | 5         | 64            | eof, word, PGO, backtrace (45b) | push / pop, fall-through   |
| successor list heads     | 4         | 3000          | has_list, start (17b)          | load write, 1 read          |
| successor list entries   | 4         | 65,536        | last, c_ij, successor (27b)    | load write, 1 read          |
| Ep1, Ep2                 | 2         | 3000          | eps (16b)                      | load write, 1 read          |
| Word Probability Memory  | 2 banks x 4 groups | 750 each | PGI, backtrace (32b)        | 1 read + 1 write per cycle  |

All reads are registered (data the cycle after the read enable, held while
the enable is low), and are modelled as arrays (`sync_ram`) that synthesis
maps to RAM. 65,536 list entries per processor covers the 70 successors per
word that four processors are meant to handle (52,500 entries each). After
reset the probability banks are cleared in 750 cycles, during which
`init_busy` is high; `frame_start` must wait for it. The successor and
epsilon tables are not cleared: every list head and every Ep1/Ep2 entry has
to be loaded before the first frame.

## Top-level interface (`grammar_subsystem`)

| port group | signals | use |
|---|---|---|
| clock, reset | `clk`, `rst_n` (active-low, asynchronous) | |
| status | `init_busy` | banks being cleared after reset |
| frame | `frame_start` in, `frame_done` out | one pulse per frame while `frame_done` is high |
| threshold | `thresh_offset[15:0]` | log-domain offset of the dynamic threshold |
| PGO in | `pgo_valid`, `pgo_ready`, `pgo_data` (`pgo_entry_t`) | the frame's word ends, then one `eof` entry |
| PGI out | `pgi_valid`, `pgi_ready`, `pgi_word`, `pgi_prob`, `pgi_bt` | 3000 words per frame, in word order |
| successor load | `succ_head_we[3:0]`, `succ_head_waddr`, `succ_head_wdata`, `succ_list_we[3:0]`, `succ_list_waddr`, `succ_list_wdata` | one write enable bit per processor |
| epsilon load | `ep1_we`, `ep2_we`, `ep_waddr`, `ep_wdata` | |

Parameters: `N_WORDS` (3000), `N_GP` (4, a power of two, at least 2),
`FIFO_DEPTH` (64, a power of two), `SUCC_DEPTH` (65,536). The field widths
in `grammar_pkg` are fixed; `N_WORDS / N_GP` must fit in 10 bits.
A build with `N_GP = 8` (375 words per group) is simulated by
`tb_eight_processors` and gives the same outputs as the reference model.

## How closely this follows the original

Taken from the published description: equations (1)-(3); the split into
four Grammar Processors each owning a quarter of the successor words; one
receiving FIFO per processor, all fed with every word end; the three fields
of a successor entry and their sorting by decreasing probability; the
two-field probability entry; two banks swapped every frame, the current one
read by the Epsilon Processor and the next one written by the Grammar
Processors; Ep1/Ep2; the two sections of the Epsilon Processor; a dynamic
threshold from a running maximum and a user offset; log-domain arithmetic;
a five-stage pipeline doing one arc per cycle with a read and a write per
cycle; completion when all words are sent and all processors are done.

Choices of this RTL, where the description is silent: the number format and
all widths; the word-to-group interleaving (`j mod 4`); the list-head table;
the `eof` marker that ends a frame's input; the valid/ready handshakes and
the `frame_start` protocol; the stage boundaries, the word prefetch, the
list tags and the bypasses in the Grammar Processor; which products feed the
threshold's running maximum; tie rules; clearing the current bank as it is
read, and clearing both banks after reset; memory depths (FIFO 64, successor
memory 65,536); load ports for the tables.

Not covered: the word processing subsystem (HMM processor, its controller,
word model and backtrace memories) that sits on the other side of the
`pgo_*`/`pgi_*` ports, and the physical chips (2 um CMOS layouts, pads, the
142- and 157-pin packaging). The original splits the logic into a Grammar
Processor chip and an Epsilon Processor chip with external memories; here
the same partition exists as modules, but no pin-level chip boundary is
reproduced.

## Measured behaviour

* A frame in which all 3000 words end and each processor walks 50,000 arcs
  (16 or 17 successors per word and processor, no threshold cuts) finishes
  in 50,008 cycles: about 10 ms at 5 MHz, the original's budget.
* The output of the 3000 PGI words takes 3000 cycles plus 3 and overlaps
  the Grammar Processors' work.
* With 70 successors per word on average (52,500 arcs per processor) and
  no threshold cuts the same frame takes 52,508 cycles, 5% over a 10 ms
  frame at 5 MHz. Real time then depends on the threshold cutting at least
  5% of the arcs.

## Files

| file | contents |
|---|---|
| `rtl/grammar_pkg.sv` | types, widths, `pmul`, `pge` |
| `rtl/sync_ram.sv` | 1-read 1-write RAM with registered read |
| `rtl/pgo_fifo.sv` | receiving FIFO |
| `rtl/successor_memory.sv` | list heads and list entries of one processor |
| `rtl/epsilon_memory.sv` | Ep1 or Ep2 |
| `rtl/word_prob_memory.sv` | two banks x N_GP groups, bank swap, clear |
| `rtl/grammar_processor.sv` | equation (1), threshold, pipeline |
| `rtl/epsilon_processor.sv` | equations (2), (3), frame control |
| `rtl/grammar_subsystem.sv` | top level |
| `tb/tb_<block>.sv` | self-checking testbench per block |
| `tb/tb_grammar_subsystem.sv` | end-to-end, full size, four frames |
| `tb/tb_frame_workload.sv` | full-load frames: 4 x 50,000 and 4 x 52,500 arcs, timing |
| `tb/tb_eight_processors.sv` | the top built with eight Grammar Processors, three frames |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`; each has a watchdog. They compute expected values with their own
sequential reference models (no shared code with the RTL apart from the
types in `grammar_pkg` and the compare helper `pge`). With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
  rtl/grammar_pkg.sv tb/tb_grammar_subsystem.sv --top-module tb_grammar_subsystem
./obj_dir/Vtb_grammar_subsystem +verilator+rand+reset+2
```

Replace the testbench name for any other one. The full-size tests load
about 60,000 (end-to-end) or 2 x 200,000 (workload) table entries through the
load ports and run in seconds. The end-to-end test checks all 3000 outputs
of every frame against the reference, and also counts that each mechanism
happened: threshold cuts (matching the reference count), list ends, words
without successors, FIFO back-pressure, output stalls, bank swaps, bypasses,
and both the grammar and the epsilon value winning.

The testbenches use hierarchical references into the Grammar Processor
(`cut_stop`, `fwd5`, `fwd6`, `p4`) to count events; renaming those signals
needs the testbenches updated too.
