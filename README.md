# Instruction-bus transformation decoder

Fetching instructions drives the instruction-memory data bus every cycle, and
the energy spent there is proportional to the number of bit transitions on its
lines. Hot loops are known before the program runs, so their code can be stored
in a form that toggles far less, as long as the processor can undo the change
for free. This RTL is the fetch-side half of such a scheme. Each bus line is
treated as an independent bit stream. The stream is cut into short blocks, and
every block is stored as a low-transition code word. A single two-input gate
per line restores the original bit from the received bit and one bit of
history. The gate of each line is chosen per block from eight functions by a
3-bit index held in a small, reprogrammable table. On random code, block size 5
removes about half of all bus transitions. The restore logic adds one
multiplexer and one gate to the fetch path, and no cycle.

## The transformation

For one bus line let `x` be the original bit stream and `e` the stream stored in
memory. The decoder computes

    x[n] = tau(e[n], h)

where `h` is a one-bit history (see below) and `tau` is one of eight two-input
functions:

| index | name      | `tau(e, h)`     |
|-------|-----------|-----------------|
| 0     | identity  | `e`             |
| 1     | inversion | `~e`            |
| 2     | XOR       | `e ^ h`         |
| 3     | XNOR      | `~(e ^ h)`      |
| 4     | NOR       | `~(e \| h)`     |
| 5     | NAND      | `~(e & h)`      |
| 6     | not-h     | `~h`            |
| 7     | h         | `h`             |

Why eight functions are enough: take a block of `k` bits whose first bit is
stored unchanged. Try every code word and every one of the sixteen two-input
functions, and keep the code word with the fewest transitions. For every
`k <= 7`, the best code words use only functions from this set. Summed over all
`2^k` words of a block size:

| block size k           | 2   | 3  | 4    | 5  | 6    | 7    |
|------------------------|-----|----|------|----|------|------|
| transitions, original  | 2   | 8  | 24   | 64 | 160  | 384  |
| transitions, encoded   | 0   | 2  | 10   | 32 | 90   | 236  |
| reduction, %           | 100 | 75 | 58.3 | 50 | 43.8 | 38.5 |

`tau_gate_tb` recomputes this table through the gate. One example: the word
`0,1,0` (first bit first) is stored as `0,0,0` with `tau = ~h`. The history
runs 0, 1, 0 and the stored bits never toggle. The identity function means a
block is never worse than the original code. The code numbering above is this
design's choice. Identity is 0, so an all-zero table entry leaves code
untouched. Function 7 (`h`) only fills the eighth code; an optimal encoding
never needs it.

### Blocks, overlap and the history bit

The decoder works on *basic blocks* (straight-line code between branches),
because the encoder cannot know which way a branch goes. Within one basic block
of `n` instructions, each line is encoded as follows:

* Instruction 0 is stored unencoded.
* The rest is cut into blocks of `BLOCK_SIZE` bits that overlap their
  neighbour by one bit. Each block therefore adds `BLOCK_SIZE - 1` new
  instructions. Overlapping closes the gap between blocks: with disjoint
  blocks, the transition between them could not be removed.
* One Transformation Table (TT) entry holds the 24 indices for one block. The
  first entry of a basic block covers `BLOCK_SIZE` instructions (the
  unencoded first one plus `BLOCK_SIZE - 1`). Every later entry covers
  `BLOCK_SIZE - 1`. The last entry may be shorter.
* History `h`: the first instruction under each later entry uses the previous
  *encoded* bit (the overlapped bit, whose stored value the previous block has
  already fixed). Every other instruction uses the previous *restored* bit.

The encoder works left to right. For every line and block it tries all eight
functions and all code words, with the first bit pinned to the stored value of
the overlapped bit. It keeps the code with the fewest transitions, counting the
one from the overlapped bit. This greedy pass reduces random streams of 1000
bits at block size 5 by 50.0 ± 0.7 %.

## Hardware

```
  cfg bus ──► cfg_port ──┬──► tt_table (16 x 81 bits) ──┐ entry
                         ├──► bbit (10 x {PC, TT idx}) ─┤ hit / TT idx
                         └──► enable                    ▼
  fetch_pc, fetch_data ──────────────────────────► restore_ctrl ──► instr
                                                   (24 x tau_gate)
```

* **`tau_gate`** is one line's restoring gate, a pure combinational cell.
* **`tt_table`**, the Transformation Table, holds one entry per block. An entry
  has 24 three-bit indices (line `i` at bits `[3i+2:3i]`), an **End** bit E at
  bit 72 and an 8-bit **CT** count at bits `[80:73]`. E marks the last entry of
  a basic block. CT is the number of instructions fetched under that last
  entry, and is read only when E is set. A basic block's entries are
  consecutive. The table is a register array with an asynchronous read.
* **`bbit`**, the Basic Block Identification Table, has one entry per encoded
  basic block: its start PC, the index of its first TT entry and a valid bit.
  All valid entries are compared with the fetch PC in parallel. An assertion
  flags a PC stored twice.
* **`restore_ctrl`** is the sequencer. When it is idle, it looks up each fetched
  PC in the BBIT.
  * A miss passes the word unchanged. This covers code outside the loop,
    called functions, or a loop that is not encoded.
  * A hit passes the word unchanged too (it is the unencoded first
    instruction). It also loads the indexed TT entry into a register and loads
    a down counter with `BLOCK_SIZE`, or with `CT` when E is set.
  * Each later fetch is restored through the gates and decrements the counter.
    When the counter runs out, the next TT entry is loaded with a count of
    `BLOCK_SIZE - 1` (or `CT`). After an End entry the basic block is over, and
    the next fetch is looked up again.
  * Registers hold the previous restored word and the previous encoded word for
    the history mux.
* **`cfg_port`** is the memory-mapped write port used by the program loader or
  by a few stores before the loop is entered.
* **`imt_fetch_decoder`** is the top level that wires these together.

### Rarely executed and very short basic blocks

A basic block that is not worth encoding gets one TT entry: all indices 0
(identity), E set and CT equal to its length. Its code is stored unchanged. A
one-instruction basic block is a single entry with E set and CT = 1. A CT of 0
is treated as 1.

### Timing

`instr` is combinational from `fetch_data`. The path per line is the history
mux and the tau gate, and all their selects come from registers. Table reads
start from registered indices or from the fetch PC, and their results are
registered for the next fetch. So the decoder adds no pipeline stage and never
stalls. `fetch_valid` low is a bubble: nothing advances.

## Configuration

12-bit word addresses and 32-bit data. One write per cycle, always accepted.

| address                        | content                                           |
|--------------------------------|---------------------------------------------------|
| `0x000`                        | bit 0: decoding enable (reset: off)               |
| `0x100 + 4*entry + word`       | TT entry, 32-bit word 0..2 of the 81-bit entry     |
| `0x200 + 2*entry + 0`          | BBIT entry: start PC                               |
| `0x200 + 2*entry + 1`          | BBIT entry: bit 31 valid, low bits first TT index  |

A write to any other address sets `cfg_bad_addr` for one cycle. The tables
should be written while decoding is disabled, or while the processor runs
outside the loop they describe. Clearing the enable bit returns the sequencer to
idle at once, and the bus then passes unchanged.

## Parameters of `imt_fetch_decoder`

| parameter      | default | meaning                                                                  |
|----------------|---------|--------------------------------------------------------------------------|
| `DATA_WIDTH`   | 24      | bus lines, one 3-bit index each                                          |
| `BLOCK_SIZE`   | 5       | bits per block (4 to 7 are the useful range; 5 and 6 are the recommended ones) |
| `TT_ENTRIES`   | 16      | Transformation Table entries (up to 64 with this address map)            |
| `BBIT_ENTRIES` | 10      | encoded basic blocks per loop                                            |
| `CT_WIDTH`     | 8       | width of the CT field                                                    |
| `PC_WIDTH`     | 32      | fetch PC width                                                           |

Capacity at the defaults: an encoded basic block of `n > 1` instructions needs
`ceil((n-1)/4)` entries. 16 entries hold at most 65 instructions of one basic
block, and fewer when they are spread over several blocks. Blocks left
unencoded cost one entry each.

## Where this RTL departs from, or adds to, the described scheme

* **Bus width 24.** A TT entry is described with 24 transformation fields, so
  24 lines are the default. A 32-bit instruction set needs
  `DATA_WIDTH = 32`. The entry then has 105 bits in four configuration words,
  and the address map leaves room for them.
* **Chosen here, not in the description:** the entry bit layout, the index
  codes, the eighth function, CT semantics and width, how the BBIT lookup works
  (associative, with valid bits), a register array with asynchronous read in
  place of a small SRAM, the configuration bus and address map, the
  enable bit, reset values and TT index wrap-around.
* **Capacity.** Because blocks overlap, a TT entry covers `BLOCK_SIZE - 1` new
  instructions, not `BLOCK_SIZE`. Sixteen entries at block size 7 hold 97
  instructions of one basic block, not 112.
* **Block size 7.** An exhaustive search over all sixteen functions gives 236
  encoded transitions (38.5 %). The published figure for this size, 234
  (39.1 %), could not be reproduced, and the testbench checks 236.
* **BBIT lookups.** Inside an encoded basic block the BBIT is not consulted.
  While the sequencer is idle, however, every fetch is looked up, because the
  decoder cannot tell where unencoded basic blocks begin. A call inside the
  loop ends a basic block. Decoding resumes after the call only if the return
  address starts a BBIT entry. Otherwise the rest of that basic block must be
  stored unencoded.
* **Not handled:** an interrupt, exception or pipeline flush inside an encoded
  basic block. The design assumes an in-order core whose fetched stream is its
  executed stream. After such an event the sequencer must be put back to idle,
  for example by clearing and setting the enable bit. The encoder itself is
  offline software. A reference version lives in the testbench package
  `tb/imt_enc_pkg.sv`.

## Verification

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`.

| testbench              | what it shows                                                                       |
|------------------------|-------------------------------------------------------------------------------------|
| `tau_gate_tb`          | all 32 gate cases; the worked mapping examples for 3- and 5-bit words; recomputes the reduction table above |
| `tt_table_tb`          | word writes, read-back, reset, ignored out-of-range words                           |
| `bbit_tb`              | hits, misses, valid bit, reset                                                       |
| `cfg_port_tb`          | address decoding, enable register, bad-address flag                                  |
| `restore_ctrl_tb`      | a B1 → B2/B3 → B4 loop plus one-instruction and unencoded blocks, random bubbles, BBIT misses, disable mid-block; counts of every event |
| `imt_fetch_decoder_tb` | whole decoder at default size: two loops loaded over the bus, enable switches, bad address; every mechanism must occur; measured about 54 % fewer bus transitions |
| `random_stream_tb`     | 24 lines of 1000 random bits in one basic block (256-entry table); reduction must be within 1 point of 50 % |
| `block_size_tb`        | block sizes 4 to 7 on the same code; reduction must fall as the block grows          |
| `mmul_loop_tb`         | a 100x100 integer matrix-multiply loop nest in MIPS32 machine code, 32-bit decoder, ten output elements (9100 fetches): 30.9 % fewer bus transitions, must be at least 25 % |

Each restored word is compared with the original in the same cycle it is
fetched, which also checks the zero-latency claim. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/imt_pkg.sv tb/imt_enc_pkg.sv tb/imt_fetch_decoder_tb.sv \
    --top-module imt_fetch_decoder_tb -o sim
./obj_dir/sim
```

Replace the testbench file and top module name to run the others.
`random_stream_tb`, `block_size_tb` and `mmul_loop_tb` need the same two packages.
