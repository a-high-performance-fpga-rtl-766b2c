# FACE: a merge-tree sorting accelerator with base+delta compression

This is synthesizable SystemVerilog for a hardware sorter of 32-bit unsigned
integers. Its target is data sets far larger than on-chip memory, held in an
external DRAM. The sorter works in two steps:

1. A 16-input **sorting network** turns the incoming stream into sorted runs
   of 16 elements.
2. A **k-way merge sorter tree** merges k runs at a time, emitting four
   elements per clock, and repeats this pass over memory until one sorted run
   remains.

Each pass over memory reads and writes the whole data set. The memory
bandwidth therefore limits the sorter. Sorted data has small differences
between neighbours, so every 512-bit word that goes to memory is compressed
with a **base+delta code**. Two such words then fit into one memory word.

The main configuration is a 16-way tree with compression. The tree width,
the buffer depths and compression on or off are parameters.

## Sorting in Phases and Iterations

Terms used throughout the code:

| term | meaning |
|---|---|
| element | 32-bit unsigned integer; the order is ascending |
| beat | 128 bits = 4 elements; the width of the tree datapath |
| word | 512 bits = 16 elements; the width of the memory and of the sorting network |
| Unit | a sorted run. In Phase p a Unit holds E_p = 16·k^(p-1) elements |
| Iteration | one merge of k Units (one per way) into a Unit of E_{p+1} = k·E_p elements |
| Phase | one pass over all N elements |

A sort of N = 16·k^P elements takes P Phases. The host gives P (`cfg_phases`),
not N.

- **Phase 1.** The host streams the data in. Every 16 elements are sorted by
  the network, which gives Units of 16. The Units are dealt round-robin to the
  k Input Buffers. The tree then runs N/(16k) Iterations, and each Iteration
  produces a Unit of 16k elements.
- **Phases 2 to P−1.** Each way reads its own region of memory, and the tree
  merges again. The Units grow by a factor k in every Phase.
- **Phase P.** The tree output is the final sorted sequence. It goes through
  the Result Buffer to the host instead of to memory.

Example: with k = 4 and N = 256 (elements 256 down to 1), Phase 1 turns 16
Units of 16 into 4 Units of 64 in four Iterations. Phase 2 merges those 4
into one Unit in a single Iteration. `tb/tb_face_fig7.sv` runs exactly this
case.

## Keeping Units apart: maximum-value insertion and the Iteration reset

A merge tree that is fed back to back with Units has a problem. Once one way
has sent all of its current Unit, the next Unit of that way must not take
part in the current merge. Otherwise elements of two Iterations mix. Two
mechanisms prevent this.

- **Maximum-value insertion (`input_buffer`).** Each Input Buffer counts the
  elements it has sent in this Iteration. After E_p elements it stops
  reading its FIFO and feeds the tree 0xFFFFFFFF instead. That value can
  never win a comparison against valid data, so the other ways drain first.
  The buffer keeps its next Unit waiting in the FIFO.
- **Iteration reset (`iter_ctrl`).** A counter at the tree root counts the
  elements that come out. It forwards the first E_{p+1} of them and drops the
  maximum-value fill that follows. When E_{p+1} elements have passed and
  every Input Buffer has sent its Unit, it pulses `iter_clear`. That pulse
  empties every FIFO inside the tree and resets the Input Buffer counters.
  The next Iteration then starts from a clean tree.

The reset waits for the Input Buffers as well as the count. This makes data
that contains 0xFFFFFFFF itself sort correctly: such elements can leave the
root before a way has finished its Unit.

The counter also marks the last element of each memory region (every N/k
elements) and signals the end of the Phase after N elements.

## The sorter cell and the merge tree

`sorter_cell` merges two sorted beat streams into one and emits 4 elements
per beat. It works in three steps:

1. **Select.** It compares the smallest element at the head of input A with
   the smallest at the head of input B. It takes the whole beat whose head is
   smaller into a small internal FIFO.
2. **Merge.** An 8-input bitonic merger combines that beat with the 4 largest
   elements kept from the previous step. The merger is 3 compare-exchange
   levels deep.
3. **Output.** The 4 smallest results go to the output FIFO. The 4 largest
   go back into the feedback register.

Every element still waiting in either input is at least as large as the 4
elements emitted. The first beat after a reset only loads the feedback
register. A beat moves only when both inputs hold a beat and the output FIFO
has room, so back-pressure travels up the tree.

`merge_tree` builds a perfect binary tree of k−1 cells in heap numbering. It
has a short FIFO (`TREE_DEPTH` beats) on every leaf and on every cell output.
One beat takes three cycles to cross a cell. The first beat of an Iteration
therefore leaves the root 3·log2(k)+1 cycles after the leaves have data:
13 cycles at k = 16. `tb_merge_tree` checks this latency.

`sort_net` is Batcher's odd–even merge sort for 16 inputs: 63
compare-exchange elements in 10 stages, with a register after every stage.
It has a latency of 10 cycles and accepts one word per cycle. The whole
pipeline holds when its output is not taken.

## Compressed words

`bd_compress` looks at one sorted word V0 ≤ V1 ≤ … ≤ V15. It keeps V0 as the
base and computes the 15 neighbour differences Δi = Vi − V(i−1). If every Δi
is at most 0x1FFF, the word fits in 32 + 15·13 = 227 bits. `compressor`
holds one compressible word. If the next word is also compressible, it
emits both together in one 512-bit word:

| bits | content |
|---|---|
| [31:0] | base of the first word |
| [226:32] | 13-bit deltas of the first word; Δi at 32+13·(i−1) |
| [453:227] | second word, same layout |
| [478:454] | zero |
| [511:479] | flag = 33'h1 (bits 511..480 zero, bit 479 one) |

A plain sorted word can never carry this flag. Its top element V15 is in bits
[511:480], and V15 is the largest element of the word. If those bits are
zero, the whole word is zero, so bit 479 (the top bit of V14) is zero too.

A word that cannot be compressed goes out unchanged. If a compressible word
is being held, the held word goes out first. The compressor never holds the
last word of a memory region, so a packed word never spans two regions.

`decompressor` reads memory words, checks the flag and splits a packed word
into its two halves. `bd_decompress` rebuilds each half by a running sum with
one addition per pipeline stage (15 stages). Raw words travel through the
same stages unchanged, so the word order stays as it was. Each output word
carries the way it belongs to, and `out_end` marks the last word made from
one stored word.

With `ENABLE_COMP = 0` both blocks are left out and words are stored as they
are.

## External memory: regions, Throttling and end pointers

The memory has two areas of N/16 words each, at word addresses 0 and N/16.
Odd Phases write area 0 and read area 1; even Phases do the opposite. Each
area has k regions of N/(16k) words. Region j of the Write Area receives
output elements j·N/k to (j+1)·N/k−1, and in the next Phase it becomes the
data of way j.

Because of compression, a region holds anything between N/(32k) and N/(16k)
words. `dram_writer` therefore records the number of words each region used
(`end_ptr`). The reader of the next Phase uses it as that way's length.

Writes go out in bursts ("grains") of `GRAIN` words. A fixed grain near the
end of a region could spill past the region end. **Throttling** prevents
this. Once fewer than GRAIN·32 elements of the region remain, the grain
shrinks to ⌊remaining/32⌋ words, and never below one word. A burst then
never carries more elements than the region still needs. A burst starts only
when the Output Buffer holds a whole grain.

`dram_reader` serves the ways round-robin in bursts of `RD_GRAIN` words. It
reads each region from its head up to its end pointer. It keeps a credit
count per way so that the Input Buffer can take every requested word even if
all of them are packed. It reserves 2 entries per requested word and returns
2 when the decompressor finishes that word.

## Top-level interface and timing (`face_top`)

| port | direction | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock and asynchronous active-low reset |
| `start`, `cfg_phases[7:0]` | in | start sorting N = 16·WAYS^cfg_phases elements |
| `busy`, `done`, `cur_phase[7:0]` | out | status; `done` rises after the last result beat has left |
| `h_in_valid/ready/data[127:0]` | in/out/in | host input, 4 elements per beat, Phase 1 only |
| `h_out_valid/ready/data[127:0]` | out/in/out | sorted output, ascending, lowest element in bits [31:0] |
| `mem_wr_valid/ready/addr/data[511:0]/last` | out/in/out/out/out | word writes; `last` ends a burst |
| `mem_rd_valid/ready/addr/tag` | out/in/out/out | word read requests, tagged with the way |
| `mem_rsp_valid/ready/data/tag` | in/out/in/in | read data, in request order, with the tag returned |

Every stream is a valid/ready handshake: a transfer happens on a rising edge
where both are high. Addresses count 512-bit words. The memory may take any
number of cycles to answer, but it must answer in request order.

Cycle cost: a Phase takes about N/4 cycles (4 elements per cycle), plus
3·log2(k)+1 cycles for each Iteration, plus a fixed start-up cost. The
testbenches hold every Phase between N/4 and N/4 + I·(3·log2k+1) + 40k
cycles, where I is the number of Iterations.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `WAYS` | 16 | tree width k (power of two; 4, 8 and 16 are the evaluated sizes) |
| `IB_DEPTH` | 32 | Input Buffer FIFO, words (at least 2·RD_GRAIN) |
| `TREE_DEPTH` | 4 | FIFOs inside the tree, beats |
| `OB_DEPTH` | 64 | Output Buffer, words (at least GRAIN) |
| `RB_DEPTH` | 64 | Result Buffer, beats |
| `DEC_DEPTH` | 16 | decompressor input FIFO, words |
| `GRAIN` / `RD_GRAIN` | 16 / 8 | write and read burst lengths, words |
| `ENABLE_COMP` | 1 | build the compressor and decompressor |
| `ADDR_W`, `CNT_W` | 32 | address and element-counter widths |

The sorting network size (16), the tree rate (4 elements per cycle) and the
compressed format are fixed in `face_pkg`. At the defaults, 32-bit counters
and addresses cover the largest evaluated size, 256M elements. That size
needs 6 Phases at 16 ways, 8 at 8 ways and 12 at 4 ways, and 2 GiB of memory
for the two areas.

## Source files

- **`rtl/`**: one module or package per file.
  - `face_pkg`: types and constants.
  - `sync_fifo`: every buffer.
  - `sort_net`, `pack_512`, `unpack_512`, `input_buffer`, `sorter_cell`,
    `merge_tree`, `iter_ctrl`: the sorting path.
  - `bd_compress`, `compressor`, `bd_decompress`, `decompressor`: the
    compression path.
  - `dram_writer`, `dram_reader`: the memory side.
  - `face_top`: the top level.
- **`tb/`**:
  - one self-checking testbench `tb_<module>` per module;
  - `face_harness`: drives `face_top` with a host model and `mem_model`, a
    memory with configurable latency and random stalls. It checks the output
    against a software sort, counts how often each mechanism happens and
    checks the Phase cycle counts;
  - `tb_face_top`: three 4-way runs. They use up to 4 Phases, xorshift,
    sorted, reverse and narrow-range random data, memory and host stalls,
    and compression both on and off;
  - `tb_face_full`: the top at its default parameters, 16 ways and 65536
    elements;
  - `tb_face_fig7`: the 256-element example;
  - `tb_face_workloads`: the evaluated tree sizes at simulation size. It
    builds 4, 8 and 16 ways, each with and without compression, and sorts
    random, in-order and reverse-order data.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a cycle
watchdog.

To simulate with Verilator 5, run this from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/face_pkg.sv tb/tb_face_top.sv --top-module tb_face_top -o sim
./obj_dir/sim
```

Substitute any other testbench name. `tb_face_full` takes a few seconds,
and the rest take less.

## Where this design departs from the original description

- **One tree only.** The two-tree variants (two merge trees sharing the
  buffers and the memory port) are not built.
- **Host and memory ports are plain valid/ready streams.** The PCIe DMA
  engine and the DDR3 controller are not included. Splitting the memory into
  regions, the end pointers and Throttling live in `dram_writer` and
  `dram_reader`, on this side of the memory port.
- **Where the Iteration counter sits.** The original places the element
  counter in the Output Buffer. Here it sits at the tree root, ahead of the
  compressor, because a compressed word no longer holds a fixed number of
  elements. The Iteration reset also waits until every Input Buffer has sent
  its Unit.
- **Layout of the Input Buffer.** The maximum-value multiplexer and the
  counter come after the 512→128 shift register. They therefore insert
  whole beats of 0xFFFFFFFF.
- **Raw words in the decompressor.** They pass through the decompressor
  pipeline instead of a bypass, to keep their order.
- **Throttling rule.** The Threshold is counted in elements, not as an
  address, and the grain-shrinking rule is this design's own.
- **Choices the original leaves open.** These include the bit positions
  inside the 227-bit compressed half, the flag taken as 32 zero bits above a
  one bit, the burst sizes, all FIFO depths, the memory layout, how Phase-1
  Units are dealt to the ways, the reader's credit scheme and the reset
  style.
- **Largest run simulated.** The full sort at default parameters runs in
  `tb_face_full` at N = 65536, in 3 Phases. Each Phase stays within the
  cycle model: Phase 1 takes 20048 cycles against a bound of 20352.
  A 4-Phase run at N = 1,048,576 with random data also sorted correctly. There, Phase 1 took
  319568 cycles, 1.1% over the model's 316032. In Phase 1 the host delivers
  exactly the tree's 4 elements per cycle. Once the Input Buffers are full,
  the gap at each Iteration reset stalls the host and can no longer be
  absorbed. The later Phases stayed within the model.
