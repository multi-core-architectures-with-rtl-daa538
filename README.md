# Two-step sorting network with AXI4-Stream ports

This core sorts a packet of N unsigned words in two clock cycles, whatever N is. A
host streams the words in, usually through a DMA engine. The core returns them in
ascending order on a second stream.

A conventional sorting network needs O(log² N) or O(N) compare-and-swap stages.
This core does something else:

1. It compares every pair of words at the same time, using N(N-1)/2 comparators.
2. For each word it counts how many other words sort above it. That count is the
   word's final position, its *rank*.
3. It moves each word straight to its rank.

The time is constant and the area grows as N². At the default size of 8 words of
32 bits that means 28 comparators of 32 bits. At 64 words it would be 2016.

The core was built as an accelerator in the programmable logic of a Zynq UltraScale+
device. There it sits between a Xilinx AXI DMA and the ARM processing system. This
RTL contains the accelerator only. The DMA, the processor and the memory are outside
it.

## The sorting network

```
            words[0..N-1]
                 |
     +-----------+-------------------------+
     v                                     |
 edge_computer  --binary vector-->  rank_computer  --ranks-->  data_router --> sorted[0..N-1]
 (N(N-1)/2 "<",                     (count ones,               (word i to place
  combinational)                     registered)                 rank[i], registered)
```

### Edge matrix and binary vector

Take the N×N *edge matrix* E, where E(i,j) = 1 when `words[i] < words[j]`. In other
words, word j sorts above word i. Its diagonal is meaningless. Its lower triangle is
the inverse of the upper one, except for equal words (see below). So only the upper
triangle is built, with one comparator per pair i < j.

The upper triangle is packed into the **binary vector**. It is read column by column,
left to right, and top to bottom within each column. Pair (i,j) goes to bit
`j(j-1)/2 + i`:

| bit  | 0     | 1     | 2     | 3     | 4     | 5     | 6     | ... |
|------|-------|-------|-------|-------|-------|-------|-------|-----|
| pair | (0,1) | (0,2) | (1,2) | (0,3) | (1,3) | (2,3) | (0,4) | ... |

`sort_pkg::pair_index` computes this position. The edge computer and the rank
computer both use it.

### Rank

The rank of word i is the number of ones in row i of the full matrix:

* for j > i the stored bit E(i,j) is counted as it is;
* for j < i the stored bit E(j,i) is counted inverted.

The inverted bit means "word j is not below word i", so for j < i it also counts
ties. Take two equal words. The later one counts the earlier one as above itself, but
the earlier one does not count the later one. The ranks are therefore always a
permutation of 0..N-1, even with repeated values, and no two words collide in the
router. Rank 0 is the largest word.

### Routing

The data router writes word i into place `rank[i]`. Each output place is an N-way
selection on `rank == place`. Its register holds the sorted array in descending
order: `sorted[0]` is the largest.

### Worked example (N = 4)

| input word     | 02 | 07 | 00 | 04 |
|----------------|----|----|----|----|
| row of E       | 0101 | 0000 | 1101 | 0100 |
| rank           | 2  | 0  | 3  | 1  |

The binary vector is `101001`, with bit 5 on the left. The router output is
`07, 04, 02, 00`. The testbenches of the edge computer, the rank computer and the
network replay this example.

### Two-cycle timing and why the input must hold still

* **Cycle 1.** The edge computer is combinational, and the rank computer registers the
  ranks of the words present during that cycle.
* **Cycle 2.** The router registers the words routed by those ranks.

The router takes the words *live*, together with the ranks computed one cycle
earlier. So `sorted` is only the sort of `words` when `words` has been stable for two
edges. After a single edge it holds the new words placed by the old ranks.
`tb_two_step_sorting_network` checks both the intermediate array and the final one.
Inside the IP core this never matters, because the input buffer is frozen from the end
of reception until the sorted packet has left.

## The IP core: `two_step_sorting_ip`

```
 s_axis --> axis_receiver --wr--> input_fifo_buffer --words--> two_step_sorting_network
               |  ^                                                    |
   NEW_DATA_READY |DATA_TRANSMITTED                               sorted (router register)
               v  |                                                    v
 m_axis <-- axis_sender --read_pointer--> data_output_buffer <---------+
```

### Input buffer

The input buffer is an N-word shift register. Each accepted beat enters place 0 and
pushes the older words up one place. After a full packet, place 0 holds the last word
and place N-1 the first. All places feed the sorting network in parallel. The receiver
holds the buffer clear (all zero) while it waits for a packet. The buffer gives two
flags: `full` (N words) and `last_free` (N-1 words).

### Receiver (slave side)

| state      | TREADY | NEW_DATA_READY | leaves when |
|------------|--------|----------------|-------------|
| IDLE       | 0 | 0 | TVALID = 1 and DATA_TRANSMITTED = 0 → WRITE_FIFO |
| WRITE_FIFO | 1 | 0 | a beat is taken with TLAST, or it fills the last free place → PROCESSING |
| PROCESSING | 0 | 1 | DATA_TRANSMITTED = 1 → IDLE |

In IDLE the buffer is held clear. TREADY and NEW_DATA_READY are registered. The beat
that ends the packet drops TREADY in the same edge that writes it, so no extra beat is
ever taken. While the receiver is in PROCESSING, the next packet waits at the slave
port.

### Sender (master side)

| state         | outputs | leaves when |
|---------------|---------|-------------|
| IDLE          | – | NEW_DATA_READY = 1 → READY_TO_SEND |
| READY_TO_SEND | – | always, after one cycle → SEND_STREAM |
| SEND_STREAM   | TVALID = 1, TDATA = buffer[read_pointer], TLAST at pointer N-1 | last beat taken → DONE |
| DONE          | DATA_TRANSMITTED = 1 | NEW_DATA_READY = 0 → IDLE |

The IDLE and READY_TO_SEND cycles give the sorting network its two cycles. The
pointer advances only on taken beats, so TVALID, TDATA and TLAST hold still under
back-pressure.

### The four-phase exchange between receiver and sender

```
NEW_DATA_READY    ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______
DATA_TRANSMITTED  ___________________/‾‾‾‾‾‾‾‾‾\___
                     ^ packet in      ^ packet out
```

The receiver returns to IDLE, and clears the buffer, only after the sender has sent
everything. It starts a new packet only once DATA_TRANSMITTED has fallen again. This
stops a fresh packet from overwriting the buffer before the sender has seen the end of
the old one.

### Output buffer and output order

The storage behind the output buffer is the data router's register. A separate
register would add a third cycle. `data_output_buffer` is the read port: pointer p
returns place N-1-p. The packet therefore leaves **smallest first**, even though the
router holds it largest first.

### Packet lengths

* **N words ending with TLAST.** This is the normal case.
* **Shorter packets, ending with TLAST.** The empty places stay zero and are sorted
  with the data. The reply is always N words, so the zero padding comes out first.
* **N words without TLAST.** The packet ends on the full buffer. A longer stream is cut
  after N words, and the rest is taken as the next packet.

### Cycle budget

These counts hold with TVALID and TREADY held high by the environment. They are
checked in the testbenches at every simulated size.

| phase   | cycles | note |
|---------|--------|------|
| receive | N + 1  | TREADY rises one cycle after TVALID, then one word per cycle |
| sort    | 2      | from the edge that takes the last word to the first TVALID on the master side |
| send    | N      | one word per cycle |

At 100 MHz and N = 8 this is 90 ns in, 20 ns sorting and 80 ns out. In a real
system, the driver and operating-system overhead around each DMA transfer is far
larger than this.

## Parameters and cost

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 8  | words per packet (≥ 2) |
| `W` | 32 | bits per word; also the TDATA width (one word per beat) |

Both defaults live in `sort_pkg` (`DEFAULT_N`, `DEFAULT_W`). The original
implementation was measured at 8 words of 8, 16, 32 and 64 bits, and at 8, 16, 32 and
64 words of 32 bits. `tb_workloads` runs all seven sizes.

The cost follows from the structure:

* comparators: N(N-1)/2 of W bits;
* rank adders: N, each summing N-1 bits;
* router: N × N W-bit selections;
* registers: N·W in the input buffer, N·W in the router, N·clog2(N) for the ranks.

At the defaults, a generic synthesis gives 553 flip-flop bits and 28 comparators. The
quadratic terms dominate quickly. On FPGAs, 64 words of 32 bits needs more LUTs than a
mid-size device offers.

## How this implementation reads the original design

These are the places where the original description was silent or inconsistent, and
what was chosen:

* **Direction of the comparison.** One definition of the edge matrix says "1 when
  input(i) ≥ input(j)". The worked example, the simulation values and the
  less-than comparators of the original all need `words[i] < words[j]`, and that is
  what is built.
* **Ties.** The counting rule above gives distinct ranks to equal words. Without it,
  repeated values would collide in the router.
* **Output order.** The router is descending, as described. The stream order is
  ascending, because the original core's results read back from memory were ascending.
* **Receiver start condition.** The text speaks of a rising edge of TVALID, and the
  state diagram of TVALID = 1. The level is used. An AXI4-Stream master may hold
  TVALID high across packets, so edge detection could miss a packet.
* **End of packet on a full buffer.** This is detected as "last free place taken",
  so the receiver stops in the same edge that writes the N-th word.
* **Rank width.** The original carries each rank as a 31-bit integer. Here a rank is
  `clog2(N)` bits.
* **Reset.** Synchronous and active low (`aresetn` at the top, `rst_n` in the blocks).
  Whether the original reset was synchronous is not known.
* **Comparison.** Unsigned.
* **TDATA width.** Equal to W. The original DMA was configured with a 64-bit stream
  for 32-bit items; that packing is not modelled.

## Files

| file | contents |
|------|----------|
| `rtl/sort_pkg.sv` | defaults, FSM state types, `pair_index` |
| `rtl/edge_computer.sv` | pairwise comparators → binary vector |
| `rtl/rank_computer.sv` | binary vector → registered ranks |
| `rtl/data_router.sv` | words + ranks → registered sorted array |
| `rtl/two_step_sorting_network.sv` | the three blocks above |
| `rtl/input_fifo_buffer.sv` | N-word shift register with clear, `full`, `last_free` |
| `rtl/axis_receiver.sv` | slave-side FSM |
| `rtl/data_output_buffer.sv` | read port of the sorted array |
| `rtl/axis_sender.sv` | master-side FSM |
| `rtl/two_step_sorting_ip.sv` | top level with AXI4-Stream ports |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_workloads.sv`, `tb/workload_runner.sv` | the seven evaluated sizes end to end |

The receiver, the sender and the top level carry SVA properties for the stream rules:
TREADY only while writing, TVALID held until taken, no buffer write while a packet is
pending, and no write into a full buffer. Simulators with assertion support check
these properties.

## Simulation

Every testbench is self-checking. It prints `TB_RESULT checks=<n> failures=<m>` and has
a watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert -y rtl -y tb +libext+.sv rtl/sort_pkg.sv \
          tb/tb_two_step_sorting_ip.sv --top-module tb_two_step_sorting_ip
./obj_dir/Vtb_two_step_sorting_ip
```

Replace the testbench name to run another one.

* **`tb_two_step_sorting_ip`** runs the core at its default size, with a behavioural
  DMA source and sink. It sends 402 packets: random idle cycles on the input, random
  back-pressure on the output, full packets, short packets, packets without TLAST and
  packets full of repeated values. It also replays two 8-word data sets from board
  tests of the original core. It checks every output word and the N+1 / 2 / N cycle
  budget. It also counts each mechanism and fails if one never occurs: TLAST end,
  short packet, full-buffer end, ties, input idle cycles, output stalls, and input
  refused while busy.
* **`tb_workloads`** builds the core at N/W = 8/8, 8/16, 8/32, 8/64, 16/32, 32/32 and
  64/32, and sorts random packets through each.
* The block testbenches compare against references computed in the testbench: an
  insertion sort, a rank count over the words, or a queue model of the buffer. The
  stream controllers are checked against a reference state machine (receiver) or
  against per-beat protocol checks (sender).

## Not included

The DMA engine, the processing system with its memory and UART, the interconnect of
the block design, and the on-chip logic analyzer used for debugging are vendor parts.
They are not part of this RTL. The testbenches stand in for the DMA with a simple
stream source and sink.
