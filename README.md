# SQMC: a scalable, QoS-aware packet memory controller

A router line card keeps packets in DRAM, cut into fixed 64-byte cells, while
they wait in output queues. At OC-3072 (160 Gb/s) the memory has to absorb
one cell write and one cell read almost every 400 MHz clock. DRAM banks are
slow: a bank that was just accessed stays busy for a whole row cycle. Classic
packet buffers avoid bank conflicts with SRAM staging buffers kept per output
queue, so their size grows with the number of queues. This controller does
it differently:

* a cheap **address hash** spreads consecutive cells over DRAM groups and
  banks;
* a **reorder buffer** queues requests per bank and issues them out of order
  as banks become free. Its size depends on the number of banks and on how
  deep the bank FIFOs are, not on the number of output queues;
* a **QoS class scheduler** divides DRAM bandwidth between service classes.
  It uses a weighted round robin whose weights a feedback loop retunes every
  100 µs. The loop compares how many cells missed their latency target with
  how many were allowed to.

This RTL implements the scheme described in H.-J. Lee and E.-Y. Chung,
"Scalable QoS-Aware Memory Controller for High-Bandwidth Packet Memory", IEEE
Transactions on VLSI Systems (doi 10.1109/TVLSI.2007.915367). The default configuration is the paper's two-class controller
for OC-3072 with 32-entry bank FIFOs. That is 4 DRAM groups, 8 logical banks
per group, 2 classes and 512-bit cells. All RTL is in `rtl/` and all
self-checking testbenches are in `tb/`.

## Where a cell goes: the hash

The router's queue manager keeps a linked list of memory blocks for each
output queue. It gives the controller a cell address as a **block address**
(21 bits, 2 M blocks of 8 cells = 1 GB) and a **block offset** (3 bits). The
queue manager itself is not part of this RTL. `sqmc_hash` computes:

```
cell_pos  = (block_offset + block_addr[2:0]) mod 8      rotate the offset
mem_addr  = {block_addr, cell_pos}                      24 bits
group     = mem_addr[1:0]                               4 groups
bank      = mem_addr[4:2]                               8 banks per group
bank_addr = mem_addr[23:5]                              19-bit row/column address
```

Because blocks are allocated at random addresses, the rotation gives each
block a random starting offset. Blocks allocated at the same time therefore do
not all start writing on the same bank. Taking the group from the low bits
means any 4 consecutive cells of a block land in 4 different groups.
Accesses to different groups run in parallel, so long packets rarely
conflict. The worst case is the opposite: consecutive cells going
to different queues, which may all land on one bank. That worst case is what
the FIFOs are sized for.

The read address goes through an identical hash, so a read finds the cell
where its write put it.

## One group: the reorder buffer

Each group (`reorder_buffer`) drives its own set of DRAM parts. A cell is one
DDR burst of 4 spread across the parts, so the group can start one cell
access every **2 clocks**. A bank that was accessed cannot be accessed again
for **tRC = 8 clocks**. Inside the group:

```
           write side                               read side
  bank FIFOs [class][bank] (row+data)       bank FIFOs [class][bank] (row)
        |  per class: bank arbiter (LQF)          |  per class: bank arbiter (LQF)
        v                                         v
  class scheduler (QoS, WRR)                 class scheduler (QoS, WRR)
        \__________________  _______________________/
                           \/
                  read/write arbiter (alternates)
                           |
                    DRAM interface  --> cmd to DRAM parts
                           |        <-- read data (in issue order)
                   read data buffer --> out_* stream
```

Every issue slot, three levels of arbitration choose one request. All of it
is combinational within one clock:

1. **Bank arbiter** (`bank_arbiter`), one per class and direction. A bank is
   a candidate if its FIFO is not empty and its DRAM bank is not busy.
   *Longest queue first* (LQF) takes the fullest candidate FIFO. This keeps
   the worst FIFO depth down, and FIFO depth is what causes loss. The
   alternative *longest latency first* (LLF) takes the candidate with the
   oldest head cell; set `ARB = ARB_LLF` to use it. Ties go to the lowest
   bank number.
2. **Class scheduler** (`class_scheduler`), one per direction. It chooses
   between the classes whose bank arbiter found a candidate (see below).
3. **Read/write arbiter** (`rw_arbiter`). When both directions have a
   request it alternates between them; otherwise it serves whichever has one.

The chosen FIFO is popped and the DRAM interface (`dram_if`) registers the
command. The DRAM interface also enforces the issue slot and the per-bank
busy time. Both classes and both directions share the bank timers, because
they use the same physical banks. DRAM returns read data in issue order
without a tag, so `dram_if` keeps a 16-deep queue with the class, bank and
bank address of each outstanding read and reattaches them. A read is only
made schedulable while the read data buffer has room for it and for every
read still in flight, so the buffer cannot overflow.

### Bank FIFOs

Each `bank_fifo` is a circular buffer. Its write and read pointers have one
extra bit and count modulo 2 × depth. Their difference is the occupancy (6
bits for 32 entries) that LQF compares. Any depth works, including the 24
entries of the smaller configurations. Each entry also stores the value of
the global 16-bit cycle counter at enqueue time. A cell's *FIFO latency* is
`now - enqueue_time` (mod 2^16). The QoS loop measures it at dequeue.

### Overflow

A **write** whose bank FIFO is full is lost: `wr_drop` is raised in the same
cycle and the cell is not stored. This is the packet loss that the FIFO depth
is chosen to make negligible. The published estimate is about 10^-15 for 24
entries and 10^-20 for 32 entries. A **read** whose bank FIFO is
full is not lost. `rd_ready` goes low and the requester has to hold the read.

## The QoS feedback loop

Each class *i* has a latency requirement: at most a fraction N_i of its cells
may wait more than M_i clocks in the bank FIFOs. The defaults are class 0
(tight) N = 0.1 %, M = 60, and class 1 (loose) N = 1 %, M = 400. A fixed
weighted round robin cannot keep these targets when the mix of traffic
changes, so the weights are recomputed once per **weight update interval** U
(40,000 clocks = 100 µs at 400 MHz). One `class_scheduler` serves one
direction of one group and holds three parts.

**Accumulators** (`qos_accumulator`, one per class). Over an interval, X_i
counts dequeued cells of class *i* and Y_i counts those whose FIFO latency
exceeded M_i. The ideal error would be Y_i/X_i − N_i. Multiplying by X_i
removes the division:

```
E_i = Y_i − X_i·N_i
```

X_i·N_i is not multiplied either. The range of X_i is cut into 10 sub-ranges
of 1024 cells each. The sub-range index `r = min(X_i >> 10, 9)` is simply the
top bits of X_i. It selects a small constant table:

```
ref_i[r] = round(N_i × (1024·r + 512))         (N_i × the sub-range midpoint)
class 0: 1 2 3 4 5 6 7 8 9 10
class 1: 5 15 26 36 46 56 67 77 87 97
```

The table is computed at elaboration from `VIOL_PPM` (N_i in parts per
million), so changing a requirement only means changing a parameter. With
one cell every 4 clocks per direction, X_i is at most 10,000 per interval.
The last sub-range also takes anything larger.

**Weight generator** (`weight_generator`, the function f). At the end of an
interval, with E = Y_i − ref_i[r]:

```
E > 0             W ← W + (E >> m)      m = position of the leading 1 of ref_i[r]
E < 0 and W > 1   W ← W − 1
otherwise         W ← W
```

`E >> m` stands in for E / ref_i[r]. With E = 55 and ref = 20 (m = 4), for
example, the weight grows by 3. Too many violations therefore raise the
weight in proportion to how far the class is off. Too few violations lower
it by just one step per interval, so a single bad interval cannot make the
weight collapse. The weight never goes below 1. In this RTL it saturates at
255 and starts at 8.

**Weighted round robin** (`wrr_scheduler`). A round starts by loading each
class's weight into a counter. Classes that have a request and a non-zero
counter are served one cell at a time in turn, and each grant decrements the
counter. A class whose counter reaches zero waits. Once no requesting class
has credit left, all counters are reloaded in that same cycle, so the
scheduler never idles while any class could issue. New weights take effect at
the next round.

Taken together, the loop behaves like a low-pass controller. The weight of a
class under pressure climbs within a few intervals. A class that meets its
target slowly hands bandwidth back.

## Interfaces and timing

`sqmc_top` has the following ports:

| Port | Dir | Meaning |
|---|---|---|
| `wr_valid, wr_class, wr_block_addr[20:0], wr_block_offset[2:0], wr_data[511:0]` | in | one cell write per clock |
| `wr_drop` | out | same cycle: the write was lost (bank FIFO full) |
| `rd_valid, rd_class, rd_block_addr, rd_block_offset` | in | one cell read request per clock |
| `rd_ready` | out | same cycle: 0 = read not taken, hold it |
| `cmd_valid/cmd_write/cmd_bank/cmd_row/cmd_wdata [g]` | out | DRAM command of group g, one clock after the FIFO pop, at most one every 2 clocks |
| `dram_rvalid/dram_rdata [g]` | in | read data from group g's DRAM, in command order |
| `out_valid/out_ready/out_class/out_bank/out_row/out_data [g]` | out/in | read cells of group g, valid/ready, in DRAM return order |
| `wr_weights/rd_weights [g][class]` | out | current class weights |
| `weight_update` | out | pulses in the last clock of each update interval |

A request enters its FIFO at the clock edge where it is presented. It can be
issued at the next edge at the earliest, and its DRAM command appears one
clock after that. Reads come back in the order the schedulers issued them,
which is not the order they were requested. Matching returned cells to
output queues is up to the consumer, using the class, bank and bank address
tag. The whole controller runs on the memory clock. Reset is asynchronous and
active-low.

## Parameters

Defaults are in `rtl/sqmc_pkg.sv` and can be overridden on `sqmc_top`.

| Parameter | Default | Origin |
|---|---|---|
| `NUM_GROUPS` | 4 | paper (OC-3072; 1 for OC-768) |
| `BANKS_PER_GROUP` | 8 | paper |
| `NUM_CLASSES` | 2 | paper (1 gives the single-class version) |
| `FIFO_DEPTH` | 32 | paper (24 is the smaller variant) |
| `BLOCK_ADDR_W`, `BLOCK_OFF_W` | 21, 3 | paper (1 GB, 8-cell blocks) |
| `DATA_W` | 512 | paper (64-byte cells) |
| `TIME_W` | 16 | paper (enqueue time register) |
| `TRC`, `ISSUE_INTERVAL` | 8, 2 | paper (DDR, burst 4) |
| `UPDATE_INTERVAL` | 40000 | paper (100 µs at 400 MHz) |
| `NSUB` | 10 | paper |
| `SUB_SHIFT` | 10 | this design (1024-cell sub-ranges) |
| `TARGET_LAT`, `VIOL_PPM` | {400, 60}, {10000, 1000} | paper (class 1, class 0) |
| `INIT_WEIGHT`, `WEIGHT_W` | 8, 8 | this design |
| `ARB` | `ARB_LQF` | paper |

Storage at the defaults follows the paper's SRAM area formula. Write FIFOs
hold 512 + 19 + 16 bits per entry, read FIFOs 19 + 16, and the read data
buffer 512 bits per entry, each with 2 × 4 × 8 × 32 entries. That is 2.24 Mbit
(273.5 KB) in total. The read data buffer tags add 47 kbit. All storage is
written as register arrays; no SRAM macro is instantiated.

## Design choices and departures

These points are not settled by the paper and were decided here:

* **LQF means largest occupancy.** The paper's prose in one place says LQF
  "chooses the smallest occupancy". That contradicts the name and the way
  LQF is described elsewhere, so the fullest FIFO is chosen.
* **The weight step follows the shift literally.** `alpha = E >> m` gives 0
  for a positive error smaller than 2^m, where the exact ceil(E/ref) would
  give 1. The weight is then unchanged for that interval.
* Single-clock arbitration, a one-clock registered DRAM command, the 16-entry
  read tag queue, the read credit check, and one request per direction per
  clock at the top.
* "No cells in the other classes" in the WRR rule is taken to mean *no
  schedulable request* this cycle (FIFO not empty and bank not busy).
* The read data buffer is one FIFO per group, sized classes × banks × depth
  (512 entries).
* With `NUM_GROUPS = 1` (the OC-768 organisation, one group of 8 banks) the
  hash has no group bits. The group output is then a single bit tied to 0,
  and the low address bits pick the bank directly.
* The suggested small overflow buffer with read speedup is not built. Its
  size and behaviour are not specified.

## Verification

Every module has a self-checking testbench that ends with a
`TB_RESULT checks=N failures=M` line. Run one with plain Verilator, for
example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sqmc_pkg.sv \
          tb/tb_sqmc_top.sv --top-module tb_sqmc_top -o sim && obj_dir/sim
```

| Testbench | What it establishes |
|---|---|
| `tb_sqmc_hash` | group/bank/address against integer arithmetic; a block covers all groups |
| `tb_bank_fifo` | 32- and 24-entry FIFOs against a queue model: data, time stamp, occupancy, full/empty |
| `tb_bank_arbiter` | LQF and LLF choices against a scan |
| `tb_wrr_scheduler` | exact 5:2:1 shares, round order, random traffic against a counter model |
| `tb_qos_accumulator` | X, Y, sub-range, ref and error for six intervals |
| `tb_weight_generator` | the worked example and random cases of the update rule |
| `tb_class_scheduler` | closed loop with synthetic latencies; weights match an independent model every interval |
| `tb_rw_arbiter` | alternation and lone-requester service |
| `tb_dram_if` | 2-clock issue slots, exact 8-clock bank busy, read credit, tags on returned data |
| `tb_read_data_buffer` | order, free count, back-pressure |
| `tb_reorder_buffer` | one group with a behavioural DRAM: every write lands once with its data, reads return the right cells, overflow drop, read stall, reordering, weight updates |
| `tb_sqmc_top` | end to end with 4 groups, 64-bit cells and a 2000-clock interval: all of the above through the hash, with a queue-manager model |
| `tb_sqmc_top_g1` | the same end-to-end test with a single group of 8 banks (OC-768) |
| `tb_sqmc_top_full` | the same at every default parameter (512-bit cells, 40,000-clock interval) |
| `tb_qos_workload` | full size, load 0.9, class ratios 9:1, 5:5, 1:9, 20 intervals each; reports the latency-violation fractions |
| `tb_qos_dynamic` | full size, load 0.9, ratio switching 5:5, 9:1, 5:5, 9:1 every 10 intervals; the class 0 weight must follow the load up and down |
| `tb_arb_workload` | single-class controller, LQF and LLF side by side on the same traffic at load 0.1, 0.5, 0.9; FIFO occupancy and latency |
| `tb_hash_workload` | hash with 8 groups of 4 banks, output queue bursts of 1 and 8: requests per bank |

The end-to-end tests count every mechanism and fail if any of them never
happens. The mechanisms are: use of all groups, write drop, read stall,
out-of-order issue, a same-bank wait of exactly tRC, read/write alternation,
and a weight update that changes a weight.

Results of `tb_qos_workload`, with the fraction of class-0 cells above 60
clocks measured over the last 10 intervals of each ratio:

| Class ratio 0:1 | class 0 > 60 clk | class 1 > 400 clk | class 0 / class 1 write weight (group 0) |
|---|---|---|---|
| 9:1 | 0.27 % | 0.05 % | 37 / 1 |
| 5:5 | 0.005 % | 0.0003 % | 17 / 1 |
| 1:9 | 0.003 % | 0 % | 1 / 1 |

The published simulations report 0.13 %, 0.094 % and 0.0002 % for class 0.
Their runs covered 1 s of traffic with that paper's own traffic model; these
runs cover 2 ms per ratio. At 9:1 class 0 is still above its 0.1 % target
here. The controller loads the memory at 0.9 of its bandwidth, and the loop
raises the class 0 weight as expected, but it does not reach the target in
this short run. No write was dropped at load 0.9 with 32-entry FIFOs.

With the traffic mix switching every 10 intervals (`tb_qos_dynamic`), the
class 0 write weight climbs from about 10 to 23–27 in each 9:1 phase and
falls back to 13–15 in the 5:5 phase that follows. Over each whole 9:1 phase,
including the transition, 0.33–0.35 % of class 0 cells exceed 60 clocks.

Comparing the bank arbiters (`tb_arb_workload`, one class, 200,000 clocks
per load) shows the expected trade-off. At load 0.9 the largest FIFO
occupancy is 7 entries under LQF and 8 under LLF. The longest FIFO latency is
225 clocks under LQF and 107 under LLF. The averages are almost equal, about
10 clocks. At loads 0.1 and 0.5 the two schemes hardly differ. The published
maxima over much longer runs are 12 and 16 entries; both fit well within 32.

The hash (`tb_hash_workload`, 8 groups × 4 banks) gives every bank within
10 % of its fair share. Counted in windows of 32 requests, the variance of
requests per bank is 0.97 when every cell goes to a different queue. It
drops to 0.74 when queues send bursts of 8, because a block's cells go to 8
different groups.

What is not covered: the RTL has not been mapped to a cell library or timed, the
DRAM is a behavioural model that returns reads after a fixed 10 clocks, and
no run comes near the 10^-15 to 10^-20 overflow probabilities, which can
only be extrapolated.
