# Reconfigurable conflict-free memory mapping for parallel ECC decoders

Parallel turbo and LDPC decoders split a code block over several
processing elements (PEs). Each PE has its own memory bank. At every
time step each PE reads or writes one element, first in natural order
and then in interleaved order. If two PEs need the same bank in the same
step, the step stalls. A mapping that avoids this for both orders
depends on the block length and on the interleaver. The usual fix
computes the mapping off-line and stores the resulting command and
address words in ROMs, one set per block length.

This design computes the mapping **on chip**, each time a new block
length or interleaver is loaded. It keeps only the bank number of each
element, which costs K × log2(PE) bits. While the decoder runs, it turns
that table into command words and address words. The banks are reached
through a **butterfly network**, which is much cheaper than a crossbar
or a Beneš network. A butterfly cannot carry every permutation, so the
mapping algorithm is built around the butterfly's wiring. Any mapping it
produces can be routed with no conflict and no extra routing step.

Default configuration: PE = 8 PEs and banks, block lengths up to
K = 5120, and 8-bit data words.

```
          host: k_len, interleaver pi          PE side: pe_wdata / pe_rdata
                 |                                    ^   |
        +--------v--------+                           |   |
        | interleaver     |--pi(p), one per cycle-+   |   |
        | table (PE banks)|--pi(i+j*n), all banks-|-+ |   |
        +-----------------+                       | | |   |
        +-----------------+   bank of each element| | |   |
        | aomm_mapper     |---------------------->| | |   |
        | Euler matrices, |          +------------v-v-+   |
        | location tables |          | vmt (K x 3 bit) |  |
        +-----------------+          +-------^---------+  |
                                     | cmd_gen: counter,  |
                                     | command word (bank |
                                     | per PE), address   |
                                     | word (d mod n)     |
                                     +---------+----------+
                                               | dest tags + {addr,data}
                                     +---------v----------+
                                     | bfly_net (request) |-> PE RAM banks
                                     | bfly_net (reverse) |<- read data
                                     +--------------------+
```

## Terms

* **n = K / PE** is the number of time steps in one sweep of the block.
* **Natural order:** at step i, PE j works on element `i + j*n`.
* **Interleaved order:** at step i, PE j works on element `pi(i + j*n)`.
* **Location:** a position 0..PE-1 at the network inputs. At step i in
  either order, PE j sits at location j.
* **Partners:** the two elements at locations 2m and 2m+1 of one step.
  They share a first-stage switch.
* **Placement rule:** the rule that moves an element to its new location
  in each pass (`ecc_pkg::aomm_place`).

## The butterfly and the rule it imposes

`bfly_net` has log2(PE) stages of PE/2 two-by-two switches. At stage s
the ports form groups of g = PE >> s:

* ports 2m and 2m+1 of a group meet in one switch;
* the switch's upper output feeds the first half of the group, and its
  lower output feeds the second half;
* both outputs land at position `bfly_subpos(m, g)` in their half, which
  is 2m when m < g/4 and 2(m - g/4) + 1 otherwise;
* after the last stage, port b is memory bank b.

At stage s, the half is selected by bit log2(PE)-1-s of the destination
bank. Each switch therefore sets itself from its upper input's tag
(1 = crossed). That works only if its two inputs differ in that bit. For
the first stage this means: **two PEs that share a switch can never
reach two banks in the same half.** For example, the identity
permutation PE j → bank j cannot be routed. If two inputs ever agree,
`conflict` is raised.

The same switch settings, applied in reverse, return read data from the
banks to the PEs. The top has two instances: `REVERSE = 0` for requests
and `REVERSE = 1` for read data.

## The mapping algorithm

The mapping is *in place*: an element stays in one bank for the whole
decoding. The algorithm views the block as a matrix with 2n rows and PE
columns:

* rows 0..n-1 are the natural steps;
* rows n..2n-1 are the interleaved steps;
* column = location.

Every element appears exactly twice, once in each half. The algorithm
works like a recursive Euler split of this structure. Each pass halves
every partition, giving one more bit of the bank number:

1. **Chains.** Take the first unplaced entry of the natural rows of the
   current matrix, scanning row by row and location by location. Call
   its element d and give it the first half of its partition. Go to
   d's interleaved row and find its partner there. The partner gets the
   other half. Go to that partner's natural row and
   take *its* partner, which gets the first half again. Continue
   alternating until the chain returns to d. Partnering is one-to-one in
   each row, and the chain alternates between the natural and the
   interleaved half, so every chain closes with an even length. Each
   element is placed exactly once, and the two partners in every row go
   to different halves. This is exactly the condition a switch needs.
2. **Placement rule.** An element on switch SE (its location with bit 0
   cleared), in a partition of size P that starts at `start`, moves as
   follows. Here `offset = P/2` and `half = start + offset`.

   | half given   | SE < half    | SE >= half          |
   |--------------|--------------|---------------------|
   | first half   | SE           | SE - offset + 1     |
   | second half  | SE + offset  | SE + 1              |

   This is the butterfly wiring written as locations. After the pass,
   each element sits where the first network stage would deliver it.
3. **Recurse.** Partition sizes go PE, PE/2, …, 2, which is log2(PE)
   passes. After the last pass, an element's location is its bank.
   Both occurrences of an element always move the same way, so they end
   in the same bank. The unit checks this and raises `err` if they
   differ.

Worked values (partition size 8): an element on SE 6 moves to location
3 in the first half or 7 in the second half, and an element on SE 0
moves to location 4 in the second half. Partitions of one pass never
share a chain, so all partitions are handled in a single scan.

**Worked example.** Take K = 40 and PE = 8 with the 3GPP turbo
interleaver for K = 40. Its first interleaved step is
39,35,34,38,36,37,32,33. The unit produces these banks:

| bank | elements |
|------|----------|
| B0 | 0 11 23 29 37 |
| B1 | 2 10 19 26 33 |
| B2 | 1 8 20 27 34 |
| B3 | 4 13 17 31 35 |
| B4 | 5 12 21 28 39 |
| B5 | 7 15 16 24 38 |
| B6 | 6 9 18 25 32 |
| B7 | 3 14 22 30 36 |

This is the published result for this example, bank for bank.
`tb_aomm_mapper` checks it. The chain start order matters here:
starting each chain at the lowest unplaced element number gives a valid
mapping, but only banks 0-3 then agree.

### Hardware: `aomm_mapper`

All storage is single-port RAM (`sp_ram`):

| memory          | contents                                  | size at defaults |
|-----------------|-------------------------------------------|------------------|
| `emn[0..1]`     | natural half of the two matrices, element at {row, loc} | 2 × 5120 × 13 bit |
| `emi[0..1]`     | interleaved half of the two matrices      | 2 × 5120 × 13 bit |
| `locn`, `loci`  | row and current location of each element, natural / interleaved | 2 × 5120 × 13 bit |
| `vis`           | "placed in this pass" flags (flip-flops)  | 5120 bit |

Each pass reads one matrix and writes the other, and the two swap roles
after every pass. The matrix pair is split into natural and interleaved
halves. That way both new occurrences of an element can be written in
the same cycle.

Sequence:

* **Init:** one interleaver position per cycle. The unit reads pi(p)
  and writes the natural and the interleaved occurrence into matrix 0
  and the location tables. This takes K + 2 cycles.
* **Each visit takes 2 cycles:**
  * `S_ISSUE` picks the next element and reads both location entries.
    The next element is the partner just read from the matrix, or the
    first clear `vis` bit of the current 32-bit scan word if the chain
    has closed.
  * `S_VISIT` computes both new locations. It writes them back, writes
    the element into the other matrix and marks it placed. It also reads
    the partner for the next step. In the last pass it writes the bank
    into the VMT.
* **Chain start:** the `vis` flags are indexed by natural matrix
  position. `S_ISSUE` finds the first clear flag in the current 32-bit
  scan word. `S_FETCH` reads the element stored at that position and
  starts a new chain, which costs one cycle per chain.
* **Scanning:** a scan word with no free position costs one extra cycle.

The total is about (K + 2) + log2(PE) · (2K + K/32 + chains) cycles.
Measured with the 3GPP interleaver (random permutation for 5120, which
is above the 3GPP range):

| K    | cycles at PE = 8 | at 100 MHz | published hardware latency | PE = 4 | PE = 16 | PE = 32 |
|------|------------------|------------|----------------------------|--------|---------|---------|
| 256  | 1835   | 18.4 µs | 19 µs  | 1309  | 2384  | 2943  |
| 1024 | 7286   | 72.9 µs | 76 µs  | 5206  | 9402  | 11524 |
| 2048 | 14559  | 146 µs  | 153 µs | 10384 | 18750 | 22943 |
| 3072 | 21826  | 218 µs  | 230 µs | 15565 | 28085 | 34392 |
| 4096 | 29090  | 291 µs  | 307 µs | 20747 | 37448 | 45820 |
| 5120 | 36352  | 364 µs  | 384 µs | 25937 | 46788 | 57237 |

The latency hardly depends on the interleaver: a random permutation
differs by a few cycles.

## Run-time translation: VMT and `cmd_gen`

`vmt` holds the bank of every element. `cmd_gen` sweeps the n steps, one
step per cycle, driven by a counter:

* **Stage 0:** counter i. In interleaved order, all PE interleaver-table
  banks are read at address i. Position `i + j*n` is stored in bank j,
  so these reads never collide.
* **Stage 1:** the element d of each PE is `i + j*n` or `pi(i + j*n)`.
  The unit reads the VMT for all PE elements at once. It also computes
  the address `d mod n` with PE-1 comparisons against k·n, so no divider
  is needed.
* **Stage 2:** the **command word** is the concatenation of the PE
  banks. The **address word** is the concatenation of the PE addresses.

Data are laid out so that all elements of one natural step share one
address. Element d is stored in bank `VMT[d]` at address `d mod n`.

## Top level: `ecc_reconf_decoder`

1. Set `k_len`. It must be a multiple of PE and at most KMAX, and it must
   stay stable while in use.
2. Load the interleaver with `pi_we` / `pi_waddr` (position) /
   `pi_wdata` (element).
3. Pulse `map_start` and wait for `map_done`.
4. Pulse `acc_start` with `acc_order` (`ORDER_NAT` / `ORDER_INT`) and
   `acc_write`.

During a sweep:

* For n consecutive cycles, `issue_valid` is high and `issue_step`
  gives the step. In the same cycle the PEs must present `pe_wdata[j]`.
* The banks are accessed two cycles later.
* Read data appear on `pe_rdata[j]` three cycles after the issue,
  marked by `rd_valid` / `rd_step`.
* `sw_cross` shows the request switches. `net_conflict` flags a conflict
  in the network.

Mapping and sweeps exclude each other: a start request for one while the
other is busy is ignored. Interleaver writes are taken only when both are
idle.

The PEs (SISO decoders) are not part of this RTL. Neither is an on-chip
3GPP HSPA interleaver generator: the interleaver order comes from the
host-loaded table.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `PE`      | 8       | PEs = banks = network width (power of two) |
| `KMAX`    | 5120    | largest block length; tables are sized from it |
| `DW`      | 8       | bank word width (this design's choice) |

The defaults are in `ecc_pkg`.

## How far it follows the published design, and where it departs

Taken from the published design:

* the partner-chain Euler split with two alternating matrices;
* the placement rule;
* the butterfly as the target network;
* the virtual mapping table of K·log2(PE) bits;
* the command-word and address formulas (`i + j*n`, `d mod n`);
* single-port matrix memories;
* the latency target.

This design's own choices:

* **Matrix layout.** The matrices are split into natural and interleaved
  halves. Separate location tables record where each element currently
  sits.
* **Placed flags.** These are a 5120-bit flip-flop vector. The published
  controller is reported as 64 LUTs, which this one will not match. Its
  RAM use is about 400 kbit, close to the ten 36-kbit block RAMs reported.
* **Switch control.** Switches set themselves from the destination tags.
  The published design produces routing bits during the mapping. Both
  give zero extra latency.
* **VMT ports.** The VMT is written as one array with PE read ports. In
  a real implementation this means replicated RAMs or a register file.
* **Interfaces.** The port protocol, the pipeline depths and the data
  width are this design's own.
* **Interleaver.** A host-loaded table replaces the on-chip interleaver.
  The testbenches use a 3GPP interleaver model written from the
  standard. It reproduces the published example, but it has not been
  compared with the standard's reference vectors.
* **Block length.** K must be a multiple of PE.

Verification shows the following for every tested interleaver:

* every element gets exactly one bank;
* every natural and interleaved step is routable through the butterfly;
* data written in one order read back correctly in the other, at the
  default size with K = 40, 256 and 5120.

## Simulating

Every testbench in `tb/` checks its own results. `tb_umts_pkg` is the
3GPP interleaver model that the testbenches share. Each ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ecc_pkg.sv rtl/sp_ram.sv \
  rtl/aomm_mapper.sv rtl/vmt.sv rtl/cmd_gen.sv rtl/bfly_net.sv \
  rtl/ecc_reconf_decoder.sv tb/tb_umts_pkg.sv tb/tb_ecc_reconf_decoder.sv \
  --top-module tb_ecc_reconf_decoder
./obj_dir/Vtb_ecc_reconf_decoder
```

| testbench | what it covers |
|-----------|----------------|
| `tb_ecc_reconf_decoder` | whole design at default parameters: three reconfigurations (K = 40, 5120, 256), write and read in both orders, latency, busy interlock, every switch stage both straight and crossed |
| `tb_aomm_mapper` | the K = 40 example against the published banks; every K of the latency table with the 3GPP interleaver and with random permutations; routability by an independent model; published latency as the bound |
| `tb_workloads` (helper `tb_map_run`) | the mapping unit at PE = 4, 8, 16 and 32 over K = 256..5120 |
| `tb_parallelism` (helper `tb_top_run`) | the whole subsystem at PE = 4, 16 and 32: map, then write and read in both orders, for K = 1024 and 5120 |
| `tb_cmd_gen` | command and address words in both orders for K = 40, 256 and 5120 |
| `tb_bfly_net` | worked steps, the identity (must conflict), 3000 random permutations in both directions |
| `tb_vmt`, `tb_sp_ram` | the table and the RAM |

Each testbench runs in well under a second.
