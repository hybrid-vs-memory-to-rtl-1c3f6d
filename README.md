# Hybrid and memory-to-memory inter-core communication on a 16-core mesh

A multi-core chip is only as fast as the way its cores hand data to each other. This
design is a 16-core processor built to compare two ways of doing that between clusters of
cores:

* **Hybrid communication.** Inside a cluster, cores share a memory core and signal each
  other through hardware mailboxes. Between clusters, they send packets over a
  network-on-chip.
* **Memory-to-memory communication.** A DMA engine, the *memory interface*, copies a block
  straight from one cluster's shared memory into the other's. The data never crosses the
  network and no intermediate core touches it.

Both mechanisms live on one chip. Which path a transfer takes depends only on the
programs loaded into the cores. The RTL is synthesizable SystemVerilog (IEEE 1800-2017).
Each block has a self-checking testbench, and one end-to-end testbench runs the whole
chip at its default size.

## Chip map

Sixteen processor cores (PCores) and two memory cores (MCores) form a 3 x 6 mesh. Each
tile has its own router. The chip is split into two clusters of eight PCores around one
MCore:

```
            cluster 1                  cluster 2
 col:    0      1      2          3      4      5
 row 0  P1     P2     P3    |    P9     P10    P11
 row 1  P4     M1     P5    |    P12    M2     P13
 row 2  P6     P7     P8    |    P14    P15    P16

 data_in -> input FIFO -> P1            P16 -> output FIFO -> data_out
                 M1 <==== memory interface (DMA) ====> M2
```

* PCores are numbered row by row inside a cluster, skipping the MCore. PCore 1 (top-left)
  is the source of every transfer and PCore 16 (bottom-right) is the destination.
* Every PCore has hard wires to the shared memory of its own cluster's MCore. It can reach
  the other cluster's MCore only over the network.
* The package `icc_pkg` holds the sizes, the tile coordinate functions (`mcore_x`,
  `pcore_x`, `pcore_y`) and all shared types.

## How a word travels

The end-to-end testbench (`tb/icc_top_tb.sv`) loads programs that move words as follows.

**Hybrid path.** This is the worst case, crossing both clusters:

1. PCore 1 takes the word from the input FIFO and stores it into MCore 1's shared memory.
2. PCore 1 sends a mailbox sync to PCore 3.
3. PCore 3 loads the word and sends it as a network message to PCore 9 in cluster 2.
4. PCore 9's receiver puts the message into its FIFO 1. PCore 9 stores the word into
   MCore 2 and syncs PCore 16.
5. PCore 16 loads the word from MCore 2 and writes it to the output FIFO.

**Memory-to-memory path:**

1. PCore 1 stores the word into MCore 1.
2. PCore 1 issues a `DMA` instruction. MCore 1 forwards the command to the memory
   interface.
3. The memory interface reads each word from MCore 1 into its buffer register and writes
   it into MCore 2.
4. When the block is copied, the memory interface sets mailbox bit 8 of PCore 16.
5. PCore 16 loads the words from MCore 2 and outputs them.

One word, from `write_enb` to `data_valid` on the core clock, measured at the default
size:

| path              | cycles |
|-------------------|-------:|
| hybrid            |     59 |
| memory-to-memory  |     36 |

The paper reports 370 ns for the hybrid path and 330 ns for the memory-to-memory path, but
gives no clock period. Only the order of the two results can be compared, and it matches.
The cycle counts come from this design's own processor, so they say little about the
paper's exact timing.

`tb/icc_paths_tb.sv` runs the two single-mechanism transfers the paper compares against:

| path | cycles |
|------|-------:|
| message passing only: PCore 1 -> PCore 16 | 19 |
| shared memory: PCore 1 -> MCore 1 -> PCore 8, then a message to PCore 16 | 26 |

The paper ranks these two as slower than hybrid: 610 ns for shared memory and 470 ns for
message passing. Here a direct message on an idle network is the fastest path of all,
because the hybrid path goes through four programmed cores. The paper's ranking
presumably reflects network load, which these single-word runs do not have.

## Shared memory and the MCore (`mcore`, `mcore_rx`)

**Banks and addresses.** Each MCore holds four banks (Shared Mem #1-#4) of 32 words of
32 bits each. A shared address has 7 bits: `{bank[1:0], word[4:0]}`.

**Masters.** Ten masters can reach the banks:

* ports 0-7: the eight cluster PCores, PCore 1 first;
* port 8: the memory interface;
* port 9: the MCore's own network receiver.

**Arbitration.** Every bank has its own fixed-priority arbiter (`fixed_prio_arb`). On one
bank the lowest port number wins: the top-left PCore has the highest priority and the
bottom-right PCore the lowest, as in the paper. Accesses to different banks proceed in the
same cycle.

**Request/grant port.** A master holds `req` until `gnt`, and `gnt` can come in the same
cycle. Read data arrives with `rvalid` one cycle after the grant.

**Network receiver (`mcore_rx`).** It buffers incoming flits in an input FIFO and serves
two kinds of request:

* a remote write (`PT_WR`) becomes one memory write;
* a remote read (`PT_RD`) becomes one memory read, and the word goes back to the
  requester as a `PT_RESP` packet.

**Mailbox routing.** A sync pulse from PCore i to PCore j sets bit i of PCore j's mailbox.
The DMA completion notice sets bit 8.

**DMA commands.** Commands from the cluster's PCores are passed to the memory interface in
fixed priority order.

## The PCore (`pcore`)

A PCore tile contains:

* the processor (`pcore_cpu`);
* the memory access arbitrator (`mem_access_arb`);
* a 32-word instruction memory and a 32-word private data memory (`sp_ram`);
* the mailbox (`mailbox`): nine flags, one per cluster PCore plus one for the DMA;
* the receiver (`pcore_rx`).

**Two input FIFOs.** The receiver is how a core tells network data from different sources
apart. Message words from other PCores go into FIFO 1. Words that come from an MCore, the
answers to remote reads, go into FIFO 2.

**Memory access arbitrator.**

* Data addresses with bit 7 clear go to private memory, which grants at once.
* Addresses with bit 7 set go to the cluster's shared memory, which grants by priority.
* Program words written through the `prog_*` port take priority over instruction fetch.

### Instruction set

The processor runs instructions in several cycles each and is not pipelined. It has eight
32-bit registers, and `r0` always reads as zero. An instruction word is
`op[31:28] rd[27:25] rs[24:22] imm[21:0]`.

Every instruction takes at least three cycles: fetch, latch and execute. An instruction
that must wait stays in its execute cycle, and the `stall` counter counts those cycles.

| op | name | effect |
|---:|------|--------|
| 0  | HALT | stop |
| 1  | LI   | `rd = imm` (zero-extended) |
| 2  | ADDI | `rd += sext(imm[15:0])` |
| 3  | IN   | `rd` = next word of the input stream (waits) |
| 4  | OUT  | output stream <= `rd` (waits) |
| 5  | LD   | `rd = mem[rs + imm[7:0]]`; bit 7 set selects shared memory |
| 6  | ST   | `mem[rs + imm[7:0]] = rd` |
| 7  | SYNC | set own bit in the mailbox of cluster PCore `imm[2:0]` |
| 8  | WAIT | wait for mailbox bit `imm[3:0]`, then clear it |
| 9  | SEND | message `rd` to tile (x=`imm[2:0]`, y=`imm[4:3]`) |
| 10 | RECV | `rd` = next word of FIFO 1 (`imm[0]=0`) or FIFO 2 (`imm[0]=1`) |
| 11 | RWR  | remote write `rd` to shared address `imm[6:0]` of MCore tile (`imm[9:7]`, `imm[11:10]`) |
| 12 | RRD  | remote read request for shared address `imm[6:0]` of that tile; the answer arrives in FIFO 2 |
| 13 | DMA  | copy `imm[18:14]` words from own shared address `imm[6:0]` to `imm[13:7]` in the other cluster, then notify PCore `imm[21:19]` there |
| 14 | BNZ  | if `rs != 0` jump to `imm[4:0]` |
| 15 | NOP  | no operation |

The `OUT` stream of only PCore 16 is connected, to the output FIFO. An `OUT` on any other
core waits forever. The same holds for `IN` on any core other than PCore 1.

## Network-on-chip (`mesh_noc`, `xy_router`)

**Flits.** Packets are made of 34-bit flits: `{head, tail, data[31:0]}`. A head flit
carries `head_t`:

* the packet type (`PT_MSG`, `PT_WR`, `PT_RD`, `PT_RESP`);
* the destination and source coordinates;
* a shared-memory address.

A packet that carries a data word has a second flit, the tail.

**Routing.** Every router has five ports and a 4-flit input FIFO on each. It routes by XY
dimension order: first along the row until the column matches, then along the column.

**Wormhole locking.** A head flit locks its output until the tail has passed, so packets
never interleave. When several heads compete for a free output, a round-robin pointer per
output chooses one.

**Links and timing.** Links use valid/ready. A flit takes one cycle per router on an empty
network, so a head crossing corner to corner passes 8 routers in 8 cycles.

## The memory interface (`dma_mem_if`)

The memory interface runs one command at a time. When both clusters are waiting, cluster
1 goes first. For each word it does three steps:

1. read the word from the source MCore;
2. hold it in its buffer register (the "interfacing component");
3. write it to the destination MCore.

Each step is a request on that MCore's port 8, so a word costs at least three cycles. An
`L`-word copy keeps `busy` high for `3L + 1` cycles when the memories grant at once. The
last cycle sends the completion notice. `words_moved` counts the copied words.

## Clocks (`clk_ctrl`)

* `clk_mux` selects `ext_clk` (0) or `vco_clk` (1).
* `clk_gating` = 1 stops the core clock, through a latch-based glitch-free gate.
* `rst` is synchronous and active high, and all inputs are sampled on the rising core
  clock.
* Change `clk_mux` only while under reset.

## Top-level interface (`icc_top`)

* `data_in` and `write_enb` fill the input FIFO. `in_full` reports that it is full.
* `data_out` shows the oldest word of the output FIFO while `data_valid` is high, and
  `read_enb` removes it.
* Programs are loaded one word at a time while `run` is low, using `prog_we`,
  `prog_core` (0-15 = PCore 1-16), `prog_addr` and `prog_data`.
* Raising `run` starts all cores at address 0.
* `halted`, `dma_busy` and `dma_words` report progress.

Both I/O FIFOs are 16 words deep (parameter `IO_FIFO_DEPTH`).

## How far this follows the paper

**Taken from the paper:**

* 16 PCores and 2 MCores on a 3 x 6 mesh in two clusters of eight;
* the input FIFO at PCore 1 and the output FIFO at PCore 16;
* 32-bit data;
* fixed-priority shared-memory access, top-left core first;
* a hardware mailbox for synchronization;
* XY dimension-ordered wormhole routing;
* two input FIFOs per PCore that separate PCore data from MCore data;
* four shared-memory banks per MCore;
* a DMA memory interface that copies between the MCores through a buffer;
* the clock mux and clock gate pins;
* the two transfer paths.

**This design's own choices:**

* **Processor.** The paper uses a SIMD RISC processor without describing it. The
  processor here is a small scalar core with the instruction set above, not a SIMD
  machine.
* **Formats and protocols.** All packet formats, port protocols, FIFO depths and the DMA
  command format.
* **Mailbox flag for the DMA.** The completion notice uses a ninth mailbox flag.
* **Priority of the DMA and network ports.** They rank below the PCores.
* **Memory size.** Shared banks have 32 words each, following a 5-bit shared-memory
  address shown in the paper's waveforms. The paper also mentions 256 KB of on-chip
  memory. This build holds about 9 KB: 1 KB of shared memory plus 8 KB of instruction and
  private memory. `BANK_WORDS`, `IMEM_AW` and `PMEM_AW` are parameters, but the 7-bit
  shared address in `icc_pkg` would have to grow with them.

**Not built:**

* the VCO: `vco_clk` is a chip input;
* the `test_config` / `test_output` pins, whose function is not described;
* the paper's FPGA resource figures and its absolute nanosecond timings.

**Known limits:**

* Two syncs from the same source merge into one mailbox flag until it is consumed.
* Only one DMA command runs at a time.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each one
has a watchdog that fails the run if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv rtl/icc_pkg.sv \
    tb/icc_top_tb.sv --top-module icc_top_tb
./obj_dir/Vicc_top_tb
```

Replace `icc_top_tb` with any other `tb/<block>_tb.sv` to test one block.

**What the end-to-end test covers.** It runs the whole chip at its default parameters in
four runs:

1. hybrid, one word;
2. memory-to-memory, one word;
3. hybrid, 24 words, with background traffic;
4. memory-to-memory, 24 words, on the VCO clock, with the clock gated for a while.

It checks every output word. It also checks that memory-to-memory is faster than hybrid
for one word. It counts, and requires at least once, each of these mechanisms:

* shared-bank contention;
* heads blocked in the mesh;
* mailbox waits;
* FIFO 2 traffic from a remote read;
* DMA copies;
* a full input FIFO and a full output FIFO;
* the VCO clock and clock gating.

It takes about a minute.

## Files

* `rtl/icc_pkg.sv`: sizes, types, packet and instruction formats.
* `rtl/icc_top.sv`: the chip.
* `rtl/mesh_noc.sv`, `rtl/xy_router.sv`: the network.
* `rtl/mcore.sv`, `rtl/mcore_rx.sv`, `rtl/fixed_prio_arb.sv`: the memory core.
* `rtl/pcore.sv`, `rtl/pcore_cpu.sv`, `rtl/mem_access_arb.sv`, `rtl/pcore_rx.sv`,
  `rtl/mailbox.sv`: the processor core.
* `rtl/dma_mem_if.sv`: the memory interface.
* `rtl/sync_fifo.sv`, `rtl/sp_ram.sv`, `rtl/clk_ctrl.sv`: shared building blocks.
* `tb/*_tb.sv`: one self-checking testbench per module.
