# NBDP: an SSD on the North Bridge with a second path to main memory

In a conventional PC, every byte that moves between main memory and the disk goes through the
North Bridge, the South Bridge and a SATA controller. A flash SSD is fast enough that this chain
limits performance. This RTL models a different organisation, called NBDP (North Bridge, Dual
Port), built from three ideas:

1. **The SSD sits on the DDR DRAM bus of the North Bridge.** It is addressed like a memory
   device. Because flash is not deterministic, the SSD itself signals when read data is ready by
   driving the DQS strobe. A fixed CAS latency is not used.
2. **There is a second, direct path between SSD and main memory.** Main memory is a *dual-port*
   DRAM:
   - Port A belongs to the North Bridge (CPU and the first DMA controller, DMA1).
   - Port B belongs to a DMA controller inside the SSD (DMA2).
3. **Two page transfers run at the same time.** The SSD is itself dual-ported. The host packs
   two DMA commands that touch different memory and disk regions. DMA2 executes the first one
   over the direct path while DMA1 executes the second over the DDR link.

   The typical case is a page fault. The victim page is written out while the wanted page is
   read in.

Everything is in SystemVerilog (IEEE 1800-2017) and is synthesizable. Memories are plain arrays.

## Block structure

```
nbdp_system
├── dma_cmd_packer           host command queue: pair / time-out / refuse
├── dp_dram  (main memory)   dual-port DRAM, 4 banks
│   └── bank_arbiter         per-bank ownership, round-robin, INT pins
├── nb_dram_ctrl             North Bridge DRAM controller
│   ├── dma_engine  (DMA1)
│   ├── dqs_host_ctrl        DDR link master, waits for SSD-driven DQS
│   └── dram_port_allocator  INT-aware front end of main-memory port A
└── dual_port_ssd
    ├── ssd_ddr_slave        SSD port 0: DDR link slave, drives DQS when data is ready
    ├── dma_engine  (DMA2)   SSD port 1: direct path
    ├── dram_port_allocator  INT-aware front end of main-memory port B
    ├── cache_buffer_ctrl    cache buffer controller
    │   ├── cache_hit_detector   HIT0 / HIT1
    │   ├── dram_port_allocator  SSD port i -> cache DRAM port i
    │   └── channel_allocator    NAND channel arbitration
    ├── dp_dram  (cache buffer)  dual-port DRAM, 4 banks
    └── flash_channel x NCH      NAND channel and its pages
```

`ssd_pkg` holds the shared types:
- the 128-bit `line_t`;
- the DMA command struct `dma_cmd_t {dir, mem_addr, lba, nlines}`;
- the DDR command enum;
- `cmds_compatible()`, the packing rule.

## Data unit and addressing

Every block moves one **line**: one DDR burst of 4 words × 32 bits = 16 bytes.
- Memory addresses and SSD addresses (`lba`) are line numbers, 16 bits each.
- A DMA command carries a direction, a start memory line, a start SSD line and a line count.
  `DMA_WRITE` goes memory → SSD; `DMA_READ` goes SSD → memory.
- A 16 KB page is 1024 lines.

Addresses are mapped as follows:
- **Main memory:** bank = low 2 bits of the line address; row = the rest. Consecutive lines
  therefore walk across the banks.
- **Cache buffer:** direct-mapped, 1024 lines. The index is the low bits of the SSD line
  address; the bank is the low bits of the index.
- **NAND:** channel = `lba % NCH`, page = `lba / NCH`. This fixed mapping stands in for the flash
  translation layer. Addresses beyond `NCH*PAGES` (8192 lines) wrap onto lower pages.

## The DDR link with data-ready DQS (`dqs_host_ctrl`, `ssd_ddr_slave`)

The host issues ACT with the row half of the line address, then RD or WR with the column half.

**Read:**
- After RD, the host does **not** count a CAS latency. It waits as long as the SSD needs.
- The SSD keeps DQS undriven while it fetches the line. On a cache-buffer hit this is short. On
  a miss it takes the whole NAND read.
- When the line is ready, the SSD drives DQS low for one cycle (the preamble). It then sends four
  beats, D0..D3, with DQS toggling 1, 0, 1, 0.
- The host captures exactly four beats after the preamble.
- `dqs_wait` on the host is high for every cycle spent waiting, so the cost of the SSD's
  variable latency can be measured.

**Write:** the source architecture only describes reads, so this part is this design's own.
- The host sends the four beats right after WR, with its own strobe.
- The SSD answers with a DQS preamble plus one pulse once the line has been accepted and
  programmed.

Each direction has its own signals (`w_*` host → SSD, `r_*` SSD → host, `r_dqs_oe` = the SSD is
driving), instead of bidirectional pins. One data word moves per clock. Real DDR moves two per
clock, one on each DQS edge; that factor is left out.

## The dual-port DRAM and its INT pins (`dp_dram`, `bank_arbiter`)

Both ports can use different banks at the same time. A single bank serves one port at a time:
- The `bank_arbiter` gives a bank to one port for the CAS latency plus the burst
  (`CL + BURST_CYC` cycles, default 4).
- While a bank is owned, the **other** port's `INT` pin for that bank is high ("busy").
- If both ports ask for the same free bank in the same cycle, the port that did **not** use the
  bank last wins (round-robin). The loser sees `INT` high and is served after the winner's
  burst.
- A request is accepted (`req_ready`) in the cycle it wins. Read data (`rvalid`, 128 bits)
  follows exactly `CL` cycles later.

Every controller that drives a port sits behind a `dram_port_allocator`. The allocator holds a
request back while that port's `INT` is high for the addressed bank. This is why a conflict shows
up as a stall in front of the DRAM rather than as a lost request.

On polarity: one passage of the source material calls the high level of INT "ready", while the
description of the DRAM and its timing diagram call it "busy". This design uses **high = busy**.

## Inside the dual-port SSD (`cache_buffer_ctrl`)

The SSD has two ports:
- Port 0 is the DDR slave, fed by DMA1.
- Port 1 is DMA2.

Each port has its own small state machine:

```
read hit : IDLE -> DRD (cache DRAM read) -> DRW (wait CL) -> RESP
read miss: IDLE -> CREQ (ask channel) -> CST (start NAND read) -> CWT -> FILL (write line
           into cache buffer, set tag) -> RESP
write    : IDLE -> CREQ -> CST (start NAND program) -> CWT -> FILL -> RESP
```

Resources are shared as follows:
- **Cache-Hit Detector 0/1.** There is one lookup per port on a shared tag array. The tag is set
  when a line is filled or written.
- **DRAM Port Allocator.** SSD port *i* always uses cache-DRAM port *i*. It waits while INT*i*
  marks the bank busy.
- **Channel Allocator.** A port asks for the channel its address maps to:
  - When both ports ask for the same channel in the same cycle, it grants round-robin.
  - A port whose channel is held by the other port waits until that port drops its request.
  - The grant is level-sensitive and registered. It appears one cycle after the request.
- **Write policy.** Writes are write-through with allocate. The NAND program finishes before the
  port reports completion. This is needed because a second DMA WRITE may only start after the
  first has reached the flash.

When one port hits and the other misses, they use disjoint resources and never wait for each
other. When both hit, they contend only per bank. When both miss, they contend only per channel.

The two ports are assumed to carry independent transactions, so they never access the same line
at once. They can still map to the same cache slot. For that reason a read hit is checked a
second time when its DRAM read is issued. If the other port refilled the slot in between, the
read falls back to NAND.

## Packing and splitting DMA commands (`dma_cmd_packer`, `nb_dram_ctrl`)

The packer is a 4-deep queue in front of the North Bridge.
- **Two compatible commands** leave together as one packed pair (`ev_pack`). Two commands are
  compatible when their memory ranges and their SSD ranges are both disjoint.
- **A lone command** leaves by itself after `TIMEOUT` cycles with no partner (`ev_timeout`).
- **Overlapping commands** leave one by one (`ev_incompat`). The first goes alone at once. The
  second then waits for a partner of its own.

In the source material packing is an operating-system routine. Here it is hardware, so that the
whole command path can be simulated.

`nb_dram_ctrl` splits a packed pair:
- It sends the first command to DMA2 on a sideband command bus (`d2_*`) and waits until DMA2
  has taken it.
- It then starts the second command on DMA1.
- A single command runs on DMA1.
- DMA1 shares main-memory port A with CPU accesses, round-robin (`ev_cpu_conflict`).

Each DMA controller raises its own one-cycle completion interrupt, `irq_dma1` and `irq_dma2`.

The top hands the next command from the packer to `nb_dram_ctrl` only when both DMA controllers
are idle. Concurrency therefore exists only inside a packed pair. A command queued behind a pair
cannot read lines the pair is still writing.

## DMA controller (`dma_engine`)

One engine design serves as both DMA1 and DMA2. It moves one line at a time.

**DMA WRITE** (memory → SSD): read the memory line → send it to the SSD port → wait for the
SSD's completion → next line. Each SSD write must be complete in the flash before the next one
starts, so consecutive writes are never overlapped.

**DMA READ** (SSD → memory) is pipelined:

```
SREQ -> SWAIT --s_done--> RMW: write line i to memory  ||  request line i+1 from the SSD
                           |   (both presented in the same cycle)
                           +-- both accepted, line i+1 already back --> RMW again
                           +-- both accepted, still waiting ----------> SWAIT
                           +-- last line written ---------------------> irq, IDLE
```

If line i+1 arrives before the memory has accepted line i, it waits in a second one-line
buffer. There is never more than one SSD request outstanding, because both SSD front ends serve
one line at a time.

At the end of the command the engine pulses `irq`.

The command already carries the memory address and length. A PC DMA controller would fetch these
from a descriptor table (the PRD table) in main memory; that fetch is not modelled.

## Parameters

Defaults of the top, `nbdp_system`:

| Parameter | Default | Meaning | Origin |
|---|---|---|---|
| `CB_NBANKS` | 4 | cache-buffer banks | source architecture (block diagram of the dual-port SSD) |
| `NCH` | 2 | NAND channels | same diagram |
| burst length | 4 words | `ssd_pkg::BL` | source architecture (timing diagrams, D0..D3) |
| `MM_NBANKS` | 4 | main-memory banks | assumed equal to the cache buffer |
| `MM_ROWS` | 2048 | lines per main-memory bank (128 KB in all) | own choice |
| `CB_ROWS` | 256 | lines per cache bank (16 KB in all) | own choice |
| `CL` | 2 | DRAM CAS latency, cycles (must be ≥ 2) | own choice |
| `PAGES` | 4096 | lines per NAND channel (128 KB in all) | own choice |
| `T_READ`, `T_PROG` | 25, 100 | NAND read and program latency, cycles | own choice |
| `QDEPTH`, `TIMEOUT` | 4, 64 | packer queue depth and time-out, cycles | own choice |

The storage sizes are small on purpose, so that simulation stays quick. Every size is a
parameter. The only rule is that bank counts, row counts and channel counts must be powers of
two.

## Where this design departs from the source architecture

- The PC around the subsystem is left out: CPU, operating system, interrupt controller, LAN
  controller and South Bridge. The host side is the `cmd_*` and `cpu_*` ports of the top.
- The SSD's embedded processor, its SRAM and the flash translation layer are left out. A fixed
  address mapping replaces the translation layer. The NAND chips are arrays inside
  `flash_channel`, with one page per line and fixed latencies.
- DRAM row activation, precharge and refresh are not modelled. An accepted request stands for
  row-activate plus column command.
- The items marked as own choices above: the write handshake on the DDR link, the cache policy,
  the CPU/DMA1 round-robin, the sideband bus for DMA2 commands, and all sizes and latencies.
- No descriptor-table fetch in the DMA controllers (see the DMA section).

## Verification

Each module has a self-checking testbench in `tb/`.
- It compares the block against values worked out independently in the testbench.
- It ends by printing `TB_RESULT checks=<n> failures=<n>`.
- It has a watchdog.

`tb_nbdp_system` runs the complete top at its default parameters:
1. The CPU writes two 16 KB pages.
2. A lone DMA WRITE stores one page in the SSD. This command leaves the packer by time-out.
3. A page fault follows. The victim page goes out over the direct path while the stored page
   comes back over the DDR link, and the CPU keeps reading memory meanwhile. This must finish
   faster than the two transfers run one after the other.
   A third command, reading the last lines DMA2 is still writing, is queued during the page
   fault. It must wait for the pair and return the new data.
4. Two overlapping DMA READs are queued. They must not be packed.
5. The CPU reads everything back and compares it with the data of step 1.

The testbench counts every mechanism and fails if one never happened: packing, time-out, refused
packing, both interrupts, cache hits and misses, INT stalls on both DRAMs, channel conflicts,
CPU/DMA1 conflicts and DQS waits. Step 5 of that test is a packed pair of DMA READs whose
lines are in the cache buffer. Both SSD ports then hit at once and meet on the cache-buffer banks.

`tb_workloads` runs the transfers the architecture is evaluated with, also at default
parameters. It checks the data and the exact hit and miss counts, and prints cycle counts:

| Transfer | Cycles | Per line |
|---|---|---|
| 64 KB DMA WRITE (one command) | 503 878 | 123 |
| 64 KB DMA READ, every line a cache miss | 176 200 | 43 |
| 16 KB DMA READ, every line a cache hit | 16 456 | 16 |
| Two 16 KB download packets, packed | 126 057 | the time of one 16 KB write |
| Page fault: 16 KB out + 16 KB in (`tb_nbdp_system`) | about 115 000 | less than one 16 KB write alone |

Write time is dominated by the NAND program latency, because each line must reach the flash
before the next one starts. A 100 % cache hit is possible only up to the 16 KB size of the cache
buffer. Each test finishes in about a second with Verilator.

## Simulating

With Verilator 5, from the repository root (package first):

```sh
verilator --binary --timing -Wno-fatal -Irtl --top tb_nbdp_system \
    rtl/ssd_pkg.sv rtl/bank_arbiter.sv rtl/dp_dram.sv rtl/dram_port_allocator.sv \
    rtl/channel_allocator.sv rtl/flash_channel.sv rtl/cache_hit_detector.sv \
    rtl/cache_buffer_ctrl.sv rtl/ssd_ddr_slave.sv rtl/dqs_host_ctrl.sv rtl/dma_engine.sv \
    rtl/dma_cmd_packer.sv rtl/nb_dram_ctrl.sv rtl/dual_port_ssd.sv rtl/nbdp_system.sv \
    tb/tb_nbdp_system.sv
./obj_dir/Vtb_nbdp_system
```

`tb_workloads` builds the same way. For a single block, replace the testbench and `--top`. Keep `ssd_pkg.sv` and the block's
submodules on the command line. Add `--assert` to enable the handshake assertions:
- no DDR command while the SSD is busy;
- correct DQS phase on the link;
- one grant per bank;
- NAND start only when the channel is idle;
- non-zero DMA length.

Reset is asynchronous and active low throughout.
