# Two-way pipeline processing units for biomedical signal processing

Biomedical signal processing breaks naturally into a chain of stages: filtering,
a transform, feature extraction, classification. This design gives each stage
its own general-purpose processor with private instruction and data memories,
so a stage never competes with another stage for memory bandwidth. The stages
still need to pass data to one another cheaply. For that, each processing unit
has an **output memory with two ports**. The producing stage writes its results
through one port, on its own bus. The consuming stage reads them through the
other port, on *its* own bus. Neither stage ever touches the other's bus.

Such a unit is called a *two-way pipeline processing unit* (PPU). A chain of
PPUs forms a software pipeline. A *slave switcher* can split a stage into
several parallel PPUs, or join parallel PPUs back into one stage. This RTL
contains everything of the system except the processors themselves: buses,
arbiters, control units, memories, switchers and the serial loader for the
instruction memories. Each processor is brought out as a bus-master port, so
any 32-bit core with a Wishbone-style bus (the architecture was built around
an OR1200) can be attached.

## The system as built

The top module, `bsp_system`, holds five PPUs in the arrangement that runs two
ECG analyses at once. The stages are a shared filter stage, two
feature-extraction branches and one classifier:

```
                          +-> PPU1 ------------+
 system input -> PPU0 -> SS0                   SS1 -> PPU4 -> system output
                          +-> PPU2 -> PPU3 ----+
```

* PPU0 reads the system input over its inter bus (`sys_in_*`).
* SS0 lets PPU1 and PPU2 both read PPU0's output memory.
* PPU3 reads PPU2's output memory directly. No switcher is needed between two
  single PPUs.
* SS1 lets PPU4 reach both PPU1's and PPU3's output memories. Bits
  `adr[15:12]` of PPU4's inter-bus address pick the memory: 0 for PPU1, 1 for
  PPU3.
* Results are read from PPU4's output memory through `sys_out_*`.
* The serial programming interface (`ser_valid`, `ser_data`) loads all five
  instruction memories.

The path PPU0 → PPU2 → PPU3 → PPU4 is a plain four-stage pipeline. That is the
basic form of the architecture: a chip with four PPUs in a row and no
switchers. To get it, drop PPU1 and the two switchers and connect the stages
directly, as PPU2 → PPU3 is connected here.

Default sizes: 4096 × 32-bit instruction memory and 4096 × 32-bit data memory
per PPU (16 KB each), and a 256-word output memory. With five PPUs that makes
1.35 Mbit of memory.

## Inside a PPU

```
            core_req/rsp        prog_req/rsp
                 |                   |
            [master CU]         [master CU]
                 \                 /
                  +-- arbiter ----+          intra bus (one per PPU)
                  |
   +--------------+--------------+----------------+-----------+
   |              |              |                |           |
[slave CU]    [slave CU]     [slave CU]        bridge     unmapped
   |              |              |                |        (answers 0)
 instruction    data        output memory       up_req/rsp
 memory         memory      port A  port B ---[slave CU]--- dn_req/rsp
```

* **Master control units** (`wb_master_cu`) connect a master to the
  arbiter. Each unit turns the master's `cyc` into a request, lets the
  master's transfer onto the bus only while granted, and passes the answer
  back only while granted. An idle bus carries all zeros, so the requests of
  all masters (and the answers of all slaves) are combined with OR. An
  assertion checks that a master holds a transfer until it is acknowledged.
* **Arbiter** (`wb_arbiter`): registered, round-robin. The owner keeps the bus
  while its transfer is open. The bus is handed over at the end of every
  acknowledged transfer if another master is waiting. Without that hand-over, a
  core issuing back-to-back transfers would shut the loader out.
* **Slave control units** (`wb_slave_cu`) decode the region field, enable
  their memory for one clock and acknowledge one clock later with the read
  data.
* **Private memories** (`ppu_sram`): single port, synchronous read, byte
  writes.
* **Output memory** (`output_memory`): two equal synchronous ports. Port A is
  on the PPU's own bus. Port B, behind its own slave CU, is the `dn_*` port
  for the next stage. If both ports write the same word in the same clock,
  port A's bytes are kept. A read of a word being written by the other port
  returns the old data.
* **Inter-bus bridge**: a transfer to region 3 leaves through `up_*` with the
  region field cleared. It then lands on the previous stage's output memory,
  directly or through a switcher.

### Address map of a PPU's bus

| `adr[19:16]` | target |
|---|---|
| 0 | instruction memory (word address `adr[13:2]`) |
| 1 | data memory |
| 2 | own output memory, port A (`adr[9:2]`) |
| 3 | upstream output memory; `adr[15:12]` selects it behind a switcher |
| 4–15 | unmapped: acknowledged with zero data |

Address bits above bit 19 are ignored.

### Bus protocol and timing

All buses use Wishbone-classic single transfers, packed as `ppu_pkg::wb_req_t`
(`cyc, stb, we, sel[3:0], adr[31:0], dat[31:0]`) and `ppu_pkg::wb_rsp_t`
(`ack, dat[31:0]`). A master raises `cyc`/`stb` and holds the transfer until
it sees `ack`. Read data is valid with `ack`. One clock, `clk`, drives
everything. The reset `rst_n` is asynchronous and active low. Reset does not
clear memory contents.

| transfer | clocks from request to `ack` |
|---|---|
| core or loader to a PPU memory, bus idle | 2 (grant, then memory access) |
| the bus owner's next transfer, issued right after its last one | 1 (grant kept) |
| downstream port of an output memory, direct | 1 |
| through a slave switcher | 1 more (the master ID is queued first) |
| inter bus from a core | its own bus time plus the upstream side's time |

A slave CU does not accept a new access in the clock of its `ack`, so one
master sustains one transfer every two clocks.

## Handing data between stages

The hardware only provides shared memory. How stages synchronise is up to
software. The scheme used by the testbench follows the intended working
schedule of the architecture. Each stage cycles through: wait, fetch data,
process, output data, set flag.

* Words 0–3 of an output memory are *ready flags*, one per consumer. Data
  starts at word 4.
* A consumer polls its flag in the producer's output memory over its inter
  bus. Once the flag is set, it reads the block and writes the flag back to 0.
* A producer, before writing a new block, polls its own flags until every
  consumer has cleared its flag. It then writes the block and sets the flags.
* Memories are not reset, so every stage first clears its own flags at boot.
  It must do so before any consumer starts polling. In the testbench this is
  guaranteed because a consumer first fetches its whole program. Likewise,
  whoever reads the system output waits until the last stage has booted.

Clearing the flag uses the output memory's second port as a write port. That
port is what lets the producer know its buffer is free without any extra
hardware. Because every transfer to a memory behind a switcher queues in its
priority FIFO, polling consumers share the producer's memory fairly.

## Slave switcher

`slave_switcher #(NM, NS)` places NM inter-bus masters in front of NS output
memories. It consists of:

* a multiplexer that forwards the served master's request to the selected
  memory;
* a demultiplexer that returns that memory's answer to the same master;
* a **priority FIFO of master IDs** that decides whom to serve.

A master that starts a transfer enters the FIFO. Masters arriving in the same
clock enter lowest ID first. The head is served until its transfer is
acknowledged, then it leaves. A master that starts another transfer queues
again behind the others, so service is first come, first served and nobody
starves. SS0 in the top is `NM=2, NS=1` (two readers, one memory). SS1 is
`NM=1, NS=2` (one reader, two memories). A select value of NS or above is
acknowledged with zero data. An assertion checks that the FIFO count matches
the set of queued masters.

## Loading programs

`prog_if` is a serial-to-parallel loader. While `ser_valid` is high it samples
one bit per clock from `ser_data`, MSB first, into 64-bit frames:

| bits | field |
|---|---|
| 63:56 | PPU number |
| 55:32 | word address in the instruction memory (wraps at the memory size) |
| 31:0  | instruction word |

After the last bit, the loader writes the word through the PPU's programming
port, a second master on that PPU's bus. `busy` is high while the write is
open, and `frames` counts completed writes. The sticky `err` flag, cleared
only by reset, is set when a frame is dropped. That happens when the frame
names a PPU that does not exist, or when it ends while the previous write is
still open. A frame takes 64 clocks and a write at most a few, so with a free
bus the second case only happens if the target bus is held for a very long
time. Cores may run while the loader writes: the arbiter interleaves them.

## What is not in the RTL, and where it departs from the architecture

* **The processors.** Each PPU's core port is a top-level port. The testbench
  uses `tb/core_model.sv`, a behavioural stand-in that fetches its stage
  program (taps, block size, shift, block count, coefficients) from
  instruction memory and runs a FIR stage with its history in data memory. It
  does not execute an instruction set.
* **Clock gating** is part of the power-saving approach, but which clocks are
  gated, and when, is not specified. It is left to the synthesis flow.
* **ASIC processing units**, which may replace a PPU when they speak the same
  bus protocol, are not included.
* **The top is the five-PPU, two-switcher system.** The basic chip uses four
  PPUs in a plain chain. The five-PPU form contains that chain and also the
  switchers.
* **This design's own choices.** Every bus detail is chosen here: signal set,
  address map, wait states, arbitration policy, switcher queueing rules,
  output memory size and collision rule, loader frame format, and reset. The
  architecture fixes only the blocks and their connections, the 32-bit
  processor bus and the 16 KB + 16 KB memories per PPU.
* **No timing closure or power work.** The intended operating point is
  12–15 MHz in a 65 nm low-leakage process.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. To build and run one, for example the full system:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
          rtl/ppu_pkg.sv tb/tb_bsp_system.sv --top-module tb_bsp_system
./obj_dir/Vtb_bsp_system
```

| testbench | what it shows |
|---|---|
| `tb_bsp_system` | Runs at the default sizes. Loads 5 × 204 instruction words serially and streams 48 12-bit samples through five 200-tap FIR stages. In steady state a sample leaves every 411 clocks. The budget is 48,000 clocks (250 samples/s at 12 MHz), and the test checks it. The result is computed independently, as F4(F1(F0 x) + F3(F2(F0 x))). It also counts that each mechanism happened: core/loader arbitration, two masters queued in SS0, both SS1 memories used, ready-flag waits, same-clock use of both output memory ports, unmapped reads, and a rejected frame. About 106k clocks, well under a second. |
| `tb_bsp_sweep` | Four full-size systems side by side, with 1, 2, 3 and 4 cores each running the 200-tap FIR; the other stages pass samples through. Checks all outputs, and that adding busy cores does not slow the pipeline: 407, 407, 407 and 411 clocks per sample. |
| `tb_bsp_stress` | Same system with smaller memories, run for 40 blocks. Each stage has a filter of random length and shift. The front end and output reader stall for random times, and the loader writes throughout. This stresses the ready-flag hand-off and switcher arbitration. |
| `tb_ppu` | Memory contents through each port, region separation, inter-bus address forwarding, latencies, loader writes under contention. |
| `tb_slave_switcher` | Three masters, two memories with random delays. Checks data, first-come-first-served order with the ID tie-break, bad selects, and the one-clock cost. |
| `tb_wb_arbiter` | Grant compared clock by clock with a reference model, plus a starvation bound. |
| `tb_wb_master_cu`, `tb_wb_slave_cu` | Gating, zero idle answers, one-wait-state ack, no double access. |
| `tb_ppu_sram`, `tb_output_memory` | Shadow-model checks, including byte enables and two-port collisions. |
| `tb_prog_if` | Frame decoding, address wrap, counter, error cases. |

`tb/wb_master_bfm.sv` is the bus master used by several testbenches. It drives
requests at falling clock edges, which keeps it free of races with the
rising-edge logic.

## Changing the design

* Memory sizes are parameters of `bsp_system` and `ppu` (`IMEM_WORDS`,
  `DMEM_WORDS`, `OMEM_WORDS`). The output memory must stay at or below 1024
  words, because `adr[15:12]` above it is the switcher select.
* A different topology is mostly wiring in `bsp_system`:
  * connect `up_req/up_rsp` of a PPU to `dn_req/dn_rsp` of its producer;
  * put a `slave_switcher` wherever several PPUs meet one memory, or one PPU
    meets several memories;
  * give `prog_if` the new PPU count.
* The region decode and the switcher select field are constants in
  `ppu_pkg`.
