# BABOL operation-execution hardware for one NAND flash channel

A NAND flash channel controller has to produce exact ONFI waveforms on a
shared bus while several LUNs (dies) sit busy for tens of microseconds each.
Conventional controllers hard-wire every operation (READ, PROGRAM, ERASE and
each vendor's variant) as a state machine. Such a machine decides what to do
next only when the bus becomes free.

BABOL splits the job in two:

* **Operation scheduling** runs in software on a processor. An operation such
  as "read a page from LUN 3" is a short program. It describes each piece of
  waveform it needs as an *instruction* and queues those instructions long
  before the bus is free.
* **Operation execution** is the hardware in this repository. It takes queued
  instructions and turns each into a waveform segment with correct timing.
  Five small state machines (uFSMs) emit the segments, and a small DMA engine
  (the Packetizer) moves the data.

Flash waits are long (tens of µs) compared with a processor's reaction time,
so software can prepare the next segments in advance. The hardware then needs
no per-operation logic. A new operation or a vendor-specific command is a new
instruction sequence, not new RTL.

## Instructions and transactions

An instruction is a 79-bit word (`babol_pkg::instr_t`):

| field   | bits | meaning |
|---------|------|---------|
| `op`    | 3    | which unit: see below |
| `len`   | 4    | C/A Writer only: number of latches, 1..8 |
| `types` | 8    | C/A Writer only: bit *i* = 0 command latch, 1 address latch |
| `arg`   | 64   | latch *i* value in `arg[8i+7:8i]`, or the unit's operand |

| `op`          | unit            | operand in `arg` |
|---------------|-----------------|------------------|
| `OP_CE`       | Chip Control    | LUN bitmap (bit *i* selects LUN *i*) |
| `OP_CA`       | C/A Writer      | latch values |
| `OP_DWRITE`   | Data Writer     | byte count |
| `OP_DREAD`    | Data Reader     | byte count |
| `OP_TIMER`    | Timer           | pause in ns |
| `OP_DMA_ADDR` | Packetizer      | DRAM byte address for the next transfer |
| `OP_TXN_END`  | (delimiter)     | 16-bit transaction id, reported back on `txn_id` |
| `OP_NOP`      | none            | – |

A **transaction** is a run of instructions closed by `OP_TXN_END`. It is the
unit that software schedules. The hardware runs it atomically and keeps the
bus for its whole length. Between transactions the bus is free, so
transactions aimed at different LUNs can interleave. One LUN can wait through
its array read time (tR) while another LUN transfers data.

For example, software encodes a page READ from LUN 2 with readiness polling as
three kinds of transaction:

```
T1: CE {bit 2}; CA 00h C1 C2 R1 R2 R3 30h; CE {}; END
T2: CE {bit 2}; CA 70h; DMA_ADDR buf; DREAD 4; CE {}; END   (repeat until status = 40h)
T3: CE {bit 2}; CA 05h C1 C2 E0h; DMA_ADDR buf; DREAD n; CE {}; END
```

T2 reads 4 status bytes, and software checks them in DRAM once `txn_done`
reports T2's id. Software can use an `OP_TIMER` pause instead of polling. A
pseudo-SLC read is the same sequence with a vendor prefix command before 00h.
A PROGRAM uses `CA 80h …; DWRITE n; CA 10h`. Selecting several LUNs with one
`OP_CE` bitmap **gang-schedules** a segment: every selected LUN sees it. The
end-to-end testbench programs two LUNs at once this way.

## Execution pipeline

```
instr_* --> babol_instr_queue --> babol_dispatcher --+--> ufsm_chip_control --> ce_n[N_LUNS]
                                                     +--> ufsm_ca_writer   \
                                                     +--> ufsm_data_writer  >-> cle ale we_n re_n dq dqs
                                                     +--> ufsm_data_reader /
                                                     +--> ufsm_timer
                                                     +--> babol_packetizer <--> 32-bit DRAM port
```

* **`babol_instr_queue`** is a FIFO (64 words by default). It counts the
  `OP_TXN_END` words it holds and shows its head only when at least one
  complete transaction is inside. So software can push a transaction a word
  at a time while the bus runs the previous one, and a half-written
  transaction never starts. `instr_ready` drops when the queue is full.
  An assertion checks that software never fills the queue without closing a
  transaction.
* **`babol_dispatcher`** pops one instruction, pulses the start input of its
  unit, and waits for that unit's `done`. The start is decoded from the head in
  the same cycle, so there is no extra latency. Only one uFSM runs at a time.
  The dispatcher connects that uFSM's pins to the bus and holds all others idle.
  `OP_DMA_ADDR` and `OP_NOP` take one cycle. At `OP_TXN_END` it waits until the
  Packetizer has written every byte to DRAM, then pulses `txn_done` with the id.
* **Chip Control** state (the CE# lines) persists between instructions. That
  is why a transaction usually ends with `CE {}`.

## The five uFSMs and who owns which delay

Every ONFI delay belongs to exactly one party:

1. **Delays inside a segment** belong to the uFSM. Examples are the CE# setup
   and hold (tCS, tCH), the CLE/ALE setup and hold (tCALS/tCALH), and the WE#
   pulse width (tWP).
2. **The wait right before or after a segment** also belongs to the uFSM:
   * The C/A Writer ends its segment with tWB after most commands. It waits
     tWHR after 70h/78h (status) and tCCS after E0h/85h (column change).
     After a final address latch it adds no wait.
   * The Data Writer starts with tADL.
   * The Data Reader starts with tRR.
3. **Waits between segments** belong to software. The main example is the
   array time tR, covered by an `OP_TIMER` pause or by READ STATUS polling.

All delays come from `cfg_timing` (`onfi_timing_t`), fifteen 8-bit registers
counted in controller clock cycles. Software can retune them for each
package. `TIMING_DEFAULT` gives ONFI SDR mode-0 values with NV-DDR2 at
100 MT/s, for a 200 MHz clock.

| uFSM | segment | cycles |
|------|---------|--------|
| `ufsm_chip_control` | releases LUNs (hold tCH), then selects new ones (setup tCS); CE# stays as set | 1 + tCH if any LUN is released + tCS if any LUN is newly selected |
| `ufsm_ca_writer` | per latch: CLE or ALE plus DQ for t_cals, WE# low t_wp, WE# high t_wh; then the trailing wait | len·(cals+wp+wh) + max(wait−1,0) + 1 |
| `ufsm_data_writer` | tADL; then SDR: WE# strobe per byte; NV-DDR2: DQS preamble, one DQS edge per byte centred in the data eye, postamble | stalls (strobe held) while the Packetizer has no byte |
| `ufsm_data_reader` | tRR; then SDR: RE# low t_rp (sample at its end), high t_reh; NV-DDR2: RE# preamble, one RE# edge every `t_ddr` cycles, capture on each DQS edge from the LUN, postamble | RE# pauses while the Packetizer is full |
| `ufsm_timer` | nothing on the pins | ⌈duration / CLK_PERIOD_NS⌉ cycles, at least 1 |

### SDR and NV-DDR2

`cfg_mode` selects the data interface, and it can change between
transactions. Command and address latches look the same in both modes. In
NV-DDR2 one byte moves per strobe edge, and `t_ddr` is the number of clock
cycles per byte.

* Reads: the controller toggles RE# and the LUN returns DQS. Any `t_ddr ≥ 1`
  works, so at 200 MHz, `t_ddr = 2` gives 100 MT/s and `t_ddr = 1` gives
  200 MT/s.
* Writes: the controller drives both DQ and DQS, and each DQS edge must
  fall in the middle of its byte.
  * With `t_ddr ≥ 2`, the writer splits the byte window around the DQS
    edge.
  * With `t_ddr = 1` (200 MT/s), a new byte appears at every rising clock
    edge. A flop on the falling clock edge re-times DQS, so each strobe edge
    lands half a cycle into its byte.
  * A PHY with its own output delay can replace that flop.

The NV-DDR2 capture runs in the controller clock domain. It assumes a PHY
that returns DQ and DQS already synchronised. NV-DDR2 reads must move an
even number of bytes.

## Packetizer (DRAM side)

`babol_packetizer` keeps the DRAM byte address last loaded by `OP_DMA_ADDR`.
After each transfer the address advances by the transfer's byte count, so
consecutive chunks land back to back.

* **Reads (flash write path).** It fetches 32-bit words ahead into an 8-word
  buffer and hands bytes to the Data Writer, starting at any byte lane.
* **Writes (flash read path).** It packs bytes from the Data Reader into
  words with byte enables. It queues up to 8 words and gives them priority
  on the DRAM port.

The DRAM port is a simple request/grant port with in-order read data
(`mem_req`, `mem_we`, `mem_addr` word address, `mem_be`, `mem_gnt`,
`mem_rvalid`). In a complete controller this port can face the DRAM buffer
directly or a chain of stream processors (ECC, scrambler) in front of it.
When DRAM grants slowly, `rd_valid` or `wr_ready` drop, and
the data uFSMs stall their strobes instead of losing data.

## Pins

`ce_n[N_LUNS]`, `cle`, `ale`, `we_n`, `re_n`, and the pairs `dq_o`/`dq_oe`/`dq_i`
and `dqs_o`/`dqs_oe`/`dqs_i`. These are the controller side of a PHY. The
I/O buffers, delay lines and calibration belong to that PHY and are not
included. R/B# is not used: operations learn readiness by polling READ
STATUS. An assertion checks that DQ is never driven while RE# is low.

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| `babol_op_exec` | `N_LUNS` | 8 | CE# lines on the channel (8-LUN packages) |
| | `QUEUE_DEPTH` | 64 | instruction words |
| | `MEM_AW` | 32 | DRAM word-address width |
| | `CLK_PERIOD_NS` | 5 | used by the Timer to convert ns to cycles |
| `babol_packetizer` | `RD_WORDS`, `WR_WORDS` | 8, 8 | DRAM prefetch and write buffers |
| `babol_pkg` | `DQ_W`, `MAX_LATCHES` | 8, 8 | x8 bus; up to 8 latches per C/A instruction |

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and ends. With Verilator 5, for example for
the whole unit:

```
verilator --binary --timing --assert --timescale 1ns/100ps -Wno-fatal -Irtl -Itb \
  rtl/babol_pkg.sv rtl/ufsm_*.sv rtl/babol_instr_queue.sv rtl/babol_dispatcher.sv \
  rtl/babol_packetizer.sv rtl/babol_op_exec.sv tb/dram_model.sv tb/onfi_lun_model.sv \
  tb/tb_babol_op_exec.sv --top-module tb_babol_op_exec -o tb_top
./obj_dir/tb_top
```

The package must come first. `--timescale` gives the RTL files, which have
no time unit of their own, the testbenches' time unit. The remaining warnings
are lint notes about unused package constants and timing fields. Replace
`tb_babol_op_exec` with `tb_babol_read_workload` to run the throughput
measurement below.

For a single block, list `rtl/babol_pkg.sv`, the block's file (plus
`tb/dram_model.sv` for the Packetizer) and its testbench.

`tb_babol_op_exec` runs the top at its default parameters. It connects eight
behavioural LUNs (`tb/onfi_lun_model.sv`) and a DRAM model with random grants
(`tb/dram_model.sv`). The LUN model:

* decodes the commands;
* checks the pins against minimum timings;
* serves SDR and NV-DDR2 data;
* returns a known per-LUN data pattern, so every byte that lands in DRAM can
  be checked.

The testbench reads a full 16384-byte page in both modes. It also programs
and reads back data with the NV-DDR2 bus at 200 MT/s. It runs these
operations:

* READ STATUS polling;
* page READ with column change;
* pseudo-SLC READ;
* READ timed with the Timer instead of polling;
* SET/GET FEATURES, with the Timer supplying the address-to-data delay
  (tADL) and the feature busy time;
* PROGRAM, both on one LUN and ganged on two LUNs;
* ERASE;
* reads interleaved across LUNs.

It also counts how often each mechanism happened and fails if one never did:

* commit gating held back a half-written transaction;
* interleaving across LUNs;
* several transactions queued at once;
* the queue filled up;
* the Packetizer stalled on DRAM;
* gang selection;
* Timer use;
* status polling;
* a mode switch.

It also checks that the NV-DDR2 strobe runs at `t_ddr` cycles per byte.

### Channel throughput

`tb_babol_read_workload` measures whole-page READ throughput, again at the
default parameters.

* Every LUN has a 100 µs array read time and 16384-byte pages.
* The testbench runs one thread per LUN. Each thread loops over three steps:
  latch the read, poll status every 1 µs, and transfer the page. The
  threads queue their transactions concurrently, so one LUN's array read
  overlaps the other LUNs' transfers.
* It checks every byte in DRAM.
* It checks that each run ends within 15% of the physical bound. The bound
  is the first array read plus every page at the bus rate, or one LUN's
  serial time if that is longer.

| LUNs | bus rate | throughput | bus busy with data |
|------|----------|------------|--------------------|
| 2 | 100 MT/s | 85.6 MB/s | 86% |
| 4 | 100 MT/s | 91.7 MB/s | 92% |
| 8 | 100 MT/s | 95.0 MB/s | 95% |
| 2 | 200 MT/s | 143.8 MB/s | 72% |
| 4 | 200 MT/s | 168.8 MB/s | 84% |
| 8 | 200 MT/s | 179.5 MB/s | 90% |

With more LUNs, more array reads hide behind transfers, and the bus nears
saturation. At 200 MT/s the bus is relatively faster, so it needs more LUNs
to stay busy. Random row addresses give the same figures, because the LUN
model's array time does not depend on the row.

## Departures and limits

* Only SDR and NV-DDR2 data interfaces are built. Other ONFI modes
  (for example NV-DDR) would need their own Data Writer and Reader with the same
  operands.
* The 200 MT/s write path relies on a falling-edge flop for DQS. That is
  half-cycle timing, which the target technology must close.
* This design chose all of the following: the instruction layout, the
  transaction delimiter, the commit gating in the queue, the completion report
  (`txn_done`/`txn_id`), the DRAM port, the buffer sizes and the timing
  defaults. The C/A Writer's choice between tWB, tWHR and tCCS by command code
  is its own rule.
* The software side is not part of the RTL. That means the operation coroutines,
  the task and transaction schedulers, and the processor. The testbench tasks
  play its role by pushing instruction sequences. The PHY, ECC, scrambler and
  other data-stream processors are also not included.
* One uFSM runs at a time. The segments of a transaction never overlap, and
  only the CE# state carries over from one instruction to the next.
