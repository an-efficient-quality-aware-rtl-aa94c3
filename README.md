# Quality-aware SDRAM controller for a multimedia SoC

A set-top box or similar multimedia chip has one external SDRAM shared by
very different clients. A CPU needs each cache-line fetch back quickly. Video,
display and transport-stream units care only about getting a steady share of
the bandwidth. A download engine takes whatever is left over. If one
arbitration policy is used for all of them, either the CPU waits behind long
video bursts, or the video units lose their bandwidth whenever the CPU gets
busy.

This controller gives each client port (a *channel*) one of three service
classes, and schedules the SDRAM with that class in mind:

| class | meant for | how it is served |
|---|---|---|
| latency-sensitive (LS) | CPU | first, round robin among LS channels; may interrupt other work (preemption) and reserve the data bus (column-access inhibition) |
| bandwidth-sensitive (BS) | stream units | after LS; ordered for SDRAM efficiency (row hit first, same read/write direction as the last access), round robin on ties |
| don't-care (DC) | background traffic | only when no LS or BS channel has a request at all |

Each LS or BS channel has a budget of *service cycles* (data words moved) per
*service period*. A channel that has used its budget is served as DC until the
period ends. This keeps a busy CPU or a greedy stream from taking bandwidth
that was promised to someone else.

Underneath the scheduler, the SDRAM interface keeps all four banks working at
once. There is one small controller per bank, plus a shared timing tracker and
one master that chooses a single command per cycle. While one bank is
precharging or activating a row, another bank can already move data.

## Structure

```
            CPU  ─► ch_abuf (ch 0) ─┐
   job (1-D/2-D) ─► ch_agen (ch 1) ─┤
        ...                         ├─► qas ─► mis2 ─► SDRAM pins
   job (1-D/2-D) ─► ch_agen (ch 6) ─┘            │
                                                 ├─ bank_ctrl x4
                                                 ├─ time_wheel
                                                 └─ master_ctrl
```

There are three layers:

* **Layer 2, address generation.**
  * Channel 0 carries the CPU's full addresses through a 4-entry FIFO
    (`ch_abuf`).
  * Channels 1-6 each have an address generator (`ch_agen`). It is given a
    job and produces one address per burst by itself, so the client does not
    have to send addresses. It holds two generators:
    * `bag_1d` walks a linear range.
    * `bag_2d` walks a rectangular block of a frame, stored either line by line
      or in 32 × 16-word tiles (see below).
* **Layer 1, the quality-aware scheduler (`qas`).** It picks at most one
  channel request per cycle and hands it to the SDRAM interface as an
  *access*. An access is one burst, carrying: direction, row, bank, column,
  channel, the LS flag and the preempt flag.
* **Layer 0, the memory interface socket (`mis2`).**
  * It accepts accesses for idle banks.
  * It turns each access into PRE / ACT / READ / WRITE commands.
  * It moves the data and performs power-up and refresh.

`mc_pkg` holds the shared types and constants. `qa_mc_top` wires everything
together.

## Scheduling in detail (`qas`)

Each cycle the scheduler does the following:

1. It computes for every channel:
   * **live**: it has a request, and it has no earlier access still waiting
     for its column command.
   * **effective class**: its configured class, or DC if its budget
     (`ch_alloc`) is used up in this period.
   * **DRAM status** of its request, from the bank state reported by `mis2`:
     row hit (the row is open), bank miss (the bank is closed) or row miss
     (another row is open).
2. If any live channel is LS:
   * While an earlier LS access is still between grant and column command,
     nothing is granted. The new LS request waits, because LS accesses are
     never interrupted by other LS accesses.
   * Otherwise the next eligible LS channel after the last LS winner is
     granted (round robin). It is eligible if its bank is idle, or, with
     preemption enabled, if its bank is busy with a non-LS access that can
     still be parked.
3. Otherwise, if any BS channel has a request, only BS channels are
   considered. If none of them can go this cycle because its bank is busy,
   nothing is granted; a DC request is not slipped in. Only when no BS
   channel requests at all are the DC channels considered. Among the
   channels of the class whose bank is idle:
   * The winner is the highest `{status, same direction as last grant}`.
   * Status ranks row hit > bank miss > row miss.
   * Ties go round robin.

Budgets count *service cycles*: every cycle in which a data word of that
channel is on the SDRAM bus. The service period is `period` clock cycles.
All budgets restart at the end of each period.

### Preemption

An LS access to a busy bank is sent with the `preempt` flag. The bank
controller parks its current non-LS access; it can hold one parked access.
This is allowed only while that access has not yet issued its column command.
The bank then serves the LS access and afterwards resumes the parked one. If
the LS access opened a different row, the parked access is re-classified and
precharges again.

### Column-access inhibition (CAI)

From the LS grant until the LS column command, the master controller issues
no READ or WRITE for other accesses. PRE and ACT of other banks may still go
ahead. This keeps the data bus free, so the LS access is not stuck behind
someone else's burst.

Both services can be switched off at run time (`preempt_en`, `cai_en`).

### What the budget does and does not guarantee

The scheduler never lets a DC request (or an over-budget channel) win while a
BS channel with budget left has a request, even one that must wait for its
bank. This matters: a DC access granted into a bank would hold that bank
through its precharge and activate, and the BS access behind it would lose
those cycles. With the rule, DC traffic only uses cycles in which no BS
channel is asking.

Each channel keeps only one access in flight, so its stream stays in order
and no reordering buffer is needed. A saturated BS channel whose requests
are mostly row misses in busy banks is therefore limited by its own latency.
The budget works as priority up to the allocation; it is not a hard
guarantee. Measured results:

* In the end-to-end test, saturated BS channels with random 2-D traffic
  reached their full allocation in about 98% of periods.
* In the set-top-box scenario, every BS unit received at least 90% of its
  demand in every phase over many seeds, and typically all of it. This held
  even while the CPU asked for more than the SDRAM can deliver.

## The SDRAM interface in detail (`mis2`)

### `bank_ctrl`: one per bank

The state machine has five states: IDLE, PRE, ACT, COL and one shared NOP
state.

* An access is classified when it is taken:
  * row miss → PRE;
  * bank miss → ACT;
  * row hit → COL.
* Every wait is spent in the single NOP state, which uses a down-counter and
  a return state. After PRE it counts tRP, then goes to ACT. After ACT it
  counts tRCD, then goes to COL.
* Only three states request commands: PRE, ACT and COL. The master grants
  them.
* After the column command the bank is immediately IDLE again. The burst
  itself is run by the master, so the next access can start its PRE or ACT
  while the previous burst is still on the bus.

### `time_wheel`

It keeps down-counters for the constraints that outlive a single bank
controller's waits:

| constraint | value |
|---|---|
| ACT → ACT | tRRD |
| ACT → PRE of that bank | tRAS |
| READ → PRE | BL |
| WRITE → PRE | BL + tWR |
| READ/WRITE → READ | BL (data bus) |
| READ → WRITE | CL + BL + 1 (one turnaround cycle) |

It returns one permission per command kind.

### `master_ctrl`

* **Power-up:** wait `init_wait` cycles, then PALL, two REF and LOAD MODE
  (sequential bursts, CL and BL from `cfg`).
* **Refresh:** every `ref_interval` cycles, stop taking new accesses, let the
  banks finish, then PALL and REF.
* **Command choice:** one command per cycle. A bank holding an LS access goes
  first, otherwise round robin. A command is allowed only when the time wheel
  permits it.
* **Bursts:**
  * For a write it takes one word per cycle from the channel (`wd_take`,
    `wd_chan`).
  * For a read it returns the words with `rd_valid` / `rd_chan`.
  * In both cases it reports each service cycle to the scheduler
    (`xfer_valid`, `xfer_chan`).

### Pin timing

All SDRAM pins are registered.

* A command chosen in cycle *g* is on the pins in cycle *g+1*.
* Write word *i* is driven in cycle *g+1+i*.
* Read word *i* is sampled at the end of cycle *g+1+CL+i*, and `rd_valid`
  rises one cycle later.

Read latency is measured from the cycle the scheduler grants the access to the
first `rd_valid`:

| DRAM status | cycles | at default timing |
|---|---|---|
| row hit | 3 + CL | 5 |
| bank miss | 3 + tRCD + CL | 7 |
| row miss | 3 + tRP + tRCD + CL | 9 |

## Addresses, tiles and the SDRAM

The word address is 23 bits: `{row[11:0], bank[1:0], column[8:0]}`. This fits
a 128 Mbit ×16 SDR SDRAM with 4 banks of 4096 rows × 512 words. Consecutive
512-word blocks fall into different banks. A linear stream therefore moves
from bank to bank, and the next row can be opened while the current one is
being read.

`bag_2d` works from a base address, line pitch, origin (x0, y0), width and
height, all in words and lines.

* **Line-by-line layout:** a word's address is `base + y·pitch + x`.
* **Tiled layout:** the frame is cut into tiles of 32 words × 16 lines, each
  stored as one contiguous 512-word block:

  ```
  tile  = (y / 16) · (pitch / 32) + x / 32
  addr  = base + tile · 512 + (y % 16) · 32 + x % 32
  ```

  With a 512-aligned base, a tile is exactly one DRAM row of one bank. A
  motion-compensation block that stays inside a tile therefore causes at most
  one row opening. The tile size is a parameter (`TW_LOG2`, `TH_LOG2`).

In both layouts the walk goes along a line in steps of the burst length, then
to the next line.

## Interface of `qa_mc_top`

* **Configuration** (static during operation):
  * `cfg` holds all timing, the CAS latency, the burst length (1/2/4/8), the
    refresh interval and the power-up wait. `mc_pkg::DEFAULT_TIMING` is the
    100 MHz setting. For another clock or part, `mc_pkg::timing_from_ps`
    turns data-sheet times (in picoseconds) into cycle counts. Minimum delays
    are rounded up to whole cycles; the refresh interval is rounded down.
    Example: a -75 grade part at 133 MHz (7.5 ns) gives tRP = tRCD = 3 and
    tRAS = 6.
  * `ch_type[ch]` and `ch_alloc[ch]` set each channel's class and budget.
  * `period` is the service period.
  * `preempt_en` and `cai_en` switch the two services.
* **Channel 0 (CPU):** `cpu_valid`, `cpu_we`, `cpu_addr` and `cpu_ready`. An
  access is taken when both valid and ready are high. Each access moves one
  burst.
* **Channels 1-6:** `ag_start[ch]` with `ag_cmd[ch]` starts a job:
  * `mode2d`, `tiled`, `we` and `base`;
  * `len` for 1-D jobs;
  * `pitch`, `x0`, `y0`, `w` and `h` for 2-D jobs.

  `ag_busy[ch]` stays high until every burst of the job has been granted.
* **Data:**
  * A channel keeps its next write word on `ch_wdata[ch]`; the word is
    consumed in each cycle where `ch_wd_take[ch]` is high.
  * Read words appear on `rdata` with `ch_rvalid[ch]`, in the order of that
    channel's reads.
* **Status:** `init_done`, `grant_valid/chan`, `col_issued/chan`,
  `xfer_valid/chan`, `ref_issued`, `preempted`, `cai_active` and
  `period_end`.
* **SDRAM:** `sd_cke`, `sd_cs_n`, `sd_ras_n`, `sd_cas_n`, `sd_we_n`, `sd_ba`,
  `sd_a`, `sd_dqm` (held low), and the data bus `sd_dq_out` / `sd_dq_oe` /
  `sd_dq_in`. The bidirectional pad belongs outside.

## Parameters and sizes

| item | default | origin |
|---|---|---|
| channels `NCH` | 7 (1 CPU buffer + 6 generators) | reference design |
| banks | 4 | reference design |
| data width | 16 bits | reference design |
| clock | 100 MHz | reference design |
| tRP, tRCD, CAS latency | 2 cycles each | reference design |
| tRAS | 5 cycles | reference design |
| burst length | 4; 1/2/4/8 possible | reference design |
| rows × columns | 4096 × 512 | SDRAM data sheet |
| tWR, tRRD, tMRD | 2 cycles each | SDRAM data sheet |
| tRFC | 7 cycles | SDRAM data sheet |
| refresh interval | 1562 cycles (64 ms / 4096 rows) | SDRAM data sheet |
| power-up wait | 10000 cycles | SDRAM data sheet |
| CPU address FIFO depth | 4 | own choice |
| tile | 32 × 16 words | own choice |

Synthesised with yosys (generic cells), the default top has about 2,450
cells and 1,760 flip-flop bits, with no latches. The channel count is a
parameter. More than 8 channels needs a wider `CH_W` in `mc_pkg`.

## Where this design departs from, or adds to, its source

* The reference design's internals are described only in outline. The
  following are this design's own, chosen as the simplest thing that does the
  job:
  * the counter structure of the time wheel;
  * the master's arbitration;
  * the refresh handshake;
  * the preemption mechanics (one parked access, resumed afterwards);
  * the pin registering.
* The service period is counted in clock cycles and the budget in data words.
* Each channel has one access in flight. This keeps every stream in order; the
  cost is the bandwidth limit described above.
* Every generator channel has both a 1-D and a 2-D generator, because the
  source does not say which unit needs which.
* dqm is not used. Accesses are whole bursts of whole words.
* Not included:
  * the I/O pads;
  * the SDRAM itself (a behavioural model is in `tb/sdram_model.sv`);
  * the on-chip bus and the client units;
  * the single-bank-controller baseline interface, which the source only
    compares against.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_mc_pkg` | constants, burst codes, mode-register word, conversion of data-sheet times to cycles |
| `tb_time_wheel` | each permission returns exactly after the rule's number of cycles, for random timing and all burst lengths |
| `tb_bank_ctrl` | command sequence for row hit / bank miss / row miss; exact tRP and tRCD spacing; preemption order; hold and close-all |
| `tb_master_ctrl` | with stand-in bank drivers, the time wheel and the SDRAM model: power-up sequence and mode word, command on the pins one cycle after the grant, LS priority, CAI, refresh, data integrity, no timing violation |
| `tb_qas` | an independent model of the scheduling rules predicts every grant, the preempt flag, class demotion and period ends, under random requests and bank states |
| `tb_bag_1d`, `tb_bag_2d`, `tb_ch_agen` | every generated address against a reference formula (linear and tiled); a tile stays in one DRAM row |
| `tb_ch_abuf` | FIFO order, full and empty flags |
| `tb_mis2` | exact read latencies (5/7/9 cycles), two row misses in different banks overlap, random write/read data, refresh, no timing violation |
| `tb_qa_mc_top` | whole controller at default parameters and default timing, 48,000 cycles in two phases (services off, then on) |
| `tb_qa_workload` | whole controller under constrained random streams, sweeping banks, burst length, initiator count and services (below) |
| `tb_qa_stb` | whole controller in a set-top-box scenario with an on-screen-display event, an interactive-TV event and a paused program (below) |

`tb_qa_mc_top` checks:

* every read word, on every channel;
* SDRAM timing, using the model;
* scheduling order (no DC grant while a BS channel with budget left has a
  request);
* that saturated BS channels reach their allocation in at least 95% of the
  periods;
* that the DC channel gets less than the BS channels;
* that the CPU read latency drops with the services enabled.

It also counts every mechanism and fails if any of them never happens:
preemption, CAI, refresh, each DRAM status, demotion, period end, each job
kind, DC grants, turnaround and bank overlap.

In a typical run the average CPU read latency is about 17 cycles without the
services and 9.5 cycles with them.

### Constrained random streams (`tb_qa_workload`)

This testbench uses a reference load of 7 initiators on 4 banks with burst
length 4. Each initiator issues 3 one-burst accesses every 60 cycles:

* initiator 0 is the CPU: latency-sensitive, reads only;
* the other six are bandwidth-sensitive generator channels doing random 1-D
  bursts, one in three a write.

It changes one parameter at a time. For each run it reports the bandwidth
moved over the SDRAM bus (peak: 200 MB/s) and the mean read latency of
initiator 0. Typical results:

| sweep | bandwidth, MB/s | initiator-0 latency, cycles |
|---|---|---|
| banks 1 / 2 / 3 / 4 | 93 / 123 / 133 / 138 | 11.2 / 10.5 / 10.5 / 10.6 |
| burst 1 / 2 / 4 / 8 | 53 / 97 / 137 / 158 | 10.5 / 10.6 / 10.6 / 11.2 |
| initiators 1 / 2 / 3 / 7 | 40 / 79 / 118 / 137 | 9.9 / 10.2 / 10.5 / 10.7 |
| services none / preempt / CAI / both | 158 / 155 / 136 / 138 | 19.3 / 11.9 / 17.6 / 10.6 |

What the table shows:

* CAI costs about 13% of the bandwidth, because it leaves the data bus idle
  while a CPU access waits for it.
* Preemption alone costs little, and most of the latency gain comes from it.

It checks these trends:

* more banks, longer bursts and more initiators each raise the bandwidth;
* more initiators lengthen the CPU latency;
* the two services shorten it.

With these parameters each initiator asks for 40 MB/s (3 x 8 bytes per
600 ns). The reference load quotes 32.4 MB/s per initiator, which these
parameters do not give.

### Set-top-box scenario (`tb_qa_stb`)

Seven units share the SDRAM:

* the CPU is LS;
* transport stream, audio DSP, on-screen display, video decoder and display
  are BS;
* a wireless-LAN download is DC and always busy.

Over 35,000 cycles:

* the on-screen-display unit raises its demand during 5000-10000;
* an interactive-TV application makes the CPU ask for about 45% of the peak
  during 16000-31000, far above its LS allocation;
* the video decoder pauses during 21000-31000.

Words moved per 1000 cycles, shown as received / demanded:

| unit | normal | OSD | normal | ITV | ITV, paused | normal |
|---|---|---|---|---|---|---|
| CPU | 16/16 | 16/16 | 16/16 | 42/448 | 55/448 | 22/16 |
| transport stream | 128/128 | 128/128 | 128/128 | 128/128 | 128/128 | 128/128 |
| audio DSP | 144/144 | 144/144 | 144/144 | 144/144 | 144/144 | 144/144 |
| OSD | 16/16 | 64/64 | 16/16 | 16/16 | 16/16 | 16/16 |
| video decoder | 288/288 | 288/288 | 298/288 | 286/288 | 0/0 | 277/288 |
| display | 144/144 | 144/144 | 144/144 | 144/144 | 144/144 | 144/144 |
| wireless LAN (DC) | 227 | 184 | 220 | 194 | 456 | 238 |

In the busy phases, the CPU's excess demand is served as DC. The program
units keep their bandwidth, and the wireless LAN gives way. Once the video
pauses, the CPU and the wireless LAN share the freed bandwidth.

The testbench checks that:

* every BS unit gets at least 85% of its demand in every phase;
* no DC grant happens while a BS unit has a request;
* the wireless LAN loses bandwidth when the interactive-TV event starts;
* the CPU gains bandwidth when the video pauses.

### SDRAM model

The SDRAM model checks these rules:

* tRP, tRCD, tRAS, tRRD and tRFC;
* write recovery and burst overlap;
* accesses to closed banks;
* refresh with open banks;
* data-bus contention.

### Running a testbench

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/mc_pkg.sv tb/tb_qa_mc_top.sv \
          -y rtl -y tb --top-module tb_qa_mc_top -o sim
obj_dir/sim +verilator+rand+reset+2 +verilator+seed+1
```

Replace `tb_qa_mc_top` with any other testbench name. The RTL is free of
Verilator warnings; `-Wno-fatal` is there for width warnings in testbench
code. All testbenches start
from random register contents and apply an asynchronous reset first.
