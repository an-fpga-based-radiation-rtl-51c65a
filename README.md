# Artemis: a TMR + scrubbing + spares computer on commercial FPGAs

Modern FPGAs made on small process nodes tolerate total ionizing dose well.
They are, however, exposed to single event upsets in their flip-flops and in
their configuration memory. This design tolerates such upsets by running
nine identical copies ("tiles") of a small computer on the experiment FPGA.
It does not rely on one hardened copy. Three tiles run at a time in triple
modular redundancy; the other six are spares. When the voter sees one active
tile disagree, the tile leaves the triad at once and a spare takes its place.
The faulted tile's region of the FPGA is then rewritten in the background by
partial reconfiguration, and the tile becomes a spare again. A second,
control FPGA does the bookkeeping and owns the configuration port of the
experiment FPGA. It also keeps the bitstreams on an SD card.

The RTL here covers the digital logic of both FPGAs, with the control
software's tile management and task timing written as hardware. It is
SystemVerilog (IEEE 1800-2017) and synthesizable. Simulation models of the
surrounding chips are in `tb/`.

## Block diagram

```
            experiment FPGA, clk_voter = 10 MHz                    control FPGA, clk_ctrl = 20 MHz
 +-------------------------------------------------+        +-------------------------------------------------+
 | tile_clk_div --tick (156.25 kHz)--+             |        |  task_scheduler --move/repair/inject/scrub-->   |
 |                                   v             |        |        |  \--file--> sd_mode_ctrl --> MAX14502  |
 |  tmr_tile x9 --tile_out[9]--> tile_mux --3--> tmr_voter  |        |                                        |
 |     ^  ^ load[9]                 ^  |          |  |      |        v                                        |
 |     |  +-------------------------+  |   voted  |  | Health_Tile  tile_manager --cfg req--> selectmap_cfg --> SelectMAP
 |     +-- voted (sync value) ---------+----------+  +--sync-->     |   ^              |            ^          pins
 |  aux reset <- tile_cfg_rst (partial reconfig.)  |  <--triad------+   | scrub report |            |
 +-------------------------------------------------+   (toggle)         |              |  bitstream_table
                                                                        |              v            |
                                                     temp_sensor_reader |        sd_spi_reader <----+--> SD card
                                                     (MAX6627, SPI)     |
                                                                        +--------------------------------------
```

## Tile life cycle: the core of the design

Each tile is in one of three states, held in `tile_manager`:

| state   | meaning                                      | leaves it when                                   |
|---------|----------------------------------------------|--------------------------------------------------|
| active  | one of the three slots of the triad          | the voter or the scrubber reports it faulted      |
| spare   | running, not voted                           | it is chosen to replace an active tile; or the scrubber reports it |
| faulted | waiting for, or undergoing, repair           | its clean partial bitstream has been loaded       |

**Detection.** `tmr_voter` compares the three active outputs pairwise.
`Health_Tile` is 3 when all agree, and otherwise the slot (0, 1, 2) whose word
differs from the other two. If all three differ, no slot can be named;
`no_majority` flags this and the manager takes no action. The manager acts on
a value only if it sees it in two successive samples. This rejects a
momentary mix of old and new bits from the synchroniser.

**Replacement.** The faulted tile is replaced at once. Spares are taken round
robin. The search starts just after the last tile brought in, so a fault in
the triad {0,1,2} brings in tile 3, then 4, and so on. Once the triad is
{6,7,8}, the next candidate is tile 0. If no spare is left, the slot is
remembered. The move is completed by a later Move Tile task, once a repair
has produced a spare.

**Synchronisation of the incoming spare.** A spare that has just been
repaired has restarted from zero, so it cannot simply be switched in. The
manager sends the new triad, with a flag for the incoming tile, to
`tile_mux` in the experiment FPGA. The multiplexer holds it until the next
tile tick. On that tick it switches the selection and tells the incoming tile
to load the voted value plus one, the value the other two reach on that same
tick. From the next clock all three agree. The multiplexer then acknowledges.
The manager waits for the acknowledge, then `HOLDOFF` more clocks, before it
reads Health_Tile again.

**Repair.** On each Repair Tile task (1 s), the lowest-numbered faulted tile
that is no longer in the triad gets its clean partial bitstream. When the
configuration engine reports success, the tile becomes a spare. A failed
load leaves it faulted, so a later task retries it.

**Fault injection.** For testing, a Fault Injection task rewrites the region
of one active tile, taking the slots in turn. It uses either the clean
partial bitstream (the tile restarts and falls out of step) or the corrupted
one (the tile stops working). Either way the voter notices, and the normal
replacement and repair follow. The corrupted copies sit on the SD card next
to the clean ones.

**Scrubber reports.** The configuration-memory scrubber is a separate core,
not part of this RTL. It can report any tile through
`scrub_fault`/`scrub_tile`. An active tile is then replaced as above; a
spare is only marked faulted.

**Blind scrub.** A Blind Scrub task rewrites the whole bitstream without
pulsing PROGRAM_B. This refreshes the configuration of the static logic
(voter, multiplexer) without restarting the running design.

The manager also counts faults per tile, all faults and injected faults. It
exposes the triad and the next spare, the items a status display shows.

## Configuration path

`bitstream_table` holds the card layout of the mission:

| bitstream            | start (bytes)  | length (bytes) |
|----------------------|----------------|----------------|
| full, clean          | 0x00000400     | 0x00947A5C     |
| tile 0 clean / bad   | 0x00948000 / 0x01B17E00 | 0x000C1530 |
| tile 1 clean / bad   | 0x00A09600 / 0x01BD9400 | 0x000AF2B0 |
| tile 2 clean / bad   | 0x00AB8A00 / 0x01C88800 | 0x00109210 |
| tile 3 clean / bad   | 0x00BC1E00 / 0x01D91C00 | 0x0010C470 |
| tile 4 clean / bad   | 0x00CCE400 / 0x01E9E200 | 0x00109210 |
| tile 5 clean / bad   | 0x00DD7800 / 0x01FA7600 | 0x0010C470 |
| tile 6 clean / bad   | 0x00EE3E00 / 0x020B3C00 | 0x0011E6F0 |
| tile 7 clean / bad   | 0x01002600 / 0x021D2400 | 0x0010C470 |
| tile 8 clean / bad   | 0x0110EC00 / 0x022DEA00 | 0x000C1530 |

Every start is a multiple of 512, so `start >> 9` is the SD block number.
There is no corrupted full bitstream.

`selectmap_cfg` fetches one 512-byte block at a time from `sd_spi_reader`.
It forwards exactly `length` bytes to the 8-bit slave SelectMAP port and
drops the rest of the last block. Each byte gets one CCLK pulse while
CSI_B and RDWR_B are low. A full configuration pulses PROGRAM_B low for
`PROG_CYCLES` clocks and waits for INIT_B first. Afterwards it waits for
DONE, with a timeout. Partial loads and scrubs skip both steps. The state
of DONE at the end is reported in `done_seen`.

`sd_spi_reader` brings the card up in SPI mode: 80 idle clocks, CMD0, CMD8,
then CMD55 + ACMD41 until the card is ready. During this SCK is
clk/(2·`SLOW_HALF`), 400 kHz by default. It then reads with CMD17, using
block addressing (SDHC/SDXC cards), at clk/(2·`FAST_HALF`), 10 MHz by
default. A byte takes 16 clocks on the wire. The SelectMAP side only needs 2
clocks per byte, so the stream has no back-pressure.

Timing at the defaults: a partial bitstream (0.7–1.2 MB) loads in about
1 s. The full bitstream takes about 9 s. The initial configuration after
reset dominates start-up.

## Clock domains

Two clocks enter the top: `clk_voter` (10 MHz) for the experiment FPGA and
`clk_ctrl` (20 MHz) for the control side. The tiles do not get a third
clock. `tile_clk_div` makes a one-cycle `tick` every 64 voter clocks
(156.25 kHz), and the tiles count on it. Three signals cross between the
domains:

* Health_Tile goes to the control side through a 2-flop synchroniser, with
  the two-sample filter in the manager.
* The triad update goes to the voter side as a toggle pulse (`cdc_pulse`).
  The triad and synchronisation flags are held stable by the manager until
  the acknowledge returns.
* The acknowledge returns as a toggle pulse.

Outputs of the top whose names end in `_v` belong to the voter domain. All
others belong to the control domain.

## Periodic tasks

`task_scheduler` has 16 slots, each holding a period in whole seconds and an
enable. A prescaler of `CLK_HZ` clocks makes the second. Due slots are queued
lowest number first and dispatched in arrival order. A slot that falls due
while still queued is counted in `overruns` and not queued again. After reset
the slots hold the mission table:

| slot | task                     | period      | in this RTL                                   |
|------|--------------------------|-------------|-----------------------------------------------|
| 0    | Move Tile                | 1 s         | retries a move that had no spare              |
| 1    | Repair Tile              | 1 s         | starts one repair                             |
| 2    | Update Power Measurement | 20 min      | pulse on `task_power_meas`                    |
| 3    | Update Power Logs        | 20 min 5 s  | pulse on `task_power_logs`                    |
| 4    | Active Tiles Update      | 5 s         | pulse on `task_active_upd`                    |
| 5    | Write Data File          | 12 h        | data card switched to the FPGA (`sd_mode_ctrl`) |
| 6    | Watchdog Update          | 30 min      | pulse on `task_watchdog`                      |
| 7    | Fault Injection          | 11 h        | injects into the next active slot             |
| 8    | Blind Scrubber           | 7 h         | full rewrite without PROGRAM_B                |

Any slot can be rewritten through the `sched_*` ports (period 0 or enable 0
stops it).

## Peripherals

* `temp_sensor_reader` reads a MAX6627 remote-diode sensor on the
  experiment FPGA's die. It uses 3-wire SPI at 2 MHz, every `PERIOD` clocks
  (0.5 s). The 16-bit word is read with bits 15..3 as a signed temperature in
  1/16 °C, following the sensor's data sheet.
* `sd_mode_ctrl` hands the data SD card between the USB card reader
  (MAX14502, card-reader mode) and the FPGA (pass-thru mode). On every
  switch it cuts card power for `OFF_CYCLES` and waits `ON_CYCLES` after
  power-up; an assertion checks that the mode never changes while the card
  is powered. The FPGA may write while `data_write_grant` is high. Writing
  the file itself (FAT file system, data packet format) is software and is
  not included.

## What connects from outside

The top brings these out as ports:

* **Clocks.** The vendor clock generators.
* **The experiment FPGA's configuration logic.** The SelectMAP pins go out.
  Its effect on a tile comes back as `tile_cfg_rst`: a tile whose region
  was rewritten restarts from zero.
* **The configuration scrubber.** `scrub_fault`, `scrub_tile`.
* **The two SD cards, the MAX14502 and the MAX6627.**

In a real system the soft processors inside each tile would replace
`tmr_tile`. Here `tmr_tile` implements their program's visible behaviour,
a 14-bit counter that rolls over after 16383.

Not included: the PMBus link to the power-sequencing controllers (its
commands and data formats are not specified); the RS-232 user interface and
the data-file formatting (software); the power supplies (analog).

## Where this RTL departs from the flight system, and its own choices

* Tile management and task timing are logic here. In the flight system,
  software on the control FPGA's soft processor does them. The order of
  operations is kept.
* Replacement happens at once, and repair waits for the 1 s Repair Tile
  task. The flight software is said to bring in the spare without delay,
  yet its task table also lists a 1 s Move Tile task; here that task only
  retries moves that found no spare.
* Own choices, each documented at the top of its file:
  * the Health_Tile value 3 for "all agree" (shown as "Voter Output: 3" on
    the status display during normal running), and 0..2 for the faulted slot;
  * `no_majority`;
  * the synchronisation method;
  * the round-robin spare order, read off the "next spare" values of the
    status display;
  * the slot-by-slot choice of injection target;
  * blind scrub without PROGRAM_B;
  * the SPI and SelectMAP protocol details, all delays and timeouts;
  * the crossing scheme;
  * the divide-by-64 for the "156 kHz" tile clock.

## Parameters (defaults)

| module / top parameter        | default     | meaning |
|-------------------------------|-------------|---------|
| `N_TILES`, `N_ACTIVE`, `TILE_W` (package) | 9, 3, 14 | tiles, triad size, tile output width |
| `TILE_DIV`                    | 64          | voter clocks per tile tick |
| `SCHED_CLK_HZ` / `CLK_HZ`     | 20 000 000  | control clocks per scheduler second |
| `SD_SLOW_HALF`, `SD_FAST_HALF`| 25, 1       | SCK half period in clocks during init / reads |
| `TEMP_PERIOD`                 | 10 000 000  | clocks between temperature reads |
| `MODE_DELAY`                  | 200 000     | card power-off and power-on wait |
| `HOLDOFF`                     | 16          | clocks after a triad change before Health_Tile is read |
| `PROG_CYCLES`, `INIT_TIMEOUT`, `DONE_TIMEOUT` | 20, 2 M, 2 M | SelectMAP timing |

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. The simulation models are:

* `sd_card_model`: an SPI-mode SD card whose content is a function of the
  address. The first byte of each bitstream marks which bitstream it is.
* `artix_cfg_model`: the experiment FPGA's configuration port. It checks
  every byte and the length of each load, and drives DONE, INIT_B, the
  design reset and the per-tile resets.
* `max6627_model`: the temperature sensor.

The shared reference data (card layout, card content) is in
`tb/artemis_tb_pkg.sv`.

With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_tmr_voter \
  -y rtl -y tb +libext+.sv rtl/artemis_pkg.sv tb/artemis_tb_pkg.sv tb/tb_tmr_voter.sv
./obj_dir/Vtb_tmr_voter
```

Replace the testbench name for the other blocks.

`tb_artemis_top` runs the whole design at its default parameters, with real
bitstream sizes and real time. It covers:

* the complete 9.7 MB initial configuration;
* a data-card handover;
* a clean and a corrupted fault injection, each detected, replaced,
  synchronised and repaired;
* scrubber reports for a spare and for an active tile;
* the first 64 KB of a blind scrub.

It also checks the temperature reads and the software task pulses, and
counts each mechanism. Because the bitstreams are large, it simulates about
15 s of real time, which takes several minutes. `tb_selectmap_cfg` loads two
partial bitstreams and one full bitstream, about 2.5 minutes.
`tb_tile_manager` exercises the manager alone with fast stand-ins, including
the case where every spare is used up.
