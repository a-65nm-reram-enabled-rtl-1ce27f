# Adaptive ReRAM nonvolatile processor: controller, nvFFs and nvSRAM in SystemVerilog

A nonvolatile processor (NVP) keeps working across power interruptions. When the
supply goes away, it saves its registers and working memory into nonvolatile
cells. When the supply returns, it restores them and carries on from where it
stopped. This design holds all of its state in ReRAM-backed cells. The core's
registers live in 1422 nonvolatile flip-flops (nvFFs). The data memory is a 4 KB
nvSRAM, in which every SRAM cell has its own ReRAM device. The program sits in an
8 KB code ReRAM.

The design saves work in three ways:

* **In time.** Many power interruptions are short. For these it is cheaper to
  keep the state at a lowered supply (0.4 V) than to write it into ReRAM. A
  small predictor picks retention or store for each interruption. A timer
  turns a retention that lasts too long into a store.
* **In space.** Only the configured part of the nvSRAM (0 B, 16 B, 256 B, 1 KB
  or 4 KB) is stored and restored. A restore copies 1, 4 or 16 rows of 16 bytes
  per clock cycle. More rows per cycle trade peak current for speed.
* **Per cell.** A self-write-termination (SWT) circuit watches every nvSRAM
  column and every nvFF while it is written. It stops the write as soon as
  that cell's ReRAM has switched. A cell whose ReRAM already holds the right
  value is hardly driven at all. In typical programs most cells match.

Because the nvSRAM is one macro, normal reads and writes run at SRAM speed. A
restore copies ReRAM into the latches in place, with no transfer over a bus. At
100 MHz, restoring the nvFFs and a 16 B nvSRAM takes 2 cycles (20 ns). A full
4 KB restored 16 rows at a time takes 17 cycles (170 ns).

## Block structure

```
nvp_top
├── local_clock                  ring-oscillator model, runs only while asleep
├── adaptive_nv_controller       the NV controller (NVC)
│   ├── time_domain_controller   retention/store forecast, retention timeout
│   ├── nvc_mode_fsm             NORMAL/RETENTION/STORE/OFF/RESTORE, power status
│   ├── wave_generator           nvFF store/restore waveforms, clock gate
│   └── space_domain_controller  nvSRAM row-address walk over the configured size
├── nvff_bank                    NVFF_BITS x nvff_cell on one scan chain
│   └── nvff_cell                (behavioural) flip-flop + two ReRAM devices
├── nvsram                       4 KB nvSRAM macro
│   ├── nvsram_timing            operation decode, row-store sequencer
│   ├── adaptive_parallel_controller  pre-decoders, 1/4/16-row restore, main decoder
│   ├── swt_column x128          self-write-termination per bit column
│   └── nvsram_cell_array        (behavioural) 256 x 128 7T1R cells
└── code_reram                   (behavioural) 8 KB instruction ReRAM
```

`nvp_pkg` holds the shared types: the mode enum, supply states, the
power-status struct, the `Restore<1:0>` codes and the nvFF control bundle.

The CPU core is not part of this RTL. The original system uses an 8051-class
8-bit core. The bus and the timer, UART and GPIO peripherals are not included
either. `nvp_top` brings out whatever they would connect to:

* The core's register state enters and leaves through `core_nvff_d` and
  `core_nvff_q`.
* Its data-memory accesses use the `core_*` SRAM pins.
* Its instruction fetch uses the `code_*` pins.
* The controller's configuration registers are plain inputs, because the bus
  that would write them is outside. These are `time_conf`, `nvsize_last`,
  `nvsram_en`, `restore_mode`, `force_store`, `force_restore` and
  `pred_enable`.
* The power switches are also outside. `pwr` reports, for each domain, whether
  the controller wants it on, at 0.4 V or off.

## Modes and power domains

`nvc_mode_fsm` follows this flow:

```
NORMAL --sleep, forecast=retention--> RETENTION --wakeup--> NORMAL
   |                                      |
   +--sleep, forecast=store--> STORE <----+ timeout
                                 |
                     both stores done
                                 v
                                OFF --wakeup--> RESTORE --both restores done--> NORMAL
```

| mode      | CPU core | retention latch | nvFF NV slave | nvSRAM VDDS | nvSRAM VHVS |
|-----------|----------|-----------------|---------------|-------------|-------------|
| NORMAL    | on       | off             | off           | on          | off         |
| RETENTION | off      | 0.4 V           | off           | 0.4 V       | off         |
| STORE     | off      | on              | on            | on          | on          |
| RESTORE   | off      | on              | on            | on          | on          |
| OFF       | off      | off             | off           | off         | off         |

The nvFF and nvSRAM models use this status as their supply. In OFF, their
latches lose their contents, so a broken restore cannot go unnoticed in
simulation. In RETENTION the contents are kept and the nvFF clock is gated.

`sleep` and `wakeup` are single-cycle requests sampled on `clk`. The flow
enters STORE in two cases: a sleep arrives with the forecast set to store, or
a retention times out. Entering STORE starts the nvFF store and the nvSRAM
store in the same cycle. The flow goes to OFF only when both have finished.
Restore works the same way. A wakeup that arrives during STORE waits for the
store to end.

## Deciding between retention and store

`time_domain_controller` implements a 2-bit predictor. Two history flip-flops,
BK1 and BK2, record whether each of the last two interruptions was *long*. An
interruption is long when the 8-bit retention counter reached 255. The counter
starts at the sleep request, counts local-clock periods and saturates at 255.
At each wakeup, while `pred_enable` is high, the result is shifted into the
history. The controller then decides as follows:

* **Forecast (`backup`).** The next sleep goes straight to STORE only when both
  of the last two interruptions were long. `force_store` forces a store and
  `force_restore` forces retention. If both are set, `force_restore` wins.
* **Timeout threshold.** With history `00` a retention may last the full 255
  counts. With any other history the timeout comes at `time_conf` counts. Once
  one of the last two interruptions was long, a retention gives up sooner.

The local clock is a gated ring oscillator. It is modelled behaviourally in
`local_clock`, with a period set by `LCLK_HALF_NS`. Its edges pass through a
two-flip-flop synchronizer and are counted in the `clk` domain. This requires
`clk` to run at least about three times faster than the local clock. With the
defaults (100 MHz and 10 MHz), a retention with history `00` times out after
about 25.5 µs.

## nvFF store and restore

Each nvFF (`nvff_cell`, behavioural) is a scan flip-flop with two ReRAM devices,
RL and RR. Q=0 is stored as RL=LRS, RR=HRS and Q=1 as RL=HRS, RR=LRS. Restore
sets Q to 0 when RL is LRS and to 1 when RL is HRS. `wave_generator` drives the
five control lines:

| phase        | Store | Restore | SET | RESET | RSWL |
|--------------|-------|---------|-----|-------|------|
| normal/retention | 0 | 0       | 0   | 0     | 0    |
| store, RESET | 1     | 0       | 0   | 1     | 0    |
| store, SET   | 1     | 0       | 1   | 1     | 1    |
| restore      | 0     | 1       | 0   | 0     | 1    |

A store runs the RESET phase and then the SET phase. Each phase ends when no
nvFF reports `busy` any more, or after `T_RESET_MAX` / `T_SET_MAX` cycles as a
worst-case guard. `busy` is the OR over the bank of each cell's SWT flag. In
the model, a driven device switches after 1 to `SW_MAX_CYCLES` cycles. The
delay is spread by a hash of the cell index and the store count, and stands in
for the wide program-time spread of real ReRAM. A device that already holds its
target is never driven. The restore pulse lasts one cycle.

## nvSRAM

### Organisation

The nvSRAM has 256 word lines of 16 bytes (128 bit columns). Its pins are
`CLK CEB WEB ADDR[11:0] Din[7:0] Dout[7:0] Store Restore[1:0]`. `ADDR<11:4>`
selects the row and `ADDR<3:0>` the byte.

| operation | CEB | WEB | Store | Restore<1:0> |
|-----------|-----|-----|-------|--------------|
| write     | 0   | 0   | 0     | 00           |
| read      | 0   | 1   | 0     | 00           |
| store     | 0   | 1   | 1     | 00           |
| restore   | 0   | 1   | 0     | 01 / 10 / 11 |

### Parallel restore

`adaptive_parallel_controller` splits the row address over three
pre-decoders:

* `ADDR<11:8>` drives `xa<15:0>`.
* `ADDR<7:6>` drives `xb<3:0>`.
* `ADDR<5:4>` drives `xc<3:0>`.

Word line `r` opens when `xa[r[7:4]]`, `xb[r[3:2]]` and `xc[r[1:0]]` are all
high. Restore code `10` (4WL) forces every `xc` output on, which opens the 4
rows that share `ADDR<11:6>`. Code `11` (16WL) also forces every `xb` output
on, which opens the 16 rows that share `ADDR<11:8>`. Code `01` opens a single
row.

### Row store with self-write-termination

This is the least obvious part of the design. The whole row at `ADDR<11:4>` is
written in parallel, and `nvsram_timing` sequences it in four steps:

1. **Precharge, one cycle.** Both bit lines of every column go high. This arms
   each column's `swt_column`.
2. **Word line opens.** In each column, the bit line on the side of the latch
   that holds 0 falls. For Q=0, BL falls and the column SETs its ReRAM toward
   LRS. For Q=1, BLB falls and the column RESETs toward HRS. While exactly one
   bit line is low, the column's write driver is on (`driver_en`).
3. **Device switches.** The current through the switched ReRAM overwrites the
   latch, so Q inverts. The second bit line then falls, and with both low the
   column disarms and its driver stops. A cell that already holds the target
   state flips in its first driven cycle.
4. **Row ends.** The row is finished when no column is armed any more, or
   after `STORE_MAX_CYCLES` word-line cycles as a guard. `row_done` pulses once.

After a store, the latches hold the inverted data. This does not matter,
because a store is always followed by OFF and a restore. `switch_count` and
`drive_cycles` count the switched devices and the column-cycles with a driver
on. They stand in for store energy, which is not modelled.

### Space-domain controller

`space_domain_controller` walks the rows during a store or restore. It has an
8-bit counter on `ADDR<11:4>` and a step decoder:

* A restore steps +1, +4 or +16, following `restore_mode`. It issues one group
  per cycle.
* A store steps +1 and advances on each `row_done`.

A comparator against `nvsize_last` ends the walk. `nvsize_last` is the index of
the last row: 0, 15, 63 or 255 for 16 B, 256 B, 1 KB or 4 KB. With
`nvsram_en = 0` (the 0 B size), the walk ends at once. The comparator tests
"last row of this group ≥ `nvsize_last`", so a size smaller than one group
takes a single step.

## Timing

The RESTORE mode lasts max(2, G+1) cycles, where G is the number of row groups
walked. At 100 MHz:

| configuration        | 1WL    | 4WL    | 16WL   |
|----------------------|--------|--------|--------|
| nvFF only / 16 B     | 20 ns  | 20 ns  | 20 ns  |
| 256 B                | 170 ns | 50 ns  | 20 ns  |
| 1 KB                 | 650 ns | 170 ns | 50 ns  |
| 4 KB                 | 2.57 µs| 650 ns | 170 ns |

These match the restore times published for the fabricated chip in every
configuration that was measured there. The 1 KB/1WL, 4 KB/1WL and 4 KB/4WL
entries are this design's extrapolation.

A store takes as long as its slowest cells. With the default models, a 4 KB
store of random data takes about 65,600 cycles (0.66 ms). Storing the same data
again takes about 1,540 cycles, because every cell already matches. The
published store times are 4 µs to 1.02 ms.

## How far to trust it

* **Synthesizable and checked against the specification.** These are the
  controller (`adaptive_nv_controller`, `time_domain_controller`,
  `nvc_mode_fsm`, `wave_generator`, `space_domain_controller`) and the digital
  parts of the nvSRAM (`nvsram_timing`, `adaptive_parallel_controller`,
  `swt_column`).
* **Behavioural models.** The ReRAM cells (`nvff_cell`, `nvsram_cell_array`),
  the `local_clock` ring oscillator and the `code_reram` macro are behavioural.
  They reproduce the logic-level behaviour: the state encoding, the store
  phases, termination, restore polarity and data loss without power. They do
  not model the analog circuits, such as write drivers, the dual-supply
  pulse-overwrite restore, voltages or energy.
* **Own choices where the source is silent.** These include:
  * the exact combination of predictor bits and overrides
  * the threshold chosen for history `11`
  * the cycle-level store sequence and its guard lengths
  * the `row_done` handshake
  * the `nvsize_last` encoding plus a separate 0 B enable
  * the one-cycle nvFF restore pulse
  * the program-time spread of the models
  * the code ReRAM port and program time
* **Departures from the drawn structure.**
  * The retention counter counts synchronized local-clock edges in the `clk`
    domain, instead of being clocked by the local clock. This avoids a clear
    that crosses clock domains.
  * The SWT latch is a flip-flop sampled on the clock, not an analog latch.
  * The nvFF clock gate is a clock enable.
* **Not implemented.** The 8051 core, the bus, the peripherals, the power
  switches and regulators, and any energy model are not implemented.

## Simulating

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`. The package must be compiled
first. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/nvp_pkg.sv tb/tb_nvsram.sv --top-module tb_nvsram -o sim
./obj_dir/sim
```

`tb_nvp_top` runs the whole design at its default size (1422 nvFF bits, 4 KB
nvSRAM, 8 KB code ReRAM). It acts as the core: it loads state and then goes
through these steps:

1. a short interruption (retention)
2. a long one (retention that times out into a store, OFF, then a 16-row
   parallel restore of 4 KB in 17 cycles)
3. a second long one (timeout at `time_conf`, history becomes `11`)
4. a forecast store of unchanged data (no device switches, about 40x shorter)
5. a forced retention
6. a forced store with a 16 B nvSRAM (2-cycle restore)
7. a scan-chain shift and a code ReRAM access

After every wakeup it checks that all nvFF and nvSRAM contents are back. It
counts each of these mechanisms and fails if one never happened. Building it
takes about a minute and a half, and the simulation runs for a few seconds.

Parameters such as the program-time bounds (`T_RESET_MAX`, `T_SET_MAX`,
`STORE_MAX_CYCLES`), the model spreads (`NVFF_SW_MAX`, `NVSRAM_SW_MAX`) and the
local clock period (`LCLK_HALF_NS`) are parameters of `nvp_top`. None of them
comes from a published number, so change them freely.
