# PC-driven power management for split on-chip memory

Many microcontrollers could split their SRAM into several independently
powered modules. A module that is idle for long enough could then sit in a
low-leakage mode. In practice this is seldom used. Switching a module needs an
explicit instruction in the software, and the idle gaps worth using can be
only a few clock cycles long. Putting a power-mode store in front of every such
gap would bloat the code and change its timing.

This design removes the instructions. A small **power management controller
(PMC)** watches the core's program counter. Before the application runs,
software loads a table into the PMC, once. Each entry pairs an instruction
address with a new power mode for some of the memory modules. Whenever the
core decodes an instruction whose address is in the table, the PMC switches
those modules by itself. The schedule is made offline from a timed execution
trace of the program, so the running software is not changed at all.

The RTL contains:

* the PMC (`pc_pmc`) and its four parts,
* a split code bank and a split data bank (`mem_bank`), each made of four
  memory modules,
* a behavioural model of a memory macro with power pins (`sram_macro_pm`),
* a top level (`pmc_mcu_top`) that joins them. The processor core, the bus
  fabric and the boot loader are outside it. Their signals are top-level ports.

## When a sleep pays off

A module in a sleep mode `p` leaks less than an active one. Entering and
leaving the mode costs a fixed energy `E_switch(p)`. An idle gap of length `T`
between two accesses to the module is worth a sleep when

    (P_active - P_sleep(p)) * T  >  E_switch(p)

so the break-even time is `E_switch(p) / (P_active - P_sleep(p))`. The
schedule generator picks, for every gap that is longer than this, the mode
that saves the most. It puts the sleep on the instruction that makes the last
access before the gap. It puts the wake-up on the instruction that makes the
first access after it. Modules that hold nothing are shut down by the first
entry of the program. The hardware only carries out the schedule. It makes no
decisions of its own.

Power modes (`pmc_pkg::pm_e`):

| mode       | code | contents | pins         |
|------------|------|----------|--------------|
| active     | 0    | kept     | none high    |
| light sleep (LS) | 1 | kept  | `ls`         |
| deep sleep (DS)  | 2 | kept  | `ds`         |
| shut down (SD)   | 3 | lost  | `sd`         |

## The controller

```
 pc, pc_valid ──► pmc_pc_match ──(modes, enables)──► pmc_mem_delay ×N_MEM
                   ▲  one "=" per entry,                │ sleep: DELAY cycles
                   │  encoder, mux                      │ wake : at once
 APB ──► pmc_apb_regs (table of N_ENTRIES)              ▼
                   ▲                            pmc_active_config ──► ls/ds/sd
                   └──── read-back of current modes ────┘              per module
```

* **`pmc_apb_regs`**: the table. Each entry holds a PC address and a bank
  configuration: a 2-bit mode and an enable bit for every module. Only the
  modules whose enable bit is set are touched when the entry fires, so one
  entry can put module 5 to sleep and leave the other seven alone. The entries
  are flip-flops, because every entry is compared in every cycle. After reset
  all enable bits are zero, so the controller does nothing until it is
  programmed.
* **`pmc_pc_match`**: one equality comparator per entry, gated by
  `pc_valid`. An encoder picks the matching entry (the lowest index if two
  entries hold the same address), and a multiplexer forwards that entry's
  configuration. This part is combinational.
* **`pmc_mem_delay`**: one per module. See the next section.
* **`pmc_active_config`**: the register that holds each module's current
  mode and drives its `ls`/`ds`/`sd` pins from flip-flops. After reset all
  modules are active, because the boot code fills them before the schedule
  starts.

### Why sleeps are delayed and wake-ups are not

The PC is taken from an early pipeline stage: the decode stage of a
four-stage RISC-V pipeline. The instruction that triggers a sleep is usually
the last one to touch that module, and its own data access only happens one
or two stages later. If the module went to sleep at the match, that access
would find it asleep. So every request for a sleep mode goes through a
`DELAY`-stage shift register. A request for the active mode bypasses the
shift register, because a late wake-up is the error that matters and an
early one only costs a few cycles of leakage.

Timing, with the decode-stage PC matching in cycle `t`:

| request              | enters `pmc_active_config` | pins change in cycle |
|----------------------|----------------------------|----------------------|
| wake-up (active)     | end of cycle `t`           | `t + 1`              |
| sleep (LS, DS, SD)   | end of cycle `t + DELAY`   | `t + DELAY + 1`      |

With `DELAY = 2` and the data access of the decoded instruction in cycle
`t + 1`, the module sleeps from `t + 3`, after the access. An instruction
decoded in cycle `u` that accesses a module in `u + 1` can wake the module
itself, because the pins are low from `u + 1`.

Two rules of this implementation are not fixed by the underlying method and
may matter if you change the pipeline:

* A wake-up for a module **cancels every sleep request of that module still
  in its shift register**. The later request wins. Without this, a sleep
  scheduled just before a wake-up would fire after it and leave the module
  asleep when it is needed. If a sleep leaves the shift register in the same
  cycle as a wake-up arrives, the wake-up wins.
* `DELAY` is a build-time parameter. It has to cover the distance in cycles
  from the stage the PC is taken from to the end of the last memory access.
  **A stall** of the decode stage keeps the same PC valid for several cycles,
  and the entry is then applied again in each of them. That is harmless for
  wake-ups. For a sleep, a stall longer than `DELAY - 1` cycles between the
  match and the access would let the sleep arrive first. A schedule for a
  core with such stalls needs a larger `DELAY` or a sleep placed on a later
  instruction.

`pc_valid` must be low for a decode slot that will be flushed, for example a
wrong-path instruction after a mispredicted branch. A typical case is the
instruction after a loop branch: it is fetched and decoded on every
iteration but executes only when the loop ends. An entry on it must fire only
then.

### Register map

32-bit registers, byte addresses, APB3 with zero wait states (`pready` is
always 1). `paddr[1:0]` is ignored.

| address            | access | content |
|--------------------|--------|---------|
| `8*i`              | R/W    | PC address of entry `i` (low `PC_W` bits) |
| `8*i + 4`          | R/W    | bits `[2m+1:2m]`: mode for module `m`; bit `2*N_MEM + m`: enable for module `m` |
| `8*N_ENTRIES`      | R      | current mode of every module, same packing as the mode field |
| `8*N_ENTRIES + 4`  | R      | `{DELAY[7:0], N_MEM[7:0], N_ENTRIES[15:0]}` |

Writes to the two read-only registers, and any access beyond them, complete
with `pslverr = 1` and change nothing. A bank configuration must fit one
register, so `N_MEM` is at most 10.

## Memory subsystem

`pmc_mcu_top` holds a code bank and a data bank. Each bank has `N_MOD_BANK = 4`
modules of `MOD_BYTES` bytes. Each module covers one contiguous address
range, selected by the upper bank address bits. PMC module index `m` is code
module `m` for `m < 4` and data module `m - 4` above that. Both bank ports are
simple SRAM ports (request, write, byte enables, address, write data), with
read data one cycle later. The instruction port is also writable, so a boot
loader can fill the code bank.

A bank raises `sleep_access` (`i_sleep_access`, `d_sleep_access` at the top)
with the module index, one cycle after any request that reaches a module that
is not active. A correct schedule never causes this. The flag exists to check
schedules in simulation.

`sram_macro_pm` is a **simulation model**, not hardware. It stands in for a
foundry low-leakage SRAM macro, whose exact ports and timing depend on the
memory compiler. It models:

* a synchronous read with one cycle of latency and byte-masked writes,
* no access in LS, DS or SD: it raises `err` and returns `POISON`
  (`32'hDEAD_BEEF`),
* retention in LS and DS,
* loss of all contents in SD. Each word carries the "epoch" it was written
  in, and every shut-down starts a new epoch, so words not rewritten since
  read as `POISON`.

It has no wake-up latency. If your macro needs wake-up cycles, the wake-up
entries have to move that many instructions earlier in the schedule.

## Parameters and the two evaluated configurations

| parameter    | default | meaning |
|--------------|---------|---------|
| `N_ENTRIES`  | 128     | table entries (comparators) |
| `PC_W`       | 32      | compared PC bits; 18 bits are enough for a 256 KiB code bank |
| `DELAY`      | 2       | sleep delay in cycles |
| `N_MOD_BANK` | 4       | modules per bank (`N_MEM = 2*N_MOD_BANK` in the PMC) |
| `MOD_BYTES`  | 65536   | bytes per module |
| `APB_AW`     | 12      | APB address bits |

The defaults are the larger of two configurations the method was evaluated
with: 8 × 64 KiB modules and a 128-entry PMC. The smaller one is 8 × 16 KiB
with 16 entries (`N_ENTRIES = 16`, `MOD_BYTES = 16384`). The reported
schedules for four small benchmark programs needed 11 and 14 entries in the
small configuration, and 43 and 31 entries in the large one. All of them fit.
The PMC's own power grows about linearly with the number of entries, and
somewhat more slowly with `PC_W`. For low power, size `N_ENTRIES` to the
longest schedule you expect, and `PC_W` to the code address range.

## What is the method's and what is this implementation's

Taken from the method: a table of PC addresses with a per-module mode and
enable bit, written over APB by the application at start-up; comparators
qualified by a PC-valid flag that is low on flushed slots; an encoder and a
configuration multiplexer; a per-module delay used only for transitions into
sleep modes, two cycles for a 4-stage core whose decode-stage PC is observed;
a register of the applied configuration driving LS/DS/SD pins; four equal
modules per bank; the sizes above.

Choices of this implementation: the register map and error responses, the
lowest-index priority, the cancelling of delayed sleeps by a wake-up, a
build-time (not run-time) delay length, the reset state (everything active),
the 2-bit mode encoding, the module numbering, the bank port, the
`sleep_access` check, and the whole behaviour of the memory model. The
processor core, the platform's bus fabric, the third (shared) memory bank of
the host platform, and the software flow that produces the mapping and the
schedule are not part of this RTL.

## Simulation

Every file starts with a description of its block. The testbenches are
self-checking. Each prints `TB_RESULT checks=<n> failures=<n>` and stops
itself through a watchdog if it hangs.

| testbench              | block | what it checks |
|------------------------|-------|----------------|
| `tb_pmc_apb_regs`      | table | random programming, table outputs, read-back, status/info registers, `pslverr` |
| `tb_pmc_pc_match`      | match | hits, misses, flushed PCs, duplicate addresses (lowest index) against a reference search |
| `tb_pmc_mem_delay`     | delay | cycle-exact output against a reference, `DELAY = 2` and `DELAY = 0`, cancelled sleeps |
| `tb_pmc_active_config` | active config | stored modes and pins after random updates, reset state |
| `tb_pc_pmc`            | PMC | directed latency (sleep at `DELAY+1`, wake at 1), masking, flush; 4000 random cycles against a time-stamped reference |
| `tb_sram_macro_pm`     | memory model | data, blocked accesses in every mode, retention, loss on shut-down |
| `tb_mem_bank`          | bank | decode, read data, `sleep_access` and its index, loss of one module only |
| `tb_pmc_mcu_top`       | top, default size | two synthetic programs with 43- and 31-entry schedules |
| `tb_pmc_mcu_top_16k`   | top, 8 × 16 KiB, 16 entries | two synthetic programs with 11- and 14-entry schedules |

The two top-level testbenches share `tb/pmc_mcu_driver.sv`. It acts as the
core, the boot loader and the schedule generator. It builds a program loop in
which the data modules are used in bursts and derives the sleep schedule as
described above. It loads code and data through the bank ports, writes the
table over APB and runs the loop on a pipeline model. That model fetches one
cycle before decode, accesses data one cycle after decode, and has one
flushed slot after each taken loop branch. In every cycle it compares all
power pins with a reference timeline, and it checks fetched words, read data
and the absence of accesses to sleeping modules. In idle data-port cycles it
also sends probe reads to data modules that should be asleep. Each probe must
be blocked and flagged with the right module index, which shows that the pins
really reach the right macros. At the end it checks that
every mechanism occurred: matches, wake-ups, delayed light sleeps,
shut-downs, matches suppressed in flushed slots, entries that leave modules
alone, and blocked probes. It prints the share of cycles each data module spent in light
sleep.

With plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/pmc_pkg.sv tb/tb_pmc_mcu_top.sv --top-module tb_pmc_mcu_top -Mdir obj_top
./obj_top/Vtb_pmc_mcu_top
```

Replace the testbench name to run any other testbench. The default-size
top-level run takes a few seconds to build and well under a second to run.
