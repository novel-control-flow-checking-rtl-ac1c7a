# YACCA control-flow-checking peripheral

A safety-relevant task can run on a CPU core whose own integrity is lower than the task
requires. One way to close the gap is to have something independent watch that the task's code
is executed in a legal order. This peripheral does that in hardware. It implements YACCA
(Yet Another Control-flow Checking using Assertions). The task still carries its software
annotations, but the checking, the counting and the timing move off the CPU. The monitor
only listens to the CPU's data-memory writes. It never stalls or changes them, so it cannot
interfere with the task it watches.

## The YACCA idea in two writes

The program is cut into *basic blocks*: straight-line code with one branch at the end. The
legal transitions between blocks form the control-flow graph. Every block gets a one-hot
*ID*: block *i* owns bit *i*. Every block also gets a *predecessors mask*, with bit *j* set
for each block *j* that may jump into it. The hardened code does two things per block:

* **Test**: on entry, write the block's predecessors mask.
* **Set**: then write the block's own ID, the *annotation*.

After a Test, the annotation still holds the ID of the block just left. The transition was
legal exactly when that ID is in the mask:

    error = | (ID & ~mask)

The peripheral does one such check per Test. If the program jumps into a block it could not
reach, or writes a corrupted ID or mask, the check fails. If a Test or Set is skipped,
repeated or delayed, the two writes no longer pair up in time, and a watchdog catches it.

## How software talks to a controller

Each controller is programmed with two byte addresses in the task's data memory: `ANN_BASE`
and `MASK_BASE`. A vector of up to 200 bits is stored as consecutive 32-bit words:
bits 31:0 at the base address, bits 63:32 at base+4, and so on, up to seven words.

* Software writes the upper words first (only those the task needs) and **word 0 last**.
* Upper words are only staged. The write of word 0 loads the whole vector into the
  checker at once, and it counts as one Set (annotation) or one Test (mask).
* A task with at most 32 blocks needs only word 0, so Set and Test are one store each.
* Upper words that a task does not rewrite keep their last value. For one-hot IDs the
  software must rewrite a word that held the previous ID's bit, or clear it.

Stores of other widths, or to other addresses, are ignored. Byte enables are not looked at.
The per-block IDs and masks themselves are compile-time tables kept in the task's own data
memory. The peripheral never reads them: it sees only the value that each Set or Test
copies to the watched location.

## Inside one controller

```
 snooped write bus ──┬─> annotation sniffer ──> ID vector ─────┐
                     │        │ Set                             v
                     └─> mask sniffer ───────> mask vector ──> YACCA checker (8 x 25)
                              │ Test                            │
                        Set / Test counters ── match ──> control logic ──> cfe
                              └── mismatch ──> watchdog ──> wd_err
```

* **Sniffers** (`write_sniffer`): decode writes into the vector's address window, stage the
  upper words and load the vector when word 0 is written. Detection is combinational, in
  the cycle of the write. The vector is registered.
* **Counters** (`set_test_counters`): one 8-bit counter for Sets and one for Tests. In a
  correct flow they are equal after each Test and one apart between a Set and its Test.
* **Control logic** (`cfc_control_logic`): runs the YACCA check only while the two counts
  are equal, that is, right after a Test. A failing check sets the sticky error `cfe`.
* **Scalable checker** (`yacca_checker`, `yacca_slice`): the equation is built from
  `N_SLICES` identical 8-bit replicas. An enable control (`SIZE_SEL`) chooses how many
  replicas the task uses, and an output stage ORs the enabled replicas' errors. With the
  default 25 replicas a controller covers 200 basic blocks, about the size of a typical
  automotive task. `SIZE_SEL = k` uses bits 0..8k-1. `SIZE_SEL = 0`, or above 25, uses all.
* **Watchdog** (`cfc_watchdog`): counts cycles while the counts differ. When the mismatch
  has lasted `TIMEOUT` cycles it sets the sticky `wd_err`. `TIMEOUT = 0` turns it off. It
  also stores the Set-to-Test distance of the last pair in `GAP`, for timing measurements.

### Timing of one check

| cycle | event |
|-------|-------|
| T     | word 0 of the mask is on the bus; `test_pulse` is high |
| T+1   | the mask vector and the Test count are updated; the counts now match |
| T+2   | `cfe`, and with it `err` and `irq`, is high if the transition was illegal |

A Set written in cycle S, followed by a Test in cycle T, trips the watchdog when
T − S ≥ `TIMEOUT`. `GAP` then reads T − S. A Test that never comes raises `wd_err` in
cycle S + `TIMEOUT` + 1.

### What each error catches

| failure of the annotation/mask transfer | caught by |
|---|---|
| not transferred when it should be | watchdog (the counts stay apart) |
| transferred when not requested | watchdog (an unpaired Set or Test) |
| transferred too early or too late | watchdog (gap reaches `TIMEOUT`) |
| transferred with a wrong value, illegal jump | control logic, `cfe` |

Both errors are sticky until the controller is restarted. A disabled controller does not
count, check or time.

## Many tasks, few controllers: fixed and dynamic controllers

The peripheral has `N_CTRL` controllers (4 by default). Each one is marked fixed or dynamic.

* A **fixed** controller always watches the same task. Once the global `LOCK` bit is set,
  its settings cannot be written until reset. Only its `RESTART` bit still works, so it
  can be recovered after an error.
* A **dynamic** controller stays writable. At each context change the scheduler gives it
  the incoming task's addresses, size and timeout, and sets `RESTART`. In this way more
  tasks than controllers can be monitored.

A controller's state (vectors, counts) is not saved and restored at a switch. A restart
zeroes the counts and empties both vectors, so a resumed task has to start with a Set:

* If the task was switched out between a Test and its Set (STATUS shows equal counts),
  nothing is needed. Its next write is the Set.
* If it was switched out between a Set and its Test (the counts differ by one), the
  scheduler re-writes the annotation words after the restart, upper words first and word 0
  last. Their last value is still in the task's memory. Without that, the task's next Test
  would be paired with the task's own following Set, and the check would fail.

So before switching a task out, the scheduler reads STATUS and keeps that one bit of state.

## Register map

The management block is an APB-style slave: 12-bit byte address, 32-bit data, no wait
states (`pready` is always 1), no error response. Writes take effect at the end of the access
phase. Reads return data in the access phase.

Controller *c*: address = `c << 5 | reg << 2`, with `paddr[11] = 0`.

| reg | name | bits |
|----|----|----|
| 0 | CTRL | [0] ENABLE, [1] FIXED, [2] RESTART (write 1, reads 0), [12:8] SIZE_SEL |
| 1 | ANN_BASE | byte address of annotation word 0 |
| 2 | MASK_BASE | byte address of mask word 0 |
| 3 | TIMEOUT | [15:0] watchdog limit in cycles, 0 = off |
| 4 | STATUS (RO) | [0] ERR, [1] CFE, [2] WD_ERR, [15:8] Set count, [23:16] Test count |
| 5 | GAP (RO) | [15:0] cycles from the last Set to the following Test |

Global registers: `paddr[11] = 1`, address = `0x800 | reg << 2`.

| reg | name | bits |
|----|----|----|
| 0 | GCTRL | [0] LOCK (can be set, not cleared), [1] IRQ_EN |
| 1 | ERR (RO) | one ERR bit per controller |
| 2 | INFO (RO) | [7:0] controllers, [15:8] bits per replica, [23:16] replicas |

Besides the register port, the top level brings out per-controller `err`, `set_pulse` and
`test_pulse`, plus `irq` (the OR of all `err` bits, gated by `IRQ_EN`).

A typical bring-up writes ANN_BASE, MASK_BASE and TIMEOUT of each controller, then CTRL
with ENABLE, FIXED, SIZE_SEL and RESTART, then GCTRL = 3 (lock, enable interrupt).

## Top level and parameters

`cfc_peripheral` holds `cfc_management` and `N_CTRL` instances of `cfc_controller`. All
controllers snoop the same write bus (`bus_valid`, `bus_addr`, `bus_wdata`). The clock is
single, and the reset is asynchronous and active low.

| parameter | default | meaning |
|---|---|---|
| `N_CTRL` | 4 | number of controllers (up to 64 fit the address map) |
| `SLICE_W` | 8 | bits per YACCA replica |
| `N_SLICES` | 25 | replicas per controller; 8 x 25 = 200 basic blocks |

The SIZE_SEL field is 5 bits wide. With more than 31 replicas, only SIZE_SEL = 0 (all)
reaches the upper ones. Widen `SEL_W` in `cfc_pkg` for such a configuration.

Package `cfc_pkg` fixes the 32-bit bus, the 8-bit counters, the 16-bit timeout, the
5-bit size field, the structs passed between management and controllers, and the register
offsets. At the defaults the design synthesises to about 1300 word-level cells and 3500
flip-flops. Most of the flip-flops are the four controllers' 200-bit vectors and their
staging words.

Files: `rtl/` has one module or package per file. `tb/<module>_tb.sv` is each module's
self-checking testbench.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Example for the top:

    verilator --binary --timing --assert -Irtl -y rtl rtl/cfc_pkg.sv \
        tb/cfc_peripheral_tb.sv --top-module cfc_peripheral_tb -o sim
    ./obj_dir/sim

`cfc_peripheral_tb` runs the design at its default size. It models four hardened tasks
on one bus: a 200-block task on a fixed controller with full-width vectors, a 16-block task
on a fixed controller using two replicas, and two tasks that take turns on the dynamic
controller over four context changes. A fifth task writes to a disabled controller's
addresses. Along the way the testbench makes these happen:
* illegal jumps;
* a stall that trips the watchdog;
* restarts and the interrupt;
* a write refused by `LOCK`;
* stores that the re-programmed controller must ignore;
* a resume with the annotation re-written, which passes;
* a resume without it, which is flagged. It checks every snooped write, the cycle at which `err` rises, and
the counts read back over APB. It finishes in a few seconds.

The block testbenches compare against models written independently in the testbench:

| testbench | what it covers |
|---|---|
| `yacca_slice_tb` | exhaustive 8-bit check |
| `yacca_checker_tb` | single-bit cases at the edges of every size selection, and random ones |
| `write_sniffer_tb` | staging, commit, unaligned writes, writes outside the window, clear |
| `set_test_counters_tb`, `cfc_watchdog_tb`, `cfc_control_logic_tb` | random stimulus against a cycle model |
| `cfc_controller_tb` | a random 200-block graph walked with injected illegal jumps and stalls |
| `cfc_management_tb` | every register, LOCK, RESTART and the interrupt |

## Design choices beyond the base description

The description this RTL follows defines these parts:
* the YACCA equation, evaluated in combinational logic;
* the replicated 8-bit checker with a size-selecting enable control, at 25 replicas for
  about 200 basic blocks;
* the parts of a controller: sniffers, Set/Test counters, a watchdog that fires on a long
  counter mismatch, and control logic armed only when the counts match;
* a management block over N controllers;
* the split into fixed and dynamic controllers.

Everything else is a choice made here and can be changed:

* The bus: 32-bit words, the multi-word vector layout, word 0 last as the commit, staging
  of the upper words, and byte enables ignored.
* Counter width (8 bits, wrapping), timeout width (16 bits, saturating), and `TIMEOUT = 0`
  meaning off.
* The watchdog has only a late limit. There is no early window.
* The `GAP` measurement register.
* Errors stay set until restart.
* The APB-style register port, the register map, `LOCK`, the `RESTART` exception for
  locked controllers, and `IRQ_EN`.
* `N_CTRL = 4`.
* No state save and restore at a context change.

Not included: the host CPU and its data memory, and any custom RISC-V instructions that
could issue Set and Test atomically. The top level only exposes the snooped bus where a
CPU would connect.
