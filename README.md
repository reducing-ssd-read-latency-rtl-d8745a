# NAND flash program/erase suspension: RTL

A NAND flash die does one thing at a time. Once a page program (hundreds of
microseconds) or a block erase (milliseconds) has started, a read aimed at the same die
must wait for it to finish. This wait often costs more than the read itself (a 25 µs
sense and a ~40 µs bus transfer). This RTL lets the die **suspend** a program or erase
at a safe point, serve the waiting reads, and then **resume** the suspended operation.
Suspending costs no data and little extra write time.

The scheme follows G. Wu and X. He, *Reducing SSD Read Latency via NAND Flash Program
and Erase Suspension*. That work evaluates the idea in a trace-driven SSD simulator.
The RTL here is one implementation of the two pieces of logic the scheme needs:

* the **control logic inside the flash chip**: command interface, write state machine,
  page buffer, and a new *shadow buffer*;
* the **flash-controller scheduler** for one channel, which gives reads priority over
  writes and issues the suspend and resume commands.

The analog block (charge pumps, regulators) and the cell array are not logic. They stay
outside the RTL, behind a port bundle (`arr_*`). A behavioural array model in `tb/`
stands in for them in simulation.

## Structure

```
pes_top
├── pes_sched              controller side: read queue, write/erase queue, suspend/resume policy
│   └── sync_fifo (x2)
└── nand_pes_chip          chip side
    ├── cmd_if             command set, legality, byte-wide data in/out
    ├── write_state_machine   algorithm controller (read / ISPP program / erase / suspend / resume)
    │   ├── wsm_counters   phase timer (pulse width + progress), ISPP iteration, erase loop, column sweep
    │   └── status_reg     verify result, fail flag
    ├── page_buffer        4 KB, byte port to the bus, 16-byte word port to the array
    └── shadow_buffer      4 KB copy of the program data, 16-byte restore port
        arr_* ports  ──►   analog block and cell array (outside)
```

`pes_pkg` holds the shared command and array-operation encodings and the timing sets.

## How an operation runs

Every operation is made of **phases**, and the phase timer in `wsm_counters` times each
one:

| operation | phases |
|---|---|
| read | sense (`t_r_phy`): the page is swept word by word from the array into the page buffer |
| program (ISPP) | repeat: program phase (`t_w_program`) at step level *k*, then verify phase (`t_verify`). Stop at the first passing verify. Fail after `n_w_cycle` iterations |
| erase | erase pulse (`t_erase`), then erase verify (`t_verify`, every cell must read erased). Repeat up to `n_erase_max` times |

Every phase ends by discharging the bias it applied (*voltage reset*, `t_voltage_reset`).
The last `t_voltage_reset` cycles of each phase are this reset window. During the window
`arr_op` reads `AOP_VRST`.

In a program phase, the page-buffer words are presented on `arr_wdata` with `arr_we`,
one per clock, with the step level on `arr_level`. In a verify phase, `arr_rdata` is
compared word by word with the page buffer (program) or with all-ones (erase). The
status register collects the result.

## Where an operation can be suspended (the central mechanism)

The command interface turns a *program suspend* or *erase suspend* command into a
suspension request. The request is held until the state machine reports that it is
suspended, or until the operation ends on its own. What happens next depends on where
the request lands:

```
             |<------- cancellable part ------->|<- t_voltage_reset ->|
  phase:     [==================================|=====================]
  request here: cancel now, voltage reset,      request here: finish the phase,
  then suspended (at most t_voltage_reset)      then suspended at its end
```

* **Erase pulse.** The pulse is cut at once and a voltage reset follows. The pulse timer
  keeps the elapsed pulse time, counting the cycle of the cut. On resume the bias is
  re-applied for `t_voltage_reset` (`AOP_VSET`). Then only the **remaining** pulse time
  runs, so the block receives exactly one full pulse in total.
* **Erase verify.** Cancelled at once, and re-done from the start on resume.
* **Program, Inter Phase Suspension (`susp_mode = SUSP_IPS`).** A program or verify
  phase always runs to its end, and the die suspends at that phase boundary. This never
  wastes work, but a read may wait up to a whole phase (20–24 µs).
* **Program, Intra Phase Cancelation (`susp_mode = SUSP_IPC`).** The running phase is
  cancelled at once and followed by a voltage reset, so a read waits at most
  `t_voltage_reset` (4 µs). The cost comes on resume:
  * a cancelled verify is simply run again;
  * a cancelled program phase may or may not have put enough charge into the cells. The
    resumed operation therefore **verifies first**. If the verify passes, the program is
    done. If it fails, the program phase is **re-done at the same step level**. This
    works because the iteration counter counts only completed program phases.
* A request that arrives inside a phase's reset window (in either mode) waits for the
  phase to end, because the voltage is being reset already.
* A request can also arrive while a resume is still in progress. If the page buffer is
  being restored, the restore stops at once: no bias is applied yet. The next resume
  restores the whole page again. If the erase bias is being re-applied, a voltage reset
  follows, and the saved pulse progress is kept.

IPC and IPS differ only in the cancellation rule for program and verify phases. The
mode is an input pin, so one design can run either.

## Resuming and the shadow buffer

A read served while a program is suspended overwrites the page buffer, which held the
data being programmed. Sending that page again over the bus would cost about 41 µs.
Instead, every byte of program data that arrives from the bus is written into the page
buffer **and** into the shadow buffer. On resume, the state machine first copies the
shadow buffer back, one 16-byte word per clock: 256 clocks, inside the `t_buffer` =
3 µs restore phase. Only then does it continue:

| suspended at | resume sequence |
|---|---|
| end of a program phase (IPS or reset window) | restore → verify |
| end of a failing verify | restore → next program phase |
| cancelled program phase (IPC) | restore → verify → re-do the program phase if the verify fails |
| cancelled verify (IPC) | restore → verify |
| cut erase pulse | bias set (`t_voltage_reset`) → rest of the pulse → erase verify |
| cancelled erase verify | erase verify |

While suspended, the die accepts any number of reads, each followed by its data-out
transfer. It returns to the suspended state after each one.

## Command interface

| command | legal when | effect |
|---|---|---|
| `CMD_READ` | idle, or a program/erase is suspended | sense, then `PAGE_BYTES` bytes on `dout` |
| `CMD_PROGRAM` | idle | `PAGE_BYTES` bytes on `din` (to page and shadow buffer), then ISPP |
| `CMD_ERASE` | idle | erase the block addressed by `cmd_row` |
| `CMD_PGM_SUSPEND` / `CMD_ERS_SUSPEND` | a program / erase runs, not suspended, no request pending | raise the suspension request |
| `CMD_PGM_RESUME` / `CMD_ERS_RESUME` | a program / erase is suspended and no read is in progress | resume |

An illegal command is dropped and flagged by a one-cycle `cmd_err`. The command channel
uses valid/ready. `cmd_ready` is low while page data moves. Data moves one byte per
clock with valid/ready.

## Scheduler policy (`pes_sched`)

Host requests carry a tag. Reads go to one queue, and writes and erases to another, in
order. Each time the chip can take a command, the scheduler does the following:

1. if no program or erase is in flight: serve the oldest read, or else start the oldest
   write or erase;
2. if one is running and a read waits: send the matching suspend command, and wait until
   the chip reports it suspended (or finished);
3. if one is suspended: serve the waiting reads one at a time, then send the resume.

For a write, it asks the host for the page (`wd_req`, `wd_tag`). For a read, it streams
the page to the host (`rd_*`, with `rd_last` on the final byte). A finished write or
erase is reported on `cpl_*`.

## Parameters and timing

All timing is in clock cycles at 100 MHz. The 100 MHz clock is also the byte rate of
the controller–chip bus, so one 4 KB page takes about 41 µs to transfer. The defaults
are the 2-bit MLC part. The SLC set is in the package as well.

| field of `flash_timing_t` | MLC (default) | SLC |
|---|---|---|
| `t_r_phy` page sense | 25 µs = 2500 | 10 µs = 1000 |
| `t_w_program` program phase | 20 µs = 2000 | 20 µs = 2000 |
| `t_verify` verify phase | 24 µs = 2400 | 8 µs = 800 |
| `n_w_cycle` max ISPP iterations | 15 | 5 |
| `t_erase` erase pulse | 3.3 ms = 330000 | 1.5 ms = 150000 |
| `t_voltage_reset` | 4 µs = 400 | 4 µs = 400 |
| `t_buffer` shadow restore | 3 µs = 300 | 3 µs = 300 |
| `n_erase_max` erase loops | 4 | 4 |

Other parameters:

* `PAGE_BYTES`: 4096 for MLC, 2048 for SLC.
* `WORD_BYTES`: 16, the width of the array and restore port.
* `ROW_W`: 20, enough for 2^20 pages on a 4-plane die of 1 GB planes with 4 KB pages.
* `TAG_W`: 8.
* `RQ_DEPTH`, `WQ_DEPTH`: 16 each. The write-queue depth is worth varying from 16 to
  512, since write latency is sensitive to it.

To use SLC, set `TIMING(SLC_TIMING)` and `PAGE_BYTES(SLC_PAGE_BYTES)`.

Every program, verify and read phase sweeps the whole page, one word per clock, before
its reset window starts. The state machine therefore stops elaboration with an error if
a phase is shorter than `PAGE_BYTES/WORD_BYTES + t_voltage_reset + 1` cycles, or if
`t_buffer` is shorter than the page in words. Keep this in mind when you shrink the
timing for simulation.

**Array interface contract.** `arr_rdata` must carry the word of `arr_row`/`arr_col`
in the same cycle. Inhibiting cells that have already verified is left to the array,
as in a conventional page-buffer design.

## Design choices beyond the scheme

The scheme defines the phases, the suspension points, the IPS/IPC rules, the erase
progress tracking, the resume sequences and the shadow buffer. The following are this
implementation's own choices:

* **Clock and widths.** 100 MHz clock, 16-byte word path, one-word-per-clock sweeps,
  and a combinational array read.
* **Shadow buffer loading.** The shadow buffer is loaded by mirroring the bus writes.
  The scheme only asks that it fill itself when the write arrives and cost nothing
  then.
* **Retry limit.** `n_erase_max` = 4. The scheme only says the erase is retried up to
  a limit.
* **Iteration count.** `n_w_cycle` is an upper limit. A page whose cells all verify
  early stops early. The data pattern decides the actual count: a "0" cell needs the
  most iterations, the erased value "3" needs none.
* **Interface details.** The command encodings, the legality rules, `cmd_err`, the
  valid/ready handshakes, the tags, and the rule to resume as soon as the read queue
  is empty.
* **Reset.** Asynchronous active-low reset on all control state. The buffers and queue
  storage are not reset.
* **Scope.** One channel with one die. The full SSD has 16 channels, and its dies have
  four planes each. The write buffer, the host link and garbage collection are outside
  this RTL.

## Simulation

Testbenches are in `tb/`, and each one prints `TB_RESULT checks=N failures=M`. Build and
run any of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pes_pkg.sv tb/tb_pes_top.sv --top-module tb_pes_top
./obj_dir/Vtb_pes_top
```

| testbench | what it shows |
|---|---|
| `tb_pes_top_full` | Default sizes: 4 KB page and MLC timing. An erase is suspended by a read after 1 ms. The total pulse time is exact. A program is cancelled (IPC) by a read and resumed, and the data reads back correctly. |
| `tb_pes_workload_slc` | SLC timing, 2 KB page and a 512-entry write queue. Each half (IPC, then IPS) erases a block and queues a burst of 24 writes, more than a 16-entry queue could hold, while reads arrive at random. It checks all read data and that the burst is accepted without stalling. It also measures how long each suspension takes, from command to suspended: under IPC at most `t_voltage_reset`, under IPS at most one phase. A typical run measures a mean of 328 cycles under IPC and 927 under IPS. For comparison, random arrivals should wait (t_p² + t_v²) / 2(t_p + t_v) = 828 cycles on average for a phase boundary (t_p and t_v are the program and verify phase lengths). |
| `tb_pes_top` | Reduced sizes, 400 random requests, IPC then IPS. All read data is checked. The test counts program and erase suspends, resumes, cancellations, phase-boundary suspensions, re-done program phases and reads served while suspended, and fails if any of them never happened. |
| `tb_nand_pes_chip` | Exact program time (`n_w_cycle × (t_w_program + t_verify)`) and read sense time. IPC suspend latency ≤ `t_voltage_reset`. IPS suspension exactly at the phase end. A request in the reset window. Cancelled verify. Re-done program phase. Page restored from the shadow buffer. Erase suspension with exact pulse total. Illegal commands. |
| `tb_write_state_machine` | Exact erase time. Erase and program failure after their limits. `AOP_VRST`/`AOP_VSET` sequence around an erase suspension. Pulse resumed at its progress. |
| `tb_cmd_if`, `tb_pes_sched`, `tb_wsm_counters`, `tb_status_reg`, `tb_page_buffer`, `tb_shadow_buffer` | Each block alone, against reference values computed in the testbench. `tb_pes_sched` uses a behavioural chip. |

`tb/flash_array_model.sv` is the behavioural array model. A 2-bit cell of value *v*
reads back as erased ("3") until it has received ⌈(3−*v*)·N/3⌉ program pulses. An erase
completes after a set number of cycles of erase bias, so a cut pulse shows up as a
shortfall.

Assertions in the RTL check the following:

* a timed state always has its timer running;
* a verify result is taken only after the sweep;
* the command interface and the state machine agree on the kind of the suspended
  operation;
* the queues never overflow.

## How far it can be trusted

* **Simulated sizes.** The default configuration (MLC timing, 4 KB page) is simulated
  end to end. The SLC configuration runs at its full size as well. The long random
  workloads use a shorter page and shorter phases, so that they cover many more
  suspensions.
* **Array model.** The array is a behavioural model. It checks the logic's protocol:
  which operation runs, for how many cycles, on which words, and at which step level.
  It says nothing about the physics. Whether a re-done program phase widens the
  threshold-voltage distribution too much is a question for the cell technology and
  the ECC.
* **Synthesis.** All modules are synthesizable. The page buffer and shadow buffer are
  plain memory arrays. A real chip would use its own page-buffer latches and its own
  word-transfer circuits.
* **Scheduler policy.** The scheduler always suspends as soon as a read waits. It
  keeps no limit on how often one write may be suspended. Under a read stream as fast
  as the chip can serve, writes therefore starve.
