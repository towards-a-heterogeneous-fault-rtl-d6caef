# xLockstep: a lockstep checker for two processors of different architectures

Dual-core lockstep catches faults by running the same program on two cores and
comparing what they produce. When the two cores are identical, one fault can
hit both in the same way (a common-mode fault) and go unnoticed. This design
pairs two *different* processors instead: in the reference system, a 32-bit Arm
Cortex-A9 hard core and a 64-bit RISC-V soft core in the FPGA fabric of the
same SoC. Each runs its own binary, compiled from the same source. The two
never run in cycle lockstep: they have different instruction sets and clocks
(666 MHz and 25 MHz in the reference system). They meet only at **checkpoints**
that software places in the program.

The xLockstep accelerator in this repository is the hardware that makes those
checkpoints work. It is a memory-mapped peripheral with one AXI4-Lite slave port
per processor. At each checkpoint it:

1. **synchronises** the two processors: whichever arrives first waits for the
   other, up to a programmable timeout;
2. **checks** the output words each processor sent since the last checkpoint.
   The values must match, and so must the number of words;
3. **resumes** both processors together;
4. on a timeout or a mismatch, enters an **Error** state. It stays there until
   both processors report that the error has been handled.

It is small: a few hundred flip-flops, most of them in the two register banks
and the two four-word LIFOs.

## Files

| file | contents |
|---|---|
| `rtl/xlockstep_pkg.sv` | register map, CONTROL/STATUS bit positions, state enums, AXI4-Lite request/response structs |
| `rtl/xlockstep.sv` | top level: two register banks, two Synchro instances, the Checker and the main FSM |
| `rtl/xlockstep_ctrl.sv` | main state machine (Idle, Synchro, Checker, Resume, Error) and the checkpoint timeout |
| `rtl/synchro.sv` | handshake that brings both processors to the same point (Idle, Ready, Sync) |
| `rtl/lockstep_checker.sv` | stores each side's outputs and compares them |
| `rtl/lifo.sv` | bounded last-in-first-out store, one per processor |
| `rtl/axil_regs.sv` | AXI4-Lite slave with one processor's register bank |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_xlockstep` end to end |
| `tb/axil_master_bfm.sv` | AXI4-Lite master model used by the testbenches |

## The checkpoint protocol, as software sees it

This is the part most worth understanding. Each processor sees only its own
register bank. It cannot read or write the other processor's registers.

| offset | register | access |
|---|---|---|
| 0x00 | DATA | read/write: the next output word to hand over |
| 0x04 | CONTROL | bit 0 `b_ready_to_sync` (read/write); bit 1 `b_Tx` (write 1 to set); bit 2 `error_fixed` (write 1 to set) |
| 0x08 | TIMEOUT | read/write: checkpoint timeout in accelerator clock cycles, 0 = none |
| 0x0C-0x18 | unused | read 0, writes ignored |
| 0x1C | STATUS | read only, see below |

In the reference system the Arm bank sits at 0x83C0_0000 and the RISC-V bank at
0x8000_0000. The slave decodes only address bits 4:0.

STATUS bits: 0 `b_ready`, 1 `b_Tx` (transfer still pending), 2 `busy` (this
side's LIFO is full and a transfer is waiting), 3 `check_done`, 4 `check_ok`,
5 `error`, 6 `err_timeout`, 7 `err_mismatch`, 8 `err_size`, 11:9 main FSM
state (0 Idle, 1 Synchro, 2 Checker, 3 Resume, 4 Error).

Once, at start-up, each processor writes TIMEOUT. Then, for every checkpoint:

1. **Hand over outputs.** For each output word, write DATA, then set
   `CONTROL.b_Tx`, then poll STATUS until `b_Tx` reads 0. The accelerator
   clears `b_Tx` when it has stored the word. While STATUS.`busy` is set, the
   word is waiting for LIFO space (see the Checker section below).
2. **Synchronise.** Set `b_ready_to_sync` and poll STATUS until `b_ready` (or
   `error`) is set. Then clear `b_ready_to_sync` to acknowledge.
3. **Wait for the check.** Poll until `check_done` (or `error`).
   `check_ok` gives the verdict.
4. **Resume.** Set `b_ready_to_sync` again, wait for `b_ready`, clear
   `b_ready_to_sync` and continue with the program.

If STATUS shows `error` at any step, the processor clears `b_ready_to_sync`,
does whatever recovery the application defines, and sets `error_fixed`. The
cause bits say what went wrong. The accelerator returns to Idle only when both
processors have set `error_fixed`. On leaving Error it empties both LIFOs and
cancels any transfer still pending in `b_Tx`, so the next checkpoint starts
clean.

`b_Tx` and `error_fixed` are write-1-to-set and are cleared only by hardware. A
processor can therefore rewrite CONTROL, for example to change
`b_ready_to_sync`, without cancelling a pending transfer.

## Main state machine (`xlockstep_ctrl`)

| from | to | condition |
|---|---|---|
| Idle | Synchro | either processor sets `b_ready_to_sync` (first checkpoint) |
| Synchro | Checker | the Synchro block reports that both processors met and acknowledged |
| Synchro | Error | the second processor did not arrive within the timeout |
| Checker | Resume | the Checker reports a match |
| Checker | Error | a word or the word count differs |
| Resume | Idle | the second Synchro instance has released both processors |
| Error | Idle | both processors have set `error_fixed` |

The timeout is counted here, in clock cycles, while the Synchro block waits for
the second processor. The limit is the TIMEOUT register of the processor that
arrived first. If both arrive in the same cycle, the Arm one is used. When
the second processor never arrives, Error is entered exactly `TIMEOUT + 1`
cycles after Synchro was entered.

## Synchro (`synchro`)

There are two instances. One is used at the checkpoint and one to resume
execution after the check. Each has three states:

- **Ready:** wait until both `b_ready_to_sync` bits are set.
- **Sync:** raise `b_ready` to both processors. Each processor acknowledges by
  clearing `b_ready_to_sync`. Its `b_ready` drops as soon as it has
  acknowledged. When both have acknowledged, `done` pulses and the block goes
  back to Idle.

Acknowledges are remembered per processor. Without that, a fast processor that
leaves the resume step and sets `b_ready_to_sync` for its next checkpoint
before the slow one has acknowledged would stop the block from ever seeing both
bits clear, and both would deadlock.

## Checker and its LIFOs (`lockstep_checker`, `lifo`)

Each processor's words go into its own LIFO of `DEPTH` words (4 by default).
The Checker does not know how many words a checkpoint will bring, so it must
handle a vector longer than a LIFO. It does this in slices. As soon as both
LIFOs are full, it pops them together, comparing word against word (newest
first, one pair per cycle), and remembers any difference. That frees both
LIFOs for the next words. If only one side's LIFO is full, that side's next
transfer is held, with STATUS.`busy` set and `b_Tx` still set, until the other
side catches up.

When the main FSM enters Checker, both processors have met at the checkpoint,
so all their words have been handed over. The final comparison then runs as
follows:

- **Counts differ:** size error, reported one cycle later.
- **Neither side sent any word** since the last checkpoint: also a size error.
  An empty checkpoint counts as a failure.
- **Otherwise:** the remaining `n` pairs are popped and compared. The result is
  ready `n + 1` cycles after the start.

The result stays on STATUS until the FSM clears the Checker on its way back to
Idle. New transfers are refused until then.

**Consequence of the slice scheme.** Suppose one side sends more words than the
other, by more than the space left in its LIFO. That side stays held busy
before its checkpoint. The other side waits at the checkpoint, and the case
ends in a **timeout** error rather than a size error. For example, 5 words
against 0 words ends this way. Every length mismatch is still an error; only
the reported cause differs.

## Clocking and integration

All logic and both bus ports run on one clock, `clk`, with an asynchronous
active-low reset `rst_n`. In a system where the processors run on other
clocks, each bus port must reach the accelerator through a clock-domain bridge
in the interconnect. The RISC-V core's 64-bit native bus likewise needs a
bridge to this 32-bit AXI4-Lite port. The processors, the interconnect and
those bridges are not part of this RTL.

The top-level ports are plain structs from `xlockstep_pkg`: `arm_req`/`arm_rsp`
and `rv_req`/`rv_rsp`. Two observation outputs are added: `state_o`, the main
FSM state, and `error_o`. The AXI4-Lite slave takes a write when AWVALID and
WVALID are both high. It answers with BVALID one cycle later, and RVALID one
cycle after it accepts a read. It allows one outstanding transfer per
direction, honours byte strobes, and always responds OKAY.

## What follows the reference description and what is this design's own

The following come from the reference description:

- the split into two register banks, two Synchro instances, one Checker and a
  main FSM;
- the five main states and their transitions;
- the three Synchro states and the `b_ready_to_sync`/`b_ready` handshake;
- the `b_Tx` transfer handshake;
- per-processor LIFOs of four words;
- comparison by value and by count;
- a busy indication when a LIFO cannot take more;
- a programmable timeout;
- recovery only after both processors report the error fixed;
- the register names and their offsets.

The following are choices made here, because the description does not settle
them:

- the bit layout of CONTROL and STATUS, and the write-1-to-set bits;
- slice-wise comparison of vectors longer than a LIFO. This is needed for a
  five-word vector to pass against four-word LIFOs, which the reference tests
  require;
- treating an empty checkpoint as an error. This follows the reference test
  table; the prose does not mention it;
- counting the timeout in the main FSM, in cycles, using the first-arriving
  processor's limit, with 0 meaning no timeout;
- per-processor acknowledge in Synchro;
- clearing pending transfers on recovery;
- a single clock domain;
- the AXI4-Lite handshake timing.

Not built:

- the processors themselves;
- the SoC interconnect;
- the software framework that inserts checkpoints;
- a fault-injection mechanism, which is described only as future work.

## Verification

Every module has a self-checking testbench. Each compares the module against
expected values computed in the testbench, has a cycle watchdog, and ends with
a `TB_RESULT checks=N failures=M` line.

- `tb_lifo`: random push/pop against a queue model, full/empty/count,
  push-and-pop replacing the top word, clear.
- `tb_synchro`: either processor first or both together, no `b_ready` with only
  one processor, per-processor acknowledge, early re-arm, abort.
- `tb_xlockstep_ctrl`: every transition, exact timeout cycle counts with either
  processor's limit, disabled timeout, two-sided recovery.
- `tb_axil_regs`: read-back, byte strobes, unused words, read-only STATUS,
  write-1-to-set bits with hardware clear, response latency.
- `tb_lockstep_checker`: all 36 length pairs from 0 to 5 words per side, and
  five-word vectors differing in each single position. For each case it checks
  the result, the error cause, which side is held busy, and the exact latency
  of the final comparison.
- `tb_xlockstep` (end to end, default parameters): two processor models run the
  full protocol over AXI4-Lite. They go through all length pairs and content
  cases above, then a timing table: both processors arriving (either first),
  only one arriving (timeout), and neither arriving (nothing happens). The
  testbench counts successful synchronisations, resumes, timeouts, mismatch
  errors, size errors, busy stalls, slice comparisons and recoveries. It fails
  if any of these never occurs, and it checks the length of every timeout
  episode.

To run one, for example the end-to-end test, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/xlockstep_pkg.sv rtl/lifo.sv rtl/lockstep_checker.sv rtl/synchro.sv \
  rtl/xlockstep_ctrl.sv rtl/axil_regs.sv rtl/xlockstep.sv \
  tb/axil_master_bfm.sv tb/tb_xlockstep.sv --top-module tb_xlockstep
./obj_dir/Vtb_xlockstep
```

It runs in well under a second, about 7,000 clock cycles. For the other
testbenches, list the package first, then the module under test and anything
it instantiates, then its testbench.

Lint (`verilator --lint-only -Wall`) reports only warnings about style:

- unused parameters in the package, which holds constants used by some
  modules and not others;
- two deliberately open output pins in the top level: one Synchro's `waiting`
  flag and the Checker's `slice_cmp` pulse;
- `SYNCASYNCNET` for `rst_n`, which is used both as the asynchronous reset and
  in the `disable iff` of the assertions.

## Changing it

- `DEPTH` on `xlockstep` (and on `lockstep_checker`/`lifo`) sets the LIFO size.
  The protocol does not depend on it. Larger LIFOs make fewer slice
  comparisons and fewer busy stalls.
- The data word is 32 bits, the width of the bus and the DATA register. A
  64-bit output is handed over as two words.
- To put the processors' ports on their own clocks, place an AXI4-Lite
  clock-domain crossing in front of each port. The accelerator itself needs no
  change.
