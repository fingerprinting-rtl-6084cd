# Fingerprinting for a DMR processor pair

Two processors that run the same program in lockstep can detect a soft
error by comparing what they do. Comparing every result as it is produced
costs far more bandwidth than a chip-to-chip link has. Comparing only what
leaves the chip lets an error hide in registers and caches for millions of
instructions, past the checkpoint that was meant to recover from it.

*Fingerprinting*, proposed in "Fingerprinting: Bounding Soft-Error Detection
Latency and Bandwidth" (Smolens et al., ASPLOS 2004), avoids both problems.
Each processor folds every architectural state update it retires into a
small hash, the fingerprint:

- the new register value;
- the effective address of a load or store;
- the data of a store.

At the end of a checkpoint interval the two processors exchange only their
16-bit fingerprints. If the fingerprints agree, every instruction of the
interval is known good and a new checkpoint is taken. If they differ, both
processors roll back to the previous checkpoint.

This gives two guarantees:

- **Bounded detection latency.** No error survives past the end of its
  interval.
- **Tiny comparison bandwidth.** A comparison costs two bytes per interval.
  At 1 instruction per ns and 32K-instruction intervals, that is about
  61 KB/s.

This RTL implements the per-processor logic of such a pair:

- the fingerprint hash;
- the fingerprint exchange and comparison;
- the checkpoint/rollback sequencer;
- a register-file checkpoint;
- a copy-on-write undo log for memory.

Two copies of this logic are wired side by side as the DMR pair. The
processors, caches and interconnect are outside this RTL: they are existing
parts, and the RTL defines the interface it expects from them.

## One checkpoint interval

```
 checkpoint k          ... instructions retire, each hashed ...          compare    checkpoint k+1
 ----|-----------------------------------------------------------------|--------|-------|----
     fp := seed                                                     stall,    match:  register copy,
     log empty                                                      send fp   log cleared
                                                                              mismatch: restore regs,
                                                                              replay log, restart at k
```

An interval ends in one of three cases. In every case `ckpt_ctrl` then
stops retirement and the nodes compare fingerprints.

1. **Interval length reached.** `CKPT_INTERVAL` instructions have retired
   (default 32768).
2. **Irreversible operation.** An uncached load or store reaches
   retirement. Such an operation cannot be re-executed after a rollback, so
   everything before it must be verified first. If the fingerprints match,
   the operation is released: it retires alone, in state `CK_IO`. A
   checkpoint is then taken right after it, so a later rollback never
   replays it.
3. **Log full.** The copy-on-write log is full. The interval ends early,
   so the log never overflows.

Controller states (`fp_pkg::ck_state_e`):

| state | what happens | leaves when |
|---|---|---|
| `CK_COMMIT` | register file copied, log cleared, fingerprint restarted (unless just done in `CK_IO`) | next cycle |
| `CK_RUN` | instructions retire and are hashed | an interval end condition holds |
| `CK_COMPARE` | retirement stalled, fingerprints exchanged | the exchange reports done |
| `CK_IO` | the waiting I/O operation retires; the fingerprint restarts with it | next cycle |
| `CK_ROLLBACK` | register copy restored, log replayed newest first | replay finished, then `restart` |

Reset enters `CK_COMMIT`, so the first checkpoint is the reset state.

**Cost of a successful comparison.** Retirement stops for:

- the exchange time: 2 link beats, the network's latency, and one cycle
  to compare;
- plus one commit cycle;
- plus one more cycle if an I/O operation is released.

`tb_ckpt_ctrl` checks this timing cycle by cycle.

## The fingerprint (`fp_hash`, `fp_pkg`)

The hash is a 16-bit CRC:

- generator polynomial 0x8005 (x^16 + x^15 + x^2 + 1);
- non-reflected;
- all-ones seed;
- one CRC step per data bit, most significant bit first.

`fp_pkg::crc_update` folds up to three 64-bit words for one instruction,
in this order: register result, effective address, store data. A flag says
which of the three are present. All of this is combinational, so a full
instruction is hashed in its retire cycle and hashing never stalls the
pipeline.

As a known-answer test, the word `0x3132333435363738` ("12345678") hashed
from the seed gives `0x972D`.

The CRC is linear. Any single-bit error in the hashed stream therefore
always changes the fingerprint. Arbitrary corruption escapes detection with
probability about 2^-16.

The program counter, condition codes and decoded instruction bits are not
hashed. An error in them shows up in the register values, addresses or
store data that follow.

By default, updates are taken at **retirement**, from the reorder buffer
and the load-store queue. The reorder buffer must therefore carry each
instruction's result. The fingerprint then covers committed state only, so
the two mirrors' fingerprints are identical whatever their speculation did.

**Speculative-state option (`SPEC_FP = 1`).** This option avoids putting
results in the reorder buffer. Each result is hashed as it completes, on a
separate input (`cmp_valid`/`cmp_result`, one per cycle). That includes
results of wrong-path instructions that are later squashed. Addresses and
store data are still hashed at retirement. So is the result of a released
I/O read, which only exists once the read is performed.

- **Interval boundary.** Results keep completing while retirement is
  stalled for a comparison. In this mode the fingerprint therefore
  restarts when the comparison starts, after the exchanger has latched the
  finished value, rather than at the checkpoint. Each completion counts in
  exactly one interval.
- **Lockstep required.** The fingerprint now depends on what was
  speculated and when. The two processors must therefore run in cycle
  lockstep, deterministically, or their fingerprints differ.

`fp_hash` folds a completing result in before the retiring update of the
same cycle.

## Exchange (`fp_exchange`)

`start` latches the local fingerprint and sends it as `16/LINK_W` beats,
most significant beat first, with a `tx_valid` strobe. The beats arriving
from the mirror fill a one-entry buffer.

Once both fingerprints are present and the local send has finished, `done`
pulses with `match`. The mirror may therefore be ahead or behind by any
number of cycles. The two nodes are only required to end their intervals
at the same instruction counts, which they do because the processors are
deterministic.

There is no flow control. Each side has at most one comparison
outstanding, so the receive buffer is always free when beats arrive.

## Rollback state (`reg_ckpt`, `cow_log`)

**`reg_ckpt`** copies the whole architectural register file (flat port
`arf`, `NREGS` x 64 bits) in the commit cycle. On a rollback it presents
the copy on `arf_restore`, with `restore_valid` one cycle later. The
processor is expected to keep its PC and any other control state it needs
among these registers.

**`cow_log`** keeps the old contents of each cache line on the first write
to that line in the interval. The cache decides which write is the first:
a per-line bit that is cleared at each checkpoint. It signals this with
`st_first_wr` and supplies the old line on `st_old_line` when the store
retires.

On a rollback the log is read back **newest first**, one 64-byte line per
cycle, on `mem_rst_valid`/`mem_rst_addr`/`mem_rst_data`. Newest first
matters if a line was logged twice: the older copy, which is the
checkpoint's value, is then written last. `replay_done` comes with the last
line, and the controller then pulses `restart`.

On commit the log is simply emptied.

## Hierarchy and interfaces

```
fp_dmr_top            two nodes, ports are [1:0] arrays (index 1 = mirror)
└── fp_node           one processor's checking logic
    ├── fp_hash       fingerprint register
    ├── fp_exchange   link serializer / receiver / comparator
    ├── ckpt_ctrl     interval counter and state machine
    ├── reg_ckpt      register-file copy
    └── cow_log       copy-on-write undo log
fp_pkg                widths, retire_t, ck_state_e, CRC functions
```

**Retire port** (`ret`, type `fp_pkg::retire_t`): one instruction per
cycle, with a valid/ready handshake. An offered instruction must stay
offered until `ret_ready`; an assertion checks this. The fields are:

- `is_io` marks an irreversible operation;
- `wr_reg` qualifies `result`;
- `is_mem` qualifies `addr`;
- `is_store` qualifies `st_data`.

**Completion port** (`cmp_valid`, `cmp_result`): used only when
`SPEC_FP = 1`. It carries one completing result per cycle, including
squashed ones.

**What the processor must do:**

- load `arf_restore` when `arf_restore_valid` is high;
- write `mem_rst_*` lines into its cache or memory;
- on `restart`, flush and resume from the checkpointed state.

**Link:** connect `tx_*[0]` to `rx_*[1]` and `tx_*[1]` to `rx_*[0]`,
through whatever network latency there is.

## Parameters

| parameter | default | origin |
|---|---|---|
| `CKPT_INTERVAL` | 32768 instructions | the paper's worked example; below the ~50,000-instruction spacing of physical I/O in OLTP |
| fingerprint width (`fp_pkg::FP_W`) | 16 | the paper (CRC-16) |
| `LINE_W` | 512 (64-byte lines) | the paper's L2 line size |
| `NREGS` | 64 | chosen: 32 integer + 32 FP registers of a 64-bit RISC |
| `LOG_DEPTH` | 256 lines (16 KB) | chosen |
| `LINK_W` | 8 | chosen |
| `SPEC_FP` | 0 (committed state) | the paper's preferred option; 1 selects hashing results at completion |
| data width (`fp_pkg::DATA_W`) | 64 | chosen (64-bit ISA) |

**Sizing the log.** For a TPC-C-like database, the paper reports that
comparing all changed state at 32K-instruction intervals needs 440 MB/s at
1 instruction/ns. That is about 14.4 KB, or about 225 lines, changed per
interval on average. A 256-line log therefore holds an average interval;
heavier intervals end early when the log fills.

## What is this implementation's own choice

The fingerprinting scheme fixes the following:

- what is hashed;
- a 16-bit CRC;
- comparison at every interval end and before every irreversible
  operation;
- release of that operation only after a match;
- a register copy plus a copy-on-write memory log;
- rollback on a mismatch.

Everything below is a choice made here:

- the CRC polynomial, seed and bit order;
- the word order within an instruction;
- one retirement per cycle (the paper's evaluation assumes an IPC of 1.0);
- for the speculative-state option: the split between completion-time and
  retirement-time hashing, and restarting the fingerprint when a
  comparison starts;
- stalling retirement during a comparison (the interval could instead be
  closed with a snapshot while execution continues);
- ending an interval early when the log fills;
- hashing the released I/O operation into the next interval;
- the link format;
- the register count;
- the log depth and replay order;
- the first-write bit living in the cache;
- all port protocols.

Known limits:

- The result of a released I/O operation is only checked at the next
  comparison, after the checkpoint that contains it. An error in that
  single value is detected but not recoverable.
- Nothing handles a fault inside this checking logic itself.
- The fingerprint unit hashes one instruction per cycle; a wider
  superscalar retire would need `crc_update` chained per slot.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. Plain Verilator, from the project root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
          rtl/fp_pkg.sv tb/tb_fp_dmr_top.sv --top-module tb_fp_dmr_top
./obj_dir/Vtb_fp_dmr_top
```

Replace the top module with any of the other testbenches.

| testbench | what it shows |
|---|---|
| `tb_fp_hash` | CRC against an independent byte-wise CRC model, a known answer, one update per cycle, completing results hashed before the retiring update |
| `tb_fp_exchange` | two exchangers over a delayed link: match/mismatch, beat count and content, exact completion time under start skew |
| `tb_ckpt_ctrl` | interval length, stall, commit / I/O release / rollback timing, every end condition |
| `tb_reg_ckpt` | restore returns the last checkpoint's registers |
| `tb_cow_log` | newest-first replay, one line per cycle, full flag, clear |
| `tb_fp_node` | one node against a processor model; the testbench acts as the mirror and sometimes answers a wrong fingerprint; sent fingerprints match a reference CRC, and after each rollback the registers, memory and instruction count are the checkpoint's |
| `tb_fp_dmr_top` | full pair, two processor models with independent stalls, 6-cycle network, 8 injected bit flips; every fault is detected by both nodes at the same comparison, before any checkpoint follows the faulty instruction, and rolled back, and the final registers and memory equal a fault-free golden run; counts interval ends, I/O releases, log-full ends, detections, line and register restores, stalls |
| `tb_fp_dmr_full` | the same at the default parameters (32K intervals, 256-line log) over 100,000 instructions with one injected fault; stores spread over 240 lines, so an interval logs up to 240 lines, near the database footprint estimated above |
| `tb_fp_dmr_spec` | the pair with `SPEC_FP = 1`: processors in cycle lockstep that report completing results, including wrong-path ones; half of the 8 faults hit a result that completes while a comparison is in progress; every fingerprint sent equals a reference built from the observed stream; every fault is reported by the comparison of the interval its result completed in, before any later checkpoint; the final state equals the golden run |
| `tb_fp_dmr_io` | the pair at the default parameters under an OLTP-like device-access pattern: a burst of 4 uncached accesses 1000 instructions apart every 50,000 instructions, 160,000 instructions, one fault; every access is released exactly once, only after a matching comparison, and is followed at once by a checkpoint; no interval exceeds 32768 instructions; the link carries 2 bytes per comparison (about 0.0002 bytes per instruction) |

`tb/proc_model.sv` is the behavioural processor used by the node and pair
testbenches. It runs a deterministic pseudo-random program of ALU
operations, loads, stores and I/O reads over a small memory. It flags first
writes and follows the restore and restart protocol. It can also report
completing results and wrong-path results, and stall in lockstep with a
second copy. It is not part of the
design.
