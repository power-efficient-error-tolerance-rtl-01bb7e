# Chunked redundant execution with a post-commit buffer

A chip multiprocessor can tolerate transient (soft) errors by running a
program twice and comparing. Running the copy in lock-step on a second
full-speed core doubles the energy. This design uses a cheaper arrangement.
One **lead core** runs the program at full speed. Its instruction stream is cut
into **chunks**, and two or more **checker cores** re-execute those chunks
independently, several chunks at a time. Because the work is split, each checker
can run at half frequency and a reduced supply voltage.

Re-execution needs two things:

- **Start state.** A checker needs the register state at the start of its chunk.
  The lead provides it as a **checkpoint**.
- **Memory.** A checker needs memory as it was at that point of the program. The
  lead's stores are held back from L2 until they are verified. They sit in a
  **post-commit buffer (PCB)**, one section per chunk.

A chunk is verified when both of these hold:

- every store the checker commits matches the lead's store, in address, in data
  and in number;
- the checker's final registers match the checkpoint the lead took at the end of
  the chunk.

Only then is the chunk's section written back to L2. Any mismatch rolls the lead
back to the chunk's starting checkpoint. The failing chunk and every younger one
are thrown away.

This repository holds the logic between the cores and the shared L2 that makes
this work. The cores and the L2 are outside it; their interfaces are the ports of
the top module `rmt_cmp`.

## Configuration

All sizes are parameters. The defaults are:

| Item | Default |
|---|---|
| Chunk | at most 2048 instructions or 128 stores, whichever comes first |
| PCB | 8 sections × 128 entries, one search port, 8 cycles per search |
| Membership hash table | 257 buckets × 8-bit counters |
| Checkpoint | 64 registers + PC, created or loaded at 4 registers per cycle (16 cycles), 9 slots |
| L1 data cache per core | 32 KB, 2-way, 32-byte lines (4 × 64-bit words), 2-cycle load |
| Execution-information queue (EIQ) | 8 sections × 512 entries |
| Checkers | 2 |

Addresses are 64-bit byte addresses. Inside the design they are handled as word
addresses (`waddr_t`, byte address ÷ 8) and line addresses (`laddr_t`, ÷ 32).
Stores are whole 64-bit words.

## Logical time

Everything hard in this design comes from one fact: each core lives at a
different point of the program.

- The lead is the furthest ahead.
- A checker verifying chunk *k* must see memory as it was after its own last
  store in chunk *k*. That means all of chunks 0..*k*-1, plus the part of chunk *k*
  it has already executed.

All of this memory state is still in the PCB; L2 only holds verified chunks.
The PCB therefore answers a search differently depending on who asks:

- **Lead search.** It covers every entry.
- **Backward search** (checker *c*). It covers only entries older than the
  checker's position: earlier sections, plus the first `chk_cnt[c]` entries of
  its own section. The checker's position is the number of its stores already
  verified.
- **Forward search.** It covers the remainder. A checker does not take data from
  it. It only learns that a later chunk will overwrite the line, and so marks
  the filled line **volatile**.

A search returns the youngest matching word, plus a mask of the other words of
the same line that the searched range holds. The miss handler (`line_fill`)
probes those words one at a time, in wrap-around order after the critical word.
It merges them over the L2 line and fills the L1. The critical word goes back to
the core as soon as the first probe and the L2 read have answered.

### Why the checkers' L1 caches stay coherent

A checker does not execute the chunks that other checkers verify. Its L1 can
therefore hold a line that a skipped chunk overwrites. Two mechanisms deal with
this:

1. **Quasi-invalidations.** The first time in a chunk that the lead writes a
   line, `qinv_gen` broadcasts it. A checker holding the line sets the line's
   volatile bit.
2. **Flash invalidation on a skip.** When a checker is given a chunk that is not
   the successor of the one it last verified (`chk_skip`), all its volatile lines
   are invalidated at once.

A line filled after a positive forward search is volatile from the start.

### No dirty data

An L1 never writes back. Committed stores update it, and a replaced line is
simply dropped: the committed value is still in the PCB or already in L2. Verified
data reach L2 only through the PCB's in-order write-back. On roll-back every
L1 is flushed, and so is any fill in flight.

### The membership hash table

Most PCB searches, and nearly all of the lead's, find nothing. `pcb_filter`
keeps one counter per bucket (line address mod 257) of the PCB entries in that
bucket. It counts up on append and down on write-back or squash. A zero counter
lets `line_fill` skip the 8-cycle search and read only L2.

- The remainder mod 257 is formed from the address bytes with alternating signs
  (256 ≡ −1).
- A counter that saturates sticks at its maximum until the PCB is empty. It can
  only cause extra searches, never a missed one.

## Blocks

| File | Block |
|---|---|
| `rtl/rmt_pkg.sv` | shared types: word/line addresses, line data, EIQ entry |
| `rtl/chunk_ctrl.sv` | chunk boundaries, checkpoint sequencing, checker assignment, verdicts, in-order write-back, roll-back |
| `rtl/ckpt_buf.sv` | checkpoint slots; read ports (checker load, lead restore) and beat-wise compare ports |
| `rtl/pcb.sv` | post-commit buffer: append, verify, backward/forward search, drain to L2, squash |
| `rtl/pcb_filter.sv` | counting membership filter in front of the PCB |
| `rtl/pcb_arb.sv` | round-robin sharing of the PCB's single search port |
| `rtl/eiq.sv` | per-chunk queue of branch outcomes/targets and lead miss addresses for the checkers |
| `rtl/qinv_gen.sv` | detects the lead's first write of each line in a chunk |
| `rtl/l1_dcache.sv` | per-core L1 with volatile bits, no dirty state |
| `rtl/line_fill.sv` | per-core miss handler: filter check, PCB probes, L2 read, merge, fill |
| `rtl/rmt_cmp.sv` | top: one lead, `NUM_CHK` checkers |

Every file begins with a description of its interface and timing.

## Life of a chunk

1. **Run.** The lead retires instructions. `chunk_ctrl` tells it how much it may
   still retire (`lead_room_insts`, `lead_room_stores`). Every committed store
   goes to the lead's L1, the open PCB section and `qinv_gen`. Branch outcomes
   and miss addresses go to the EIQ.
2. **End.** The chunk ends when it reaches 2048 instructions or 128 stores, or
   when its EIQ section is full. `lead_freeze` rises in that same cycle.
   - The end checkpoint is written over 16 cycles.
   - A new PCB/EIQ section is then opened. If all 8 sections hold unverified
     chunks, the lead stays frozen: this is the PCB-full stall.
3. **Assign.** The oldest closed chunk goes to the lowest-numbered idle checker
   (`chk_start`). The checker receives the starting checkpoint (`chk_ld_*`,
   16 beats), and `chk_go` then starts it for `chk_len` instructions.
4. **Verify.** Each checker store is compared with the next entry of the
   chunk's section. At `chk_end` the checker streams its registers into the
   compare port of `ckpt_buf`.
5. **Verdict.**
   - On a pass, the section is written back to L2 when it is the oldest.
   - On a fail, `chunk_ctrl` starts a roll-back:
     - the failing and younger sections are squashed (each entry also leaves
       the filter);
     - checkers on them are aborted;
     - the L1s are flushed;
     - the lead reloads the chunk's starting checkpoint (`lead_rst_*`) and
       resumes.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it does |
|---|---|
| `tb_rmt_cmp` | End to end at the default sizes; also exercises `chunk_ctrl`. Details below. |
| `tb_pcb` | Model-based test of append, verify, search (data, mask, forward flag, 9-cycle latency), drain and squash |
| `tb_line_fill` | Stand-in L2 and PCB; checks merged lines, probe order, skipped searches and volatile fills |
| `tb_pcb_filter`, `tb_ckpt_buf`, `tb_eiq`, `tb_qinv_gen`, `tb_pcb_arb`, `tb_l1_dcache` | Unit tests (`tb_eiq` and `tb_l1_dcache` use smaller sizes) |

### The end-to-end test

`tb_rmt_cmp` models the cores and the L2:

- **Program.** It is a pure function of the instruction index: instruction
  types, addresses, data and "registers after instruction *n*".
- **Lead model.** It retires up to 12 instructions per cycle.
- **Checkers.** They run at half speed.
- **L2.** It has a 20-cycle latency.

It checks:

- every load of every core, against the memory image at that core's logical
  time;
- every EIQ branch entry;
- every checkpoint load and restore;
- the order of the L2 write-backs.

It injects one store fault and one register fault, and expects exactly two
roll-backs. It verifies 40 chunks and counts each mechanism, failing if any
count is zero:

- chunk ends by instructions, by stores and by a full EIQ;
- PCB-full stalls;
- PCB hits;
- filter skips;
- multi-word probes;
- volatile fills;
- quasi-invalidations;
- skip invalidations;
- parallel checking;
- idle checkers.

It runs in well under a second.

### Running a testbench

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/rmt_pkg.sv tb/tb_rmt_cmp.sv --top-module tb_rmt_cmp
./obj_dir/Vtb_rmt_cmp
```

## Limits and departures

- **Outside the design:**
  - the cores themselves, including the store queue and the checker's use of
    the EIQ;
  - the shared L2 and the interconnect;
  - voltage/frequency scaling.

  Checkers share the lead's clock; a slower checker is modelled as one that
  does less per cycle.
- **Checkpoints.** They hold the PC and 64 architectural registers. The
  checkpoint buffer has 9 slots, so eight outstanding chunks plus the newest
  end checkpoint fit.
- **EIQ.** Its depth (512 per section) is this design's choice. A chunk ends
  early when its section fills.
- **L1.** It does not allocate on a store miss. It has no per-word valid bits:
  every word of a line the PCB holds is probed.
- **PCB.**
  - Stores are whole words. Byte or partial stores would need byte masks in
    the PCB, search and merge.
  - The PCB is searched one section per cycle. Its 8 × 128 comparators are
    large; a search that walks fewer entries per cycle would trade area for
    latency.
- **Roll-back** flushes all L1 caches rather than only the lead's and the
  affected checkers'. It costs refills but keeps the rule simple.
- **Parallel programs.** Only single-threaded programs are supported. There is
  no coherence with other lead cores.
- **Sleep policy.** No policy for sleeping checkers is built. Such a policy
  would keep checkers asleep while the PCB is nearly empty and wake them when
  it is nearly full. `chk_idle` only shows which checkers have nothing to do.
- **Miss-address prefetch.** The checker cores must do it themselves at the
  start of a chunk. This design only delivers the lead's miss addresses through
  the EIQ.
