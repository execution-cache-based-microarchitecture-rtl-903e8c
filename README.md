# Execution-cache back end for a power-efficient superscalar processor

A wide out-of-order processor spends much of its power in the front end.
Fetch, branch prediction, decode, register renaming and the issue window all
redo, on every pass through a loop, exactly the work they did on the previous
pass. This design caches the result of that work. Instructions leave the issue
window already decoded, renamed and scheduled, and they are recorded in that
form. The recording goes, in issue order, into an **execution cache (EC)**
placed after the issue stage. When execution reaches the start of a stored
trace again, the front end is switched off. The stored *issue units* (groups of
independent instructions issued together) then go straight from the EC to the
execution units. For that stretch the machine behaves like a VLIW processor
fed from a cache.

Replaying renamed instructions only works if renaming comes out the same on
every execution of a trace. A conventional renamer with a free list does not
give that. The design therefore uses a different register file: each
architected register owns a small circular queue of physical registers, and a
cheap checkpoint at every trace boundary puts all queues back into a known
state.

This repository holds synthesizable SystemVerilog for the parts that make up
this scheme:

- the queue register file with its renamer;
- the EC tag and data arrays;
- the fill buffer, in its build and replay roles;
- the controller that sequences trace build, look-up, replay and the
  checkpoints;
- a top level, `ec_top`, that wires them together.

The conventional parts of the processor are left outside `ec_top` and reach
it through ports: fetch, decode, the issue window, the execution units, the
retire buffer, caches, the load/store queue and the branch predictor.

## The queue register file (`reg_pool`, `queue_regfile`)

This is the least familiar part, and everything else depends on it.

There are 32 architected registers, each with 4 physical entries. Every entry
holds:

- a value;
- a 2-bit **POS** tag, its logical place in the queue;
- a **V** bit, set when the value has been written back;
- an **S** bit, set while the producing instruction has not retired.

Each architected register also has an **IDX** pointer: the logical position of
the newest allocated entry. Every access is associative by logical tag: the
entry whose POS equals the tag answers. A physical tag in this design is
therefore a 2-bit number *within one architected register*.

- **Rename.** A source gets the register's current IDX. A destination gets
  IDX+1 (mod 4), and IDX moves there. Within one 8-wide group, later slots see
  the IDX changes made by earlier slots. If the chosen entry still has S set,
  or it holds the last committed value, the whole group stalls. Allocation sets
  S and clears V.
- **Write back** sets V. **Retire** clears S, and that entry becomes the
  register's *last committed* value. The committed entry is never handed out
  again until something newer has retired. This keeps one committed value in
  every queue.
- **Rollback** (mispredict or interrupt): IDX returns to the last committed
  entry, and every speculative entry of every register is released.
- **Checkpoint** (trace boundary, pipeline empty): every POS becomes
  POS XOR IDX, and IDX becomes 0. The entry holding the newest value now has
  POS 0. The other entries get distinct tags; their order does not matter.

Every trace starts with IDX = 0 in all 32 queues. So the k-th write to
register r inside a trace always gets tag k mod 4, on every execution. The
renaming bits stored in the EC therefore stay valid, and a replayed
instruction carries its tags with it. During replay the register file only
re-claims the recorded destination entries (S set, V cleared). A unit stalls
while one of those entries is still speculative.

A worked example is in `tb/tb_queue_regfile.sv`. A two-register loop body is
traced through one build pass, a checkpoint and a replay pass, and every tag
and POS value is checked against values worked out by hand.

A consequence of the all-or-nothing stall is a limit on decode groups. A group
may write the same architected register at most 3 times (NPHYS−1). The front
end must split a group that writes it more often; otherwise rename never
proceeds.

## The execution cache

### Tag array (`ec_tag_array`)

The tag array looks up a trace by the address of its first instruction. Each
entry holds a valid bit, the 64-bit start address, an 8-bit **SET_ID** (the
data-array set that holds the first block), a 32-bit **trace id**, and a 2-bit
count of consecutive mispredicts.

- Size: 4 KB of 14-byte entries, which is 292 entries. This is rounded down to
  64 sets × 4 ways so that the set index is a bit field: `pc[7:2]`.
- Replacement is LRU.
- A look-up answers one cycle after the request.
- When a replayed trace is left on a mispredict, its count goes up. When the
  count reaches M (M = 2 by default), the trace is dropped, and the next pass
  builds a new one. A trace that runs to its end clears its count.

### Data array (`ec_data_array`)

The data array is 4-way set-associative: 168 sets × 4 ways × 76-byte blocks,
about 50 KB. The sets are split into 4 banks of 42 consecutive sets.

A block holds 8 instructions in issue order. Each instruction carries:

| field | bits |
| --- | --- |
| decoded instruction | 48 |
| renaming (three 2-bit tags) | 6 |
| trace tag | 10 |
| retire position | 6 |
| sequence id | 1 |

Each block also carries the number of issue units it holds (3 bits), the trace
id (32 bits) and a block type (2 bits: first / middle / last / single-block
trace).

The first block of a trace is in the set named by SET_ID. Each further block
is in the **next** set. It is found there by comparing the trace id of every
way. Because the next set is known in advance, only the first access of a
trace needs the tag array and all four banks. Every later access powers a
single bank. `da_bank_en` shows which banks are in use each cycle; the others
could be clock- or supply-gated.

### Fill buffer: building (`ec_fill_buffer_wr`)

While a trace is being built, each issue group that leaves the issue window
goes to the execution units. It is also appended to a two-block buffer. All
instructions of one group get the same **sequence-id** bit, and the bit toggles
from one group to the next. This is how issue-unit boundaries are kept inside
densely packed blocks; an issue unit may straddle two blocks.

Once more than 8 instructions are waiting, the oldest 8 are written to the data
array as one block, in the next set. A full block is held back until the
following instruction (or the end of the trace) arrives. That way the last
block can always be marked as last.

### Fill buffer: replay (`ec_fill_buffer_rd`)

In replay mode, blocks are read from consecutive sets into a two-block buffer
whenever a block of space is free. One issue unit per cycle leaves from the
head of the buffer: the run of instructions that share a sequence bit.

A unit is handed out only when it is known to be complete. It is complete when
one of these holds:

- an instruction with the other sequence bit follows it;
- the last block has been read;
- it already has 8 instructions.

The first block is requested in the same cycle the look-up result arrives.
Counted from the look-up request, the first unit is therefore ready after two
cycles: one for the tag array and one for the data array. Later blocks are
read ahead of need. At most one read is in flight. A block of the trace that
is missing (evicted) ends the replay.

## Trace life cycle (`ec_controller`)

```
        +-------+ pipeline empty +------+       +-------+ hit  +------+
  ----->| DRAIN |--------------->| CKPT |------>| LRESP |----->|  EC  |--+
        +-------+                +------+       +-------+      +------+  |
           ^  ^                                     | miss               |
           |  |                                 +-------+                |
           |  +---------------------------------| BUILD |                |
           +------------------------------------+-------+<---------------+
                                                 (trace end, mispredict)
```

- **BUILD.** The front end runs. Decoded groups are renamed. Issue groups
  execute and fill the trace. The build ends after a hard-to-predict
  instruction (the front end flags indirect jumps and returns with
  `dec_trace_end`), or when the trace reaches 512 instructions, or on a
  mispredict. A build that saw a mispredict may already hold wrong-path
  instructions, so it is dropped.
- **EC.** The front end is off, and issue units come from the replay buffer.
  Replay ends at the end-of-trace block, on a mispredict (found at write
  back), or at a missing block.
- **DRAIN.** The controller waits until nothing is in flight. A finished build
  is then closed (its last block written) and recorded in the tag array. For a
  replayed trace, the mispredict count is cleared or incremented, or the trace
  is dropped.
- **CKPT.** This state lasts one cycle. It does the register-file checkpoint
  and, in the same cycle, the tag-array look-up of the address where execution
  continues (`arch_next_pc`, supplied by the retire stage).
- **LRESP.** On a hit, replay starts. On a miss, the front end is restarted at
  that address (`fe_restart`) and a new build starts. A new trace gets the
  next trace id, and its first block goes in the set after the previous build.

## Top level (`ec_top`) interface

| group | signals | meaning |
| --- | --- | --- |
| decode → rename | `dec_valid[8]`, `dec_instr[8]`, `dec_trace_end`, `dec_ready` | a decoded group in program order, accepted when `dec_ready` |
| rename → issue window | `ren_valid[8]`, `ren_instr[8]` | the same group with tags and retire positions, same cycle |
| issue window → EC | `iss_valid[8]`, `iss_instr[8]` | one issue group per cycle (build mode) |
| → execution units | `exe_valid`, `exe_mask`, `exe_instr`, `exe_from_ec`, `exe_ready` | the issue group or replayed unit; EC units wait for `exe_ready` |
| register file | `rd_arch/rd_tag → rd_data/rd_v` (16 ports), `wb_*` (8), `rt_*` (8) | operand reads, write back, retire, by (architected register, tag) |
| pipeline status | `mispredict`, `pipe_empty`, `arch_next_pc` | from write back / retire |
| front end and power | `fe_enable`, `fe_restart`, `fe_restart_pc`, `mode`, `da_bank_en` | front-end gating and restart, current mode, banks in use |

The instruction record is `ec_pkg::ec_instr_t`. Opcode 0 marks an empty slot.

Parameters and their defaults:

| parameter | default | |
| --- | --- | --- |
| `W` | 8 | issue width |
| `XLEN` | 64 | register width |
| `DA_SETS`, `DA_WAYS`, `DA_BANKS` | 168, 4, 4 | data array |
| `TA_SETS`, `TA_WAYS` | 64, 4 | tag array |
| `M` | 2 | consecutive mispredicts before a trace is dropped |
| `MAX_LEN` | 512 | maximum trace length |

For the larger 100 KB EC, set `DA_SETS` = 336 and widen `SETID_W` in
`ec_pkg` to 9 bits.

## How far to trust it

- Each block has a self-checking testbench: `tb/tb_<module>.sv`. Each checks
  outputs against independently computed values, including latencies.
- `tb/tb_ec_top.sv` runs the whole back end inside a processor model:
  - a front end with a one-bit branch predictor that fetches junk after a
    wrong prediction;
  - an in-order issue window;
  - single-cycle execution units with a bypass;
  - a reference model that checks the address and result of every retired
    instruction.

  The program has a loop ended by an indirect jump, data-dependent branches
  that flip every few passes, and a long inner loop. The test counts every
  mechanism and fails if any never happens:
  - builds, hits and misses;
  - replayed units, and replays that run to the end of a trace;
  - length ends and jump ends;
  - mispredicts in build and in replay;
  - dropped traces and evicted blocks;
  - checkpoints and rollbacks;
  - rename stalls in both modes;
  - single-bank and all-bank reads;
  - front-end-off cycles.

  This testbench uses a small EC: 24×2 data blocks, 8×2 tags, 128-instruction
  traces.
- `tb/tb_ec_top_full.sv` is the same test with `ec_top` at its default size.
  It retires 14,000 instructions. About 40 % of the executed instructions come
  from the EC.
- Not modelled, and not checked: loads and stores, interrupts other than
  through the mispredict/rollback path, multi-cycle execution units, and
  out-of-order issue.

### Where this design departs from or adds to the original proposal

- The trace look-up is done after the pipeline drains, not started in
  advance. Every trace change therefore costs the drain plus two cycles.
- A trace being built that sees a mispredict is thrown away.
- The original text gives both 32 and 67 architected registers. 32 (with 4
  physical each) is used here.
- The 48-bit decoded-instruction format is this design's own: opcode, write
  flag, three 5-bit register fields and a 26-bit immediate.
- How traces are placed in the data array is this design's own: the next
  trace starts in the set after the previous one, and trace ids come from a
  counter.
- The replay buffer keeps at most one data-array read in flight, and it hands
  out only complete issue units.
- The retire position is counted from zero in each trace, modulo 64.

## Simulating

Each testbench is a top module with no ports. Modules are found by file name
(`-y rtl`); only the package has to be named. With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/ec_pkg.sv tb/tb_ec_top.sv \
          --top-module tb_ec_top -o sim && ./obj_dir/sim
```

Each testbench ends with a line of the form
`TB_RESULT checks=<n> failures=<m>`. The two top-level runs take well under a
minute.
