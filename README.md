# Loop-buffer instruction memory for low-power sensor-node processors

Small embedded processors, such as those in biomedical wireless sensor nodes,
spend most of their time in a few short loops. Fetching
those instructions again and again from a large program memory costs far more
energy than fetching them from a tiny memory next to the processor. This RTL
implements an **instruction memory organisation (IMO)** that adds a *loop
buffer*. During the first iteration of a loop, the program memory feeds the
processor and a copy of each instruction goes into the loop buffer. The later
iterations are fetched from the loop buffer, and the program memory stays
idle. Code outside loops is fetched from the program memory as usual.

Two loop buffer architectures are provided, selected by a parameter:

* **CELB** (central loop buffer): one loop buffer memory.
* **BCLB** (banked central loop buffer): several smaller loop buffer memories.
  The controller connects only the banks that the current loop body needs.
  The other banks stay idle, which cuts switching and allows power-down.

Whether a loop buffer saves energy depends on the application. It pays off
when a large share of execution time is in loops that fit the buffer. CELB
tends to win when that time sits in a few loops of similar size. BCLB tends
to win when it is spread over loops of very different sizes, because its
extra control logic then earns its keep. The parameters let you build the
configurations compared in the study behind this design (see *Configurations*).

## Block structure

```
                 decode stage of the processor (not part of this RTL)
        jump / jump_target    loop_setup / loop_end / loop_count    fetch_en
                 |                         |                           |
           +-----v-------------------------v------+                    |
           | pc_zolc: PC + LS/LE/LC/LF registers  |<-------------------+
           +------------------+-------------------+
                              | pc (fetch address)
        +---------------------+------------------------------+
        |                     |                              |
 +------v-------+   +---------v---------+          +---------v----------+
 |program_memory|   |  lb_controller    |--rd/wr-->|    loop_buffer     |
 |  2K x 16     |   |  (s0..s5 FSM)     |<-tag_hit-|  CELB: 1 x lb_bank |
 +------+-------+   +---------+---------+          |  BCLB: N x lb_bank |
        | pm_rdata            | src_lb             |  + bclb_bank_select|
        +--------(record)-----+------------------->|  + multiplexers    |
        |                     |                    +---------+----------+
        |                  +--v--+                           | lb_rdata
        +----------------->| MUX |<--------------------------+
                           +--+--+
                              v instr (to the processor)
```

| file | what it is |
|---|---|
| `rtl/lb_pkg.sv` | controller state type `lb_state_e`, architecture type `lb_arch_e` |
| `rtl/imo_top.sv` | top: wires the blocks below and holds the instruction multiplexer |
| `rtl/pc_zolc.sv` | program counter with zero-overhead hardware loops (LS, LE, LC, LF) |
| `rtl/program_memory.sv` | synchronous single-port program memory |
| `rtl/lb_controller.sv` | the six-state loop buffer controller |
| `rtl/loop_buffer.sv` | CELB or BCLB memory architecture, with bank multiplexers |
| `rtl/bclb_bank_select.sv` | BCLB bank choice and index-to-bank mapping |
| `rtl/lb_bank.sv` | one loop buffer memory with a 1-bit tag per word |

## Fetch timing

Every cycle with `fetch_en=1`, the address on `pc` is fetched. The
instruction appears on `instr` in the **next** cycle, whichever memory
supplied it. Both memories are synchronous with one cycle of latency, and the
controller registers its choice of source (`src_lb`, exported as
`instr_from_lb`), so the loop buffer adds neither a cycle nor a stall. With
`fetch_en=0`, the PC, the memories' outputs and the source select all hold.

Each fetch reads exactly one memory. `pm_access` and `lb_read` pulse for the
reads, and `lb_write` pulses for each recording. Counting these pulses over a
run gives the memory activity, which is the first-order driver of IMO power.

## The loop buffer controller (`lb_controller`)

This is the heart of the design. For every fetch it decides which memory
supplies the instruction, and whether to record it. The controller keeps its
own copy of the claimed loop's first address (LS), last address (LE) and
remaining iteration count. It does not depend on the processor's loop
registers after set-up.

| state | who supplies | what happens | leaves to |
|---|---|---|---|
| s0 | program memory | Waits for a loop set-up whose body fits and that runs at least twice. Claiming it latches LS/LE/count, clears all tags, loads the bank choice and records the first word. | s1 |
| s1 | program memory | Hand-over into recording, one cycle. Behaves like s2. | s2, s3 or s0 |
| s2 | program memory | Records every fetched body word whose tag is clear. Fetching LE ends the iteration. | s3, or s0 if that was the last iteration |
| s3 | program memory | Hand-over, one cycle. The last recorded word is being written, so the single-port loop buffer cannot be read yet. | s4 |
| s4 | loop buffer | Serves every body address whose tag is set. Fetching LE in the last iteration ends the loop. | s5; s1 on a miss |
| s5 | program memory | Hand-over, one cycle. The last loop-buffer word is delivered while the program memory reads the first address after the loop. | s0 |

**Recording.** A recorded word is written in the cycle after its fetch,
because that is when the program memory returns it. The controller never
reads the loop buffer in that cycle. An assertion checks this.

**Tags and changing loop bodies.** Each loop buffer word has a 1-bit tag that
means "this word holds the instruction of its address in the current loop".
A loop body need not execute the same instructions every iteration: an
if-branch may skip words in the first iteration, or a call may leave the body.
In s4, a fetch outside [LS, LE] or with a clear tag is therefore served by the
program memory. If the address is inside the body, the word is recorded. The
controller returns to s1 and records until the end of that iteration, then
goes through s3 back to s4. Words the loop never executes are never recorded
and cost nothing.

**What is buffered.** Only a loop whose whole body fits is claimed. A loop
set up inside a claimed loop is ignored, because it already sits in the
claimed body. If an outer loop does not fit, its inner loop is claimed each
time it starts, and the tags are cleared each time. A loop that runs only
once is never claimed.

**Cost of buffering.** For a loop of B >= 2 words and N iterations, (N-1)*B-1
fetches come from the loop buffer. The first iteration comes from the program
memory, and so does the first word of the second iteration, because of s3.
If the fetch stalls during s3, that word also comes from the loop buffer. A
one-word loop gets N-3 loop-buffer fetches.

## Banked buffer (BCLB)

`bclb_bank_select` chooses the banks when a loop is claimed, from the loop
body size:

1. If one bank can hold the body, the smallest such bank is used alone.
2. Otherwise, banks 0, 1, 2, ... are chained until their words cover the body.

With equal banks, as in the default of 8 banks of 8 words, this simply enables
ceil(B/8) banks. A 53-word loop uses 7 banks, and a 5-word loop uses bank 0
alone. With unequal banks (through `loop_buffer`'s `BANK_WORDS` array, for
example 8 + 32 words), a small loop goes to the small bank and a medium loop
to the large one. `bank_act` (exported as `lb_banks_active`) shows the
selection. It is meant to drive power gating or clock enables of unused
banks, which this RTL does not model. The loop-relative index is mapped to a
(bank, word) pair for the read side and the write side separately. The read
data multiplexer follows the bank that was read in the previous cycle.

## Program counter and hardware loops (`pc_zolc`)

The processor runs loops without branch instructions. A loop instruction
loads LS (start), LE (end) and LC (iterations). Whenever LE is fetched with
LC > 1, the next fetch goes back to LS and LC counts down. LF counts the
active nested loops; outer loops wait on a stack of `LOOP_DEPTH` entries.
The decode stage drives two kinds of event, each in the cycle after it
received the instruction:

* `jump`/`jump_target`: a taken branch. The instruction fetched in that same
  cycle (the delay slot) still executes, and the next fetch is the target.
* `loop_setup`/`loop_end`/`loop_count`: a loop instruction. The address being
  fetched in that cycle is taken as LS, so the loop body must directly
  follow the loop instruction.

Both events are honoured only with `fetch_en=1`. Nested loops must end at
different addresses. A jump takes priority over a loop-back in the same
cycle.

## Parameters of `imo_top`

| parameter | default | meaning |
|---|---|---|
| `ARCH` | `ARCH_BCLB` | `ARCH_CELB` or `ARCH_BCLB` |
| `PM_WORDS`, `INSTR_W` | 2048, 16 | program memory of the general-purpose processor |
| `NUM_BANKS`, `BANK_WORDS` | 8, 8 | BCLB banks and their common size |
| `BANK_SIZES` | all `BANK_WORDS` | size of each BCLB bank, for banks of unequal size |
| `CELB_WORDS` | 8 | CELB size |
| `LOOP_DEPTH` | 4 | hardware loop nesting depth (this design's choice) |
| `CNT_W` | 16 | iteration counter width (this design's choice; holds 32,625, the largest count profiled) |

## Configurations

The study compared four application/processor pairs: heartbeat detection
(HBD) and AES encryption, each on a general-purpose 16-bit processor and on
a processor optimised for that application. Each pair was paired with this
loop buffer sizing:

| workload | program memory | CELB | BCLB | `imo_top` settings |
|---|---|---|---|---|
| HBD, general-purpose | 2K x 16 | 8 words | 8 x 8 words | defaults; `ARCH_CELB` for CELB |
| HBD, optimised | 1K x 20 | 64 words | 8 x 8 words | `INSTR_W=20, PM_WORDS=1024`; `CELB_WORDS=64` |
| AES, general-purpose | 2K x 16 | 8 words | 4 x 8 words | `NUM_BANKS=4` |
| AES, optimised | 1K x 16 | 32 words | 4 x 8 words | `NUM_BANKS=4`; `CELB_WORDS=32` |

The study also reports the lowest-power sizes when the loop buffer is
resized for each workload. For CELB these are 16, 64, 32 and 32 words, in the
order of the table above. For BCLB with two memories they are 8 + 8, 16 + 64,
8 + 32 and 8 + 32 words. The two-memory BCLB is set with `NUM_BANKS=2` and,
for example, `BANK_SIZES='{8, 32}`.

`tb/imo_workloads_tb.sv` runs the measured loop profile of each pair (loop
addresses, body sizes and iteration counts) through both architectures, once
in the sizing of the table and once in the resized sizing. It runs each loop
once, with straight-line code in between. The share of fetches served by
the loop buffer came out as follows (only loops and the code between them
are modelled, so these shares exceed the applications' real ones):

| profile | CELB | BCLB | resized CELB | two-memory BCLB |
|---|---|---|---|---|
| HBD, general-purpose | 92 % (8) | 99 % (8 x 8) | 99 % (16) | 99 % (8 + 8) |
| HBD, optimised | 99 % (64) | 99 % (8 x 8) | 99 % (64) | 99 % (16 + 64) |
| AES, general-purpose | 64 % (8) | 96 % (4 x 8) | 96 % (32) | 96 % (8 + 32) |
| AES, optimised | 78 % (32) | 78 % (4 x 8) | 78 % (32) | 78 % (8 + 32) |

## Where this design fills gaps

The loop-buffer scheme is specified here at the level of its behaviour: the
six states and their roles, the per-word tag, recording during the first
iteration, and bank selection by body size. The details below are this
design's own choices:

* the exact transitions, and the one-cycle meaning of s1, s3 and s5;
* the claim rule (the body fits and the loop runs at least twice; nested
  set-ups are ignored);
* the controller counting iterations itself;
* the smallest-bank-else-chain bank rule and support for unequal banks;
* the decode-stage interface, the single branch delay slot and the loop
  stack depth;
* single-port synchronous memories modelled as arrays, where a product would
  use SRAM macros;
* asynchronous active-low reset of all control state and the tags, with no
  reset of the memory arrays.

Not included: the processor cores themselves (datapaths, register files,
application-specific units such as the multiply-accumulate unit and the
128-bit AES vector unit), the data memory and the I/O FIFOs. The top exposes
the processor's fetch-side signals as ports instead. Power is not modelled;
use the activity outputs or a gate-level power flow.

## Verification

Every testbench checks its own results and ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `imo_top_full_tb` | default top (BCLB 8 x 8), test program run three times with random stalls |
| `imo_top_tb` | CELB 8 and BCLB 4 x 8 side by side, same program; every state, tag miss, oversize loop, nested loop, call, stall in s4 and multi-bank use must occur |
| `imo_workloads_tb` | the four loop profiles in four sizings each, including unequal banks; exact loop-buffer fetch counts |
| `lb_controller_tb` | hand-derived state and source for every fetch, with and without stalls |
| `loop_buffer_tb`, `bclb_bank_select_tb`, `lb_bank_tb`, `program_memory_tb`, `pc_zolc_tb` | unit tests against reference values |

The system tests (`imo_tb_driver`, `imo_profile_driver`) act as the
processor's decode stage. Each keeps an independent model of the program
counter and hardware loops. Every fetch address is compared with that model,
and every delivered instruction with the program image.

Simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module imo_top_tb rtl/lb_pkg.sv tb/imo_top_tb.sv
./obj_dir/Vimo_top_tb
```

Replace `imo_top_tb` with any testbench name. `imo_workloads_tb` runs about
half a million cycles on sixteen instances and takes about seven minutes,
mostly compilation; the others finish within seconds.
