# Compiler-directed resizing: fetch throttle and hot function detector

An out-of-order processor burns energy in its instruction-delivery path:
instruction cache, decode and the issue window. Much of that work goes to
instructions that are fetched early and then wait, or are flushed. Many
functions in a program do not need the whole instruction window. Such a
function runs just as fast with fewer instructions in flight, and it fetches
less.

The idea is to let software pick the window size for each function. The
hardware does two things:

1. **Profiling.** A *hot function detector* follows calls and returns. It
   keeps one record of event counts, an *info block*, per recently run
   function. It reports a function as hot when that function has taken a
   large share of a fixed time window. A runtime system and a dynamic
   compiler read these records. From the cache miss rates and the branch
   misprediction rate they choose a limit, MAXCOUNT, for each hot function.
2. **Enforcement.** The compiler puts a new instruction, `maxcnt`, into the
   function's prologue and epilogue. If the function is hot only over many
   short calls, the instruction goes into the caller instead, so that it is
   not executed on every call. A *fetch throttle* counts the instructions in
   the processor and stops fetch while that count is at or above MAXCOUNT.

This repository holds the RTL of both parts. The processor they attach to is
not included: caches, decode, issue window, execution units and re-order
buffer. Its signals are ports of the top module, `cdr_top`. The software that
reads the profile and places `maxcnt` is not included either.

## Block structure

```
cdr_top
├── maxcnt_decode            finds maxcnt in the decode group
├── fetch_throttle           MAXCOUNT register + compare -> fetch_gate
│   └── instr_counter        +fetched, -committed, -squashed
└── hot_function_detector    current function ID register
    ├── func_id_stack        caller IDs, pushed on call, popped on return
    ├── refresh_timer        clears the buffer every 2**20 cycles
    └── fbb                  function behaviour buffer (info blocks)
```

`cdr_pkg` holds the shared types: the PISA instruction word, the info block
counters (`info_cnt_t`) and the event strobes (`prof_events_t`).

The two halves share no wire. The loop between them goes through software.
The profile is read out through the buffer's read port. The decision comes
back into hardware as `maxcnt` instructions in the instruction stream.

## The hot function detector

This is the part with the most state and the least obvious timing.

### Which function is running

`cur_fid` holds the ID of the function being executed. A function ID is the
address of the function's first instruction, without the three low bits.
PISA instructions are 8 bytes long, so those bits are always zero. IDs are
29 bits wide.

- **Call** (`call`=1, `call_target` = PC of the callee's first
  instruction): `cur_fid` is pushed on the function ID stack and the callee's
  ID is loaded.
- **Return** (`ret`=1): the stack is popped into `cur_fid`. A return on an
  empty stack leaves `cur_fid` unchanged. This happens when execution
  returns above the point where profiling started, or above the oldest entry
  after an overflow.
- `call` and `ret` together count as a call.

The stack holds 32 entries (`FIS_DEPTH`) as a circular buffer. A push onto a
full stack overwrites the oldest entry and pulses `stack_overflow`. Deep
recursion therefore loses only the outermost callers. When it unwinds, the
returns beyond the oldest surviving entry keep the current ID.

Calls and returns are meant to come from the commit stage, so that
wrong-path calls are never profiled. At most one call or return is allowed
per cycle.

### Info blocks

The function behaviour buffer (`fbb`) has 64 info blocks (`FBB_ENTRIES`).
Each has a tag and eight 20-bit saturating counters:

| field        | counts, while the function is current        |
|--------------|----------------------------------------------|
| `cycles`     | every cycle                                  |
| `br_correct` | committed branches that were predicted right |
| `br_mispred` | committed branches that were mispredicted    |
| `dc_miss`    | data cache misses                            |
| `dc_hit`     | data cache hits                              |
| `ic_miss`    | instruction cache misses                     |
| `ic_hit`     | instruction cache hits                       |
| `num_calls`  | calls to this function                       |

The buffer is direct mapped. The low 6 bits of the ID select the block and
the remaining 23 bits are the tag. Every cycle the selected block is read,
and then written back at the clock edge with:

- `cycles` + 1;
- + 1 in the counter of each event strobe in `ev` that is high;
- + 1 in `num_calls` if the previous cycle was a call into this function
  (`call_pulse`, delayed one cycle so that it lands in the callee's block).

If the block is empty, or holds another function (the tag differs), the
current function takes it over. The tag is written and all counters start
from zero, this cycle's events included. `fbb_replace` shows when this
happens. Because of this, two functions that share an index and alternate
quickly will both keep small counts and never become hot. A set-associative
buffer would avoid that; this design does not have one.

Events are charged to whatever function is current when they are signalled.
Cache events from a fetch that started before a call are therefore charged to
the callee. The counts are statistics, not exact accounts.

### Refresh and the hot bit

`refresh_timer` is a 20-bit down counter (`REFRESH_BITS`). It starts at its
maximum and wraps every 2^20 = 1,048,576 cycles. In the cycle it holds zero
it raises `refresh`, and every block is emptied at that clock edge. That
cycle's update is dropped.

A function is hot when its `cycles` count reaches 2^-`HOT_SHIFT` of the
refresh period. With the default `HOT_SHIFT`=3, that is 2^17 = 131,072 cycles,
one eighth of the window. No divider is needed: the hardware only watches bit
`REFRESH_BITS-HOT_SHIFT` of the `cycles` counter. When that bit first goes
high:

- the block's sticky hot flag is set;
- `hot_pulse` is high for one cycle;
- `hot_fid` gives the function.

The hot flag lasts until the block is refreshed or taken over. Strictly, the
flag is set when the share *equals* the threshold. A test for "more than"
would fire one cycle later, and the single-bit test is far cheaper.

The runtime system uses `num_calls` to tell the two cases apart. A hot
function with few calls gets `maxcnt` in its own prologue and epilogue. One
that is hot over many calls gets it in the caller.

### Read port

`rd_idx` selects a block. The read is combinational and returns:

- `rd_valid`, `rd_hot`;
- `rd_tag`, which together with `rd_idx` rebuilds the function ID;
- `rd_cnt`, all eight counters.

Empty blocks read as zero.

## The fetch throttle

`instr_counter` holds the number of instructions in the processor. Each
cycle it adds `fetch_n` and subtracts `commit_n` and `squash_n`. The squash
input is needed because instructions flushed after a misprediction leave the
machine without committing. The count is 8 bits wide (`COUNT_W`), which
allows up to 255 instructions in flight.

`fetch_gate = (count >= MAXCOUNT)`. It is combinational from the two
registers. The fetch stage must fetch nothing while it is high; an assertion
checks this. Because fetch can bring in up to `FETCH_W` instructions in one
cycle, the count can go up to MAXCOUNT + `FETCH_W` - 1 before the gate
closes.

MAXCOUNT resets to 255, meaning no limit. A `maxcnt` write takes effect in
the cycle after the instruction is decoded:

- a value of 0 is stored as 1, because 0 would stop fetch for ever;
- values above 255 are stored as 255.

### The `maxcnt` instruction

| field        | bits                    | value                      |
|--------------|-------------------------|----------------------------|
| opcode       | word A [7:0]            | `8'hF0` (`MAXCNT_OPCODE`)  |
| new MAXCOUNT | word B [15:0] immediate | 0 .. 65535, clamped        |

The word layout is the 64-bit PISA format. Word A is bits [63:32] of
`pisa_inst_t`. The opcode value is this design's choice. Change it in
`cdr_pkg` if it clashes with your decoder.

`maxcnt_decode` looks at all `DECODE_W` (4) decode slots. Slot 0 is the
oldest. If several slots hold `maxcnt`, the youngest one wins. The write
happens when the instruction enters decode. A `maxcnt` on a mispredicted path
therefore still changes MAXCOUNT, and nothing undoes it. The next `maxcnt`
(for example in the epilogue) sets it again.

## Parameters of `cdr_top`

| parameter      | default | meaning                                        |
|----------------|---------|------------------------------------------------|
| `COUNT_W`      | 8       | width of the instruction count and MAXCOUNT    |
| `FETCH_W`      | 4       | largest `fetch_n`                              |
| `DECODE_W`     | 4       | decode slots searched for `maxcnt`             |
| `COMMIT_W`     | 4       | largest `commit_n`                             |
| `FIS_DEPTH`    | 32      | function ID stack entries (power of two)       |
| `FBB_ENTRIES`  | 64      | info blocks (power of two)                     |
| `REFRESH_BITS` | 20      | refresh period 2**REFRESH_BITS cycles (<= 20)  |
| `HOT_SHIFT`    | 3       | hot when cycles >= period / 2**HOT_SHIFT       |

The counter width (20) and the PC width (32) are constants in `cdr_pkg`.
`REFRESH_BITS` may not exceed the counter width.

## What comes from the original scheme and what is chosen here

These parts follow the published scheme:

- the structure of both halves: MAXCOUNT, the instruction count, the `>=`
  compare gating fetch, the function ID stack, the current function ID, and
  a buffer of info blocks with a tag;
- the list of info block counters;
- the refresh timer that clears the buffer;
- hot detection by watching one bit of the cycles counter;
- a new instruction that sets MAXCOUNT, detected in the decoder.

These are choices made here, because the scheme leaves them open:

- every size: widths, stack depth, number of blocks, the refresh period;
- the hot ratio of 1/8;
- direct mapping and replacement in the buffer;
- the squash input;
- the reset values;
- the `maxcnt` encoding;
- the stack overflow and underflow rules;
- charging `num_calls` one cycle after the call;
- the read-port interface.

The refresh period of about a million cycles matches the time over which
parts of the window are meant to stay switched off.

What is not included:

- the processor;
- the circuit that actually powers down issue-window slots. The throttle only
  limits occupancy and fetch. Gating unused slots is up to the window's own
  design.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module with independent reference models in `tb/cdr_model_pkg.sv`: a queue
model of the stack and an integer model of the buffer. Every testbench has a
watchdog.

| testbench                  | what it covers                                                                 |
|----------------------------|--------------------------------------------------------------------------------|
| `tb_instr_counter`         | random fetch, commit and squash; saturation                                    |
| `tb_fetch_throttle`        | gate against the model every cycle; random MAXCOUNT writes including 0 and >255 |
| `tb_maxcnt_decode`         | random decode groups; the youngest `maxcnt` wins                               |
| `tb_func_id_stack`         | overflow, popping an empty stack, push and pop together                        |
| `tb_refresh_timer`         | period and phase of the expire pulse                                           |
| `tb_fbb`                   | all blocks, hot flags and reports; takeovers; clears                           |
| `tb_hot_function_detector` | calls and returns, deep nesting, empty returns, refresh, hot reports           |
| `tb_cdr_top`               | full run at the default sizes (see below)                                      |

`tb_cdr_top` runs the whole design at its default parameters for 1.15
million cycles, a little more than one refresh period. A toy core fetches,
commits and squashes on the design's ports, and runs a scripted program:

- random calls and returns, among functions some of which share a buffer
  index;
- one long call whose prologue sets MAXCOUNT to 24. That function becomes hot
  within the call.
- a loop that calls a short function about 10,600 times after setting MAXCOUNT to
  40 once. That function becomes hot over many calls.
- a 40-deep recursion that overflows the stack and then unwinds past its
  bottom.

The testbench checks these every cycle:

- gate, count and MAXCOUNT;
- current function and stack depth;
- refresh and hot reports.

It compares the whole buffer every 8192 cycles. It fails if any of these
never happened: fetch gating, a `maxcnt` write, a squash, a stack overflow, a
return on an empty stack, a buffer eviction, a refresh, or either kind of hot
function. It takes a few seconds.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cdr_pkg.sv tb/cdr_model_pkg.sv tb/tb_cdr_top.sv \
    --top-module tb_cdr_top -Mdir obj_tb_cdr_top
./obj_tb_cdr_top/Vtb_cdr_top
```

Replace `tb_cdr_top` with any other testbench name. Each one prints
`TB_RESULT checks=N failures=M` at the end. To lint a module:

```
verilator --lint-only -Wall -Irtl rtl/cdr_pkg.sv rtl/cdr_top.sv
```

Lint leaves three kinds of warning, all harmless:

- `SYNCASYNCNET`: reset is used asynchronously in the flops and synchronously
  in the assertions' `disable iff`;
- `UNUSEDSIGNAL`: the low PC bits dropped by `pc_to_fid`;
- `PINCONNECTEMPTY`: the refresh timer's `value` output is left open in the
  detector.

## How far to trust it

The RTL is simple and tested against models. Those models were written from
the behaviour set out above, so they confirm that the RTL does what this
README says. They cannot confirm that the choices in "What comes from the
original scheme and what is chosen here" match any particular processor.

No energy figures can be reproduced from this RTL alone. Savings in the
instruction-delivery path depend on the processor, on the benchmarks and on
the runtime policy that turns the profile into MAXCOUNT values. None of these
is included.
